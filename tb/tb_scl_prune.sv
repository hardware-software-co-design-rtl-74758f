// tb_scl_prune: random path metrics, leaf LLRs and active sets for list
// sizes 1..4. The probF values must follow the belief rule (penalty |P|
// on the branch that disagrees with the LLR sign), and the kept
// candidates must be exactly the list_size smallest metrics (ties to the
// lower candidate index), found by a reference sort.
module tb_scl_prune;
  import polar_pkg::*;
  logic [3:0] active;
  logic [PM_W-1:0] pm [4];
  llr_t leaf [4];
  logic [3:0] list_size;
  logic [PM_W-1:0] pf0 [4];
  logic [PM_W-1:0] pf1 [4];
  logic [3:0] keep0, keep1;
  int checks = 0, failures = 0;

  scl_prune #(.L(4)) dut (.active(active), .pm(pm), .leaf(leaf), .list_size(list_size),
    .prob_f0(pf0), .prob_f1(pf1), .keep0(keep0), .keep1(keep1));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int val [8];
      bit kept [8];
      int order [8];
      int nv, ls;
      active = 4'($urandom_range(15, 1));
      ls = $urandom_range(4, 1);
      list_size = 4'(ls);
      for (int l = 0; l < 4; l++) begin
        pm[l] = PM_W'($urandom_range((t % 3 == 0) ? 3 : 5000, 0));
        leaf[l] = llr_t'($urandom_range((t % 3 == 0) ? 4 : 4000, 0) - ((t % 3 == 0) ? 2 : 2000));
      end
      #1;
      nv = 0;
      for (int l = 0; l < 4; l++) begin
        int mag;
        mag = (leaf[l] < 0) ? -int'(leaf[l]) : int'(leaf[l]);
        val[2 * l]     = int'(pm[l]) + ((leaf[l] > 0) ? 0 : mag);
        val[2 * l + 1] = int'(pm[l]) + ((leaf[l] > 0) ? mag : 0);
        checks++;
        if (active[l] && (int'(pf0[l]) != val[2 * l] || int'(pf1[l]) != val[2 * l + 1])) begin
          failures++;
          $display("FAIL probF of path %0d", l);
        end
      end
      // selection sort of the valid candidates
      for (int c = 0; c < 8; c++) kept[c] = 0;
      for (int c = 0; c < 8; c++) if (active[c / 2]) begin order[nv] = c; nv++; end
      for (int i = 0; i < nv; i++)
        for (int j = i + 1; j < nv; j++)
          if (val[order[j]] < val[order[i]] || (val[order[j]] == val[order[i]] && order[j] < order[i])) begin
            int tmp;
            tmp = order[i]; order[i] = order[j]; order[j] = tmp;
          end
      for (int i = 0; i < nv && i < ls; i++) kept[order[i]] = 1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (keep0[l] != kept[2 * l] || keep1[l] != kept[2 * l + 1]) begin
          failures++;
          $display("FAIL keep of path %0d (test %0d)", l, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
