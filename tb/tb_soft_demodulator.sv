// tb_soft_demodulator: for every constellation point of every scheme
// (from the reference constellation, optionally with a small offset that
// stays inside the decision region) the hard decisions of the LLRs must
// give back the transmitted bits, and QPSK LLRs must equal I and Q.
module tb_soft_demodulator;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  mod_e mod_scheme;
  llr_t sym_i, sym_q;
  llr_t llr [6];
  int checks = 0, failures = 0;

  soft_demodulator dut (.mod_scheme(mod_scheme), .sym_i(sym_i), .sym_q(sym_q), .llr(llr));

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < (1 << ref_bps(s)); v++)
        for (int r = 0; r < 5; r++) begin
          bit b6 [6];
          int ei, eq, unit;
          for (int j = 0; j < 6; j++) b6[j] = (j < ref_bps(s)) ? 1'((v >> j) & 1) : 1'b0;
          ref_modulate(s, b6, ei, eq);
          unit = (s < 2) ? 45 : (s == 2) ? 20 : 10;
          if (r > 0) begin
            ei += $urandom_range(unit / 3, 0) - unit / 6;
            eq += $urandom_range(unit / 3, 0) - unit / 6;
          end
          mod_scheme = mod_e'(s);
          sym_i = llr_t'(ei);
          sym_q = llr_t'(eq);
          #1;
          for (int j = 0; j < ref_bps(s); j++) begin
            checks++;
            if ((llr[j] < 0) != b6[j] || llr[j] == 0) begin
              failures++;
              $display("FAIL scheme %0d point %0d bit %0d llr %0d", s, v, j, llr[j]);
            end
          end
          if (s == 1) begin
            checks++;
            if (llr[0] != sym_i || llr[1] != sym_q) begin
              failures++;
              $display("FAIL QPSK LLR values");
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
