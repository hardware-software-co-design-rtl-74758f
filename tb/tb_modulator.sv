// tb_modulator: every bit pattern of every scheme is compared with the
// TS 38.211 constellation computed in real arithmetic and rounded to the
// (14,8) per-axis unit.
module tb_modulator;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  mod_e mod_scheme;
  logic [5:0] bits;
  llr_t sym_i, sym_q;
  int checks = 0, failures = 0;

  modulator dut (.mod_scheme(mod_scheme), .bits(bits), .sym_i(sym_i), .sym_q(sym_q));

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < (1 << ref_bps(s)); v++) begin
        bit b6 [6];
        int ei, eq;
        for (int j = 0; j < 6; j++) b6[j] = (j < ref_bps(s)) ? 1'((v >> j) & 1) : 1'b0;
        ref_modulate(s, b6, ei, eq);
        mod_scheme = mod_e'(s);
        bits = 6'(v);
        #1;
        checks++;
        if (int'(sym_i) != ei || int'(sym_q) != eq) begin
          failures++;
          $display("FAIL scheme %0d bits %b: %0d,%0d expected %0d,%0d", s, bits, sym_i, sym_q, ei, eq);
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
