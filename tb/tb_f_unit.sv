// tb_f_unit: checks the min-sum f operation against
// sgn(a)*sgn(b)*min(|a|,|b|) (zero counted as negative) for corner values
// and random operands.
module tb_f_unit;
  import polar_pkg::*;
  llr_t a, b, y;
  int checks = 0, failures = 0;
  f_unit dut (.a(a), .b(b), .y(y));

  function automatic int model(int x, int z);
    int m, s;
    m = (x < 0 ? -x : x) < (z < 0 ? -z : z) ? (x < 0 ? -x : x) : (z < 0 ? -z : z);
    s = ((x > 0) == (z > 0)) ? 1 : -1;
    return s * m;
  endfunction

  task automatic one(int x, int z);
    a = llr_t'(x);
    b = llr_t'(z);
    #1;
    checks++;
    if (int'(y) != model(x, z)) begin
      failures++;
      $display("FAIL f(%0d,%0d) = %0d expected %0d", x, z, y, model(x, z));
    end
  endtask

  initial begin
    one(5, 3); one(-5, 3); one(5, -3); one(-5, -3); one(0, 7); one(7, 0);
    one(8191, -8191); one(-1, -1);
    for (int i = 0; i < 2000; i++)
      one($urandom_range(16382, 0) - 8191, $urandom_range(16382, 0) - 8191);
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
