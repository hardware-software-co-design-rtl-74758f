// tb_g_unit: checks g(a,b,u) = (1-2u)*a + b with saturation to the 14-bit
// LLR range, for corner values and random operands.
module tb_g_unit;
  import polar_pkg::*;
  llr_t a, b, y;
  logic u;
  int checks = 0, failures = 0;
  g_unit dut (.a(a), .b(b), .u(u), .y(y));

  task automatic one(int x, int z, bit uu);
    int r;
    a = llr_t'(x);
    b = llr_t'(z);
    u = uu;
    #1;
    r = (uu ? -x : x) + z;
    if (r > 8191) r = 8191;
    if (r < -8191) r = -8191;
    checks++;
    if (int'(y) != r) begin
      failures++;
      $display("FAIL g(%0d,%0d,%0d) = %0d expected %0d", x, z, uu, y, r);
    end
  endtask

  initial begin
    one(5, 3, 0); one(5, 3, 1); one(8000, 8000, 0); one(8000, -8000, 1); one(-8191, 100, 1);
    for (int i = 0; i < 2000; i++)
      one($urandom_range(16382, 0) - 8191, $urandom_range(16382, 0) - 8191, 1'($urandom));
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
