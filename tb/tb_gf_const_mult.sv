// tb_gf_const_mult: exhaustive check of the constant multiplier over GF(2^4)
// with polynomial 1 + X + X^4. One instance per constant 0..15; every input
// 0..15 is applied and the product compared with a log/antilog-table product.
module tb_gf_const_mult;
  import rs_ref_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned Q = 1 << M;

  logic [M-1:0]         a;
  logic [Q-1:0][M-1:0]  y;
  int checks = 0;
  int failures = 0;

  for (genvar c = 0; c < int'(Q); c++) begin : g_dut
    gf_const_mult #(.M(M), .POLY(17'h13), .COEF(M'(c))) u_dut (.a(a), .y(y[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init(M, 'h13);
    for (int av = 0; av < int'(Q); av++) begin
      a = M'(av);
      #1;
      for (int c = 0; c < int'(Q); c++) begin
        checks++;
        if (int'(y[c]) != gmul(av, c)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", av, c, y[c], gmul(av, c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
