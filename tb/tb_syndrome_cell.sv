// tb_syndrome_cell: drives four syndrome cells (roots alpha^0..alpha^3, three
// symbols per beat, GF(2^4)) with random 15-symbol words, framed by the
// testbench itself, with random idle clocks between beats. Each result is
// compared with the direct sum S_j = sum_k r_k alpha^(j*k); the testbench also
// checks that syn_valid pulses exactly one clock after the last beat and that
// syn holds its value until the next word completes.
module tb_syndrome_cell;
  import rs_ref_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned P = 3;
  localparam int unsigned N = 15;
  localparam int unsigned NS = 4;
  localparam int unsigned BEATS = N / P;
  localparam int unsigned WORDS = 300;

  logic clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [P-1:0][M-1:0] sym = '0;
  logic [NS-1:0][M-1:0] syn;
  logic [NS-1:0] syn_valid;

  int checks = 0;
  int failures = 0;
  int cycle;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  initial cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar j = 0; j < int'(NS); j++) begin : g_dut
    syndrome_cell #(.M(M), .POLY(17'h13), .P(P), .ROOT_EXP(j)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
      .in_last(in_last), .sym(sym), .syn(syn[j]), .syn_valid(syn_valid[j]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r[];
    int exp_s[NS];
    logic [NS-1:0][M-1:0] prev;
    ref_init(M, 'h13);
    r = new[N];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(syn_valid == '0 && syn == '0, "reset state");
    prev = syn;
    for (int w = 0; w < int'(WORDS); w++) begin
      foreach (r[k]) r[k] = (w % 7 == 0) ? 0 : int'($urandom_range(0, (1 << M) - 1));
      for (int j = 0; j < int'(NS); j++) exp_s[j] = syndrome(r, j);
      for (int b = 0; b < int'(BEATS); b++) begin
        // random idle clocks before a beat
        while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          in_first <= 1'($urandom_range(0, 1));   // framing ignored while idle
          in_last  <= 1'($urandom_range(0, 1));
          sym      <= 12'($urandom);
          @(posedge clk);
          #1;
          check(syn_valid == '0, "no valid while idle");
          check(syn == prev, "syn holds while idle");
        end
        in_valid <= 1'b1;
        in_first <= (b == 0);
        in_last  <= (b == int'(BEATS) - 1);
        for (int p = 0; p < int'(P); p++) sym[p] <= M'(r[N - 1 - b * P - p]);
        @(posedge clk);
        if (b != int'(BEATS) - 1) begin
          #1;
          check(syn_valid == '0, "no valid mid-word");
          check(syn == prev, "syn holds mid-word");
        end
      end
      in_valid <= 1'b0;
      in_first <= 1'b0;
      in_last  <= 1'b0;
      #1;
      check(syn_valid == '1, "valid one clock after last beat");
      for (int j = 0; j < int'(NS); j++) begin
        checks++;
        if (int'(syn[j]) != exp_s[j]) begin
          failures++;
          $display("FAIL word %0d S%0d = %0d, expected %0d", w, j, syn[j], exp_s[j]);
        end
      end
      prev = syn;
      // half of the words are followed immediately by the next one
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk);
        #1;
        check(syn_valid == '0, "valid is a single pulse");
        check(syn == prev, "syn held after result");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
