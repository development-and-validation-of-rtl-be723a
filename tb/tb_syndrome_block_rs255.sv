// tb_syndrome_block_rs255: the syndrome block configured for 255-symbol words
// over GF(2^8) (primitive polynomial 1 + X^2 + X^3 + X^4 + X^8, 16 syndromes,
// three symbols per clock, 85 clocks per word), the length of the RS(255,239)
// mother code of DVB. Words are RS(255,239) codewords from the reference
// encoder, optionally with up to eight symbol errors, or random data; they are
// sent back to back or with idle clocks inside. Every syndrome is compared
// with the direct sum, clean codewords must give all zeros, and unstalled
// words must produce their result N/P clocks after the first beat.
module tb_syndrome_block_rs255;
  import rs_ref_pkg::*;

  localparam int unsigned M = 8;
  localparam logic [16:0] POLY = 17'h11D;
  localparam int unsigned P = 3;
  localparam int unsigned N = 255;
  localparam int unsigned K = 239;
  localparam int unsigned NS = N - K;
  localparam int unsigned BEATS = N / P;
  localparam int unsigned WORDS = 60;

  logic clk;
  logic rst_n;
  logic in_valid;
  logic [P-1:0][M-1:0] in_sym;
  logic [NS-1:0][M-1:0] syn;
  logic syn_valid;

  int checks = 0;
  int failures = 0;
  int cycle;
  int n_clean = 0, n_error = 0, n_stall = 0, n_b2b = 0, n_timed = 0;

  typedef struct {
    int s[NS];
    bit clean;
    bit timed;
    int first_cycle;
  } expect_t;
  expect_t exp_q[$];

  syndrome_block #(.M(M), .POLY(POLY), .N(N), .NSYN(NS), .P(P), .ROOT0(0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sym(in_sym),
    .syn(syn), .syn_valid(syn_valid));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  initial cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle=%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && syn_valid) begin
      expect_t e;
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected syn_valid");
      end else begin
        e = exp_q.pop_front();
        for (int j = 0; j < int'(NS); j++) begin
          checks++;
          if (int'(syn[j]) != e.s[j]) begin
            failures++;
            $display("FAIL cycle=%0d S%0d = %0d, expected %0d", cycle, j, syn[j], e.s[j]);
          end
        end
        if (e.clean) check(syn == '0, "codeword gives zero syndromes");
        if (e.timed) begin
          check(cycle - e.first_cycle == int'(BEATS) + 1, "latency of N/P clocks");
          n_timed++;
        end
      end
    end
  end

  initial begin
    int msg[];
    int r[];
    int kind;
    bit stalled;
    bit any;
    expect_t e;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_sym = '0;
    ref_init(M, int'(POLY));
    msg = new[K];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < int'(WORDS); w++) begin
      foreach (msg[i]) msg[i] = int'($urandom_range(0, (1 << M) - 1));
      encode(msg, int'(NS), 0, r);
      kind = int'($urandom_range(0, 9));
      e.clean = (kind == 0);
      if (kind == 9) begin
        foreach (r[k]) r[k] = int'($urandom_range(0, (1 << M) - 1));
      end else begin
        for (int x = 0; x < kind; x++)
          r[$urandom_range(0, N - 1)] ^= int'($urandom_range(1, (1 << M) - 1));
      end
      any = 1'b0;
      for (int j = 0; j < int'(NS); j++) begin
        e.s[j] = syndrome(r, j);
        if (e.s[j] != 0) any = 1'b1;
      end
      if (e.clean) n_clean++;
      else if (any) n_error++;
      stalled = 1'b0;
      for (int b = 0; b < int'(BEATS); b++) begin
        if (b > 0 && $urandom_range(0, 40) == 0) begin
          in_valid <= 1'b0;
          repeat (int'($urandom_range(1, 3))) @(posedge clk);
          stalled = 1'b1;
        end
        in_valid <= 1'b1;
        for (int p = 0; p < int'(P); p++) in_sym[p] <= M'(r[N - 1 - b * P - p]);
        if (b == 0) e.first_cycle = cycle;
        if (b == int'(BEATS) - 1) begin
          e.timed = !stalled;
          exp_q.push_back(e);
        end
        @(posedge clk);
      end
      if (stalled) n_stall++;
      if ($urandom_range(0, 1) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end else begin
        n_b2b++;
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "every word produced a result");
    $display("clean=%0d errored=%0d stalled=%0d back_to_back=%0d timed=%0d",
             n_clean, n_error, n_stall, n_b2b, n_timed);
    check(n_clean > 0, "a clean codeword was sent");
    check(n_error > 0, "a corrupted word was sent");
    check(n_stall > 0, "a word stalled mid-way");
    check(n_b2b > 0, "words were sent back to back");
    check(n_timed > 0, "an unstalled word was timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
