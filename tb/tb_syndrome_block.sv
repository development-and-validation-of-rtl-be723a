// tb_syndrome_block: end-to-end test of the syndrome block at its default
// configuration (RS(15,11) over GF(2^4), three symbols per clock, S0..S3).
//
// Words are produced by a systematic RS encoder in the reference package and
// then optionally corrupted with one or two symbol errors, or replaced by
// random data. A driver feeds them three symbols per clock, highest degree
// first, sometimes back to back and sometimes with idle clocks inside a word.
// A checker compares every syn_valid result with the direct-sum syndromes of
// the word sent, and that clean codewords give all-zero syndromes. Timing
// checks: a word fed without idle clocks yields syn_valid exactly 5 clocks
// after its first beat (one clock after the last beat), and a run of
// back-to-back words yields one result every 5 clocks.
//
// Each mechanism is counted and must occur: clean codewords, words with
// errors, idle clocks inside a word, and back-to-back words.
module tb_syndrome_block;
  import rs_ref_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned P = 3;
  localparam int unsigned N = 15;
  localparam int unsigned K = 11;
  localparam int unsigned NS = N - K;
  localparam int unsigned BEATS = N / P;
  localparam int unsigned WORDS = 400;

  logic clk;
  logic rst_n;
  logic in_valid;
  logic [P-1:0][M-1:0] in_sym;
  logic [NS-1:0][M-1:0] syn;
  logic syn_valid;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_clean = 0, n_error = 0, n_stall = 0, n_b2b = 0, n_timed = 0;

  typedef struct {
    int s[NS];
    bit clean;       // word is a codeword
    bit timed;       // fed without idle clocks: latency is checked
    int first_cycle; // cycle of the first beat
  } expect_t;
  expect_t exp_q[$];

  syndrome_block dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sym(in_sym),
    .syn(syn), .syn_valid(syn_valid));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle=%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int last_valid_cycle = -100;
  int b2b_run = 0;
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
        else if (e.s[0] != 0 || e.s[1] != 0 || e.s[2] != 0 || e.s[3] != 0)
          check(syn != '0, "corrupted word gives a non-zero syndrome");
        // syn_valid is sampled here one clock after it rose: it rose BEATS
        // clocks after the first beat was presented.
        if (e.timed) begin
          check(cycle - e.first_cycle == int'(BEATS) + 1, "latency of 5 clocks per codeword");
          n_timed++;
        end
        if (cycle - last_valid_cycle == int'(BEATS)) b2b_run++;
        last_valid_cycle = cycle;
      end
    end
  end

  // driver
  initial begin
    int msg[];
    int r[];
    int kind;
    int pos;
    bit stalled;
    bit idle_before;
    expect_t e;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_sym = '0;
    ref_init(M, 'h13);
    msg = new[K];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    idle_before = 1'b1;
    for (int w = 0; w < int'(WORDS); w++) begin
      foreach (msg[i]) msg[i] = int'($urandom_range(0, (1 << M) - 1));
      encode(msg, int'(NS), 0, r);
      kind = int'($urandom_range(0, 3));
      e.clean = (kind == 0);
      if (kind == 1 || kind == 2) begin
        // one or two symbol errors
        for (int x = 0; x < kind; x++) begin
          pos = int'($urandom_range(0, N - 1));
          r[pos] ^= int'($urandom_range(1, (1 << M) - 1));
        end
      end else if (kind == 3) begin
        foreach (r[k]) r[k] = int'($urandom_range(0, (1 << M) - 1));
      end
      for (int j = 0; j < int'(NS); j++) e.s[j] = syndrome(r, j);
      if (e.clean) begin
        for (int j = 0; j < int'(NS); j++) check(e.s[j] == 0, "reference encoder output is a codeword");
        n_clean++;
      end else if (e.s[0] != 0 || e.s[1] != 0 || e.s[2] != 0 || e.s[3] != 0) begin
        n_error++;
      end
      stalled = 1'b0;
      if (!idle_before) n_b2b++;
      for (int b = 0; b < int'(BEATS); b++) begin
        if (b > 0 && $urandom_range(0, 5) == 0) begin
          in_valid <= 1'b0;
          in_sym   <= 12'($urandom);
          repeat (int'($urandom_range(1, 3))) @(posedge clk);
          stalled = 1'b1;
        end
        in_valid <= 1'b1;
        for (int p = 0; p < int'(P); p++) in_sym[p] <= M'(r[N - 1 - b * P - p]);
        if (b == 0) begin
          e.first_cycle = cycle;
          e.timed = 1'b1;
        end
        if (b == int'(BEATS) - 1) begin
          e.timed = !stalled;
          exp_q.push_back(e);
        end
        @(posedge clk);
      end
      if (stalled) n_stall++;
      idle_before = 1'b0;
      if ($urandom_range(0, 2) == 0) begin
        in_valid <= 1'b0;
        repeat (int'($urandom_range(1, 4))) @(posedge clk);
        idle_before = 1'b1;
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "every word produced a result");
    $display("clean=%0d errored=%0d stalled=%0d back_to_back=%0d timed=%0d b2b_results=%0d",
             n_clean, n_error, n_stall, n_b2b, n_timed, b2b_run);
    check(n_clean > 0, "a clean codeword was sent");
    check(n_error > 0, "a corrupted word was sent");
    check(n_stall > 0, "a word stalled mid-way");
    check(n_b2b > 0, "words were sent back to back");
    check(b2b_run > 0, "results came 5 clocks apart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
