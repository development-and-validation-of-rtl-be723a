// syndrome_block: three-parallel syndrome computation block for the
// RS(15,11,2) code over GF(2^4) (DVB-T parameters, primitive polynomial
// 1 + X + X^4, generator roots alpha^0..alpha^3).
//
// The received codeword r_14 ... r_0 is entered P = 3 symbols per clock,
// highest degree first: the first beat carries (r14, r13, r12) on
// in_sym[0], in_sym[1], in_sym[2], the fifth and last beat (r2, r1, r0). One
// syndrome_cell per syndrome S_j = R(alpha^(FIRST_ROOT+j)), j = 0..NSYN-1,
// evaluates the received polynomial by three-parallel Horner steps, so a
// codeword takes N/P = 5 clocks instead of the 15 of a symbol-serial block.
//
// Framing is counted here: a beat counter runs 0 .. N/P-1 over accepted beats
// (in_valid high), marks the first beat (accumulators restart from zero) and
// the last (results are latched). There is no start-of-codeword input: the
// block assumes codewords arrive aligned after reset, and in_valid may drop
// between any two beats. After the last beat of a codeword, syn holds S0..S3
// and syn_valid is high for exactly one clock; syn keeps its value until the
// next codeword completes, and the next codeword may start on the very next
// clock, so the throughput is one codeword per N/P clocks.
//
// Ports:
//   clk, rst_n            clock, synchronous active-low reset
//   in_valid              a beat of P symbols is present on in_sym
//   in_sym[P][M]          in_sym[0] is the highest-degree symbol of the beat
//   syn[NSYN][M]          syn[j] = S_j = R(alpha^(FIRST_ROOT+j))
//   syn_valid             one-clock pulse, one clock after the last beat
//
// The code parameters, three-symbol parallelism, beat order and syndrome
// equation follow the proposed architecture; the valid/handshake, the beat
// counter and the reset are this design's own choices.
module syndrome_block
  import rs_pkg::*;
#(
  parameter int unsigned       M          = SYM_W,
  parameter logic [GF_MAXW:0]  POLY       = PRIM_POLY,
  parameter int unsigned       N          = CODE_N,
  parameter int unsigned       NSYN       = NUM_SYN,
  parameter int unsigned       P          = PAR,
  parameter int unsigned       ROOT0      = FIRST_ROOT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [P-1:0][M-1:0]    in_sym,
  output logic [NSYN-1:0][M-1:0] syn,
  output logic                   syn_valid
);

  localparam int unsigned BEATS = N / P;
  localparam int unsigned CNT_W = (BEATS > 1) ? $clog2(BEATS) : 1;

  if (N % P != 0 || N >= (1 << M)) begin : g_bad_params
    $error("syndrome_block: N must be a multiple of P and below 2^M");
  end

  logic [CNT_W-1:0] beat_cnt;
  logic             first_beat;
  logic             last_beat;
  logic [NSYN-1:0]  cell_valid;

  assign first_beat = (beat_cnt == '0);
  assign last_beat  = (beat_cnt == CNT_W'(BEATS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat_cnt <= '0;
    end else if (in_valid) begin
      beat_cnt <= last_beat ? '0 : beat_cnt + 1'b1;
    end
  end

  for (genvar j = 0; j < NSYN; j++) begin : g_cell
    syndrome_cell #(
      .M(M), .POLY(POLY), .P(P), .ROOT_EXP(ROOT0 + j)
    ) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_first (first_beat),
      .in_last  (last_beat),
      .sym      (in_sym),
      .syn      (syn[j]),
      .syn_valid(cell_valid[j])
    );
  end

  assign syn_valid = cell_valid[0];

  // All cells see the same framing, so their valid pulses coincide.
  a_cells_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    cell_valid == '0 || cell_valid == '1);
  // A result only follows an accepted last beat.
  a_valid_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    syn_valid |-> $past(in_valid && last_beat));

endmodule
