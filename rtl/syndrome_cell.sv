// syndrome_cell: one syndrome S = R(beta), beta = alpha^ROOT_EXP, computed by
// P-parallel Horner evaluation of the received polynomial.
//
// The received word r_{n-1} ... r_0 arrives highest degree first, P symbols per
// beat. With beat symbols sym[0] (highest degree) .. sym[P-1] (lowest), every
// beat performs
//     acc <- acc * beta^P + sym[0]*beta^(P-1) + ... + sym[P-2]*beta + sym[P-1]
// which for P = 3 is the nested form
//     S = (((r14 b^2 + r13 b + r12) b^3 + r11 b^2 + r10 b + r9) b^3 + ...) b^3
//         + r2 b^2 + r1 b + r0
// of the proposed three-parallel syndrome circuit: a codeword of 15 symbols
// takes 5 beats instead of the 15 of a serial cell. The multipliers are fixed
// constant multipliers (XOR networks).
//
// Framing comes from the caller: on a beat with in_first the old accumulator
// is ignored (the running sum starts from zero), and on a beat with in_last
// the finished value is copied into the output register syn, with syn_valid
// high for one clock. syn keeps its value until the next codeword ends, so
// codewords may follow each other with no idle beat. Beats with in_valid low
// are ignored (the input may stall at any point).
//
// Timing: syn/syn_valid appear one clock after the last beat is accepted.
// Reset (active-low, synchronous) clears acc, syn and syn_valid; the reset
// style is this design's choice.
module syndrome_cell
  import rs_pkg::*;
#(
  parameter int unsigned       M        = SYM_W,
  parameter logic [GF_MAXW:0]  POLY     = PRIM_POLY,
  parameter int unsigned       P        = PAR,
  parameter int unsigned       ROOT_EXP = FIRST_ROOT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_last,
  input  logic [P-1:0][M-1:0] sym,
  output logic [M-1:0]        syn,
  output logic                syn_valid
);

  localparam int unsigned ORDER = (1 << M) - 1;

  // beta^k for k = 0..P
  function automatic logic [M-1:0] beta_pow(input int unsigned k);
    return M'(gf_alpha_pow((ROOT_EXP * k) % ORDER, M, POLY));
  endfunction

  logic [M-1:0]        acc;
  logic [M-1:0]        acc_base;
  logic [M-1:0]        acc_scaled;
  logic [P-1:0][M-1:0] sym_scaled;
  logic [M-1:0]        acc_next;

  assign acc_base = in_first ? '0 : acc;

  // acc * beta^P
  gf_const_mult #(.M(M), .POLY(POLY), .COEF(beta_pow(P))) u_mul_acc (
    .a(acc_base), .y(acc_scaled)
  );

  // sym[p] * beta^(P-1-p)
  for (genvar p = 0; p < P; p++) begin : g_in
    gf_const_mult #(.M(M), .POLY(POLY), .COEF(beta_pow(P - 1 - p))) u_mul_in (
      .a(sym[p]), .y(sym_scaled[p])
    );
  end

  always_comb begin
    acc_next = acc_scaled;
    for (int p = 0; p < int'(P); p++) acc_next ^= sym_scaled[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      syn       <= '0;
      syn_valid <= 1'b0;
    end else begin
      syn_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) syn <= acc_next;
      end
    end
  end

endmodule
