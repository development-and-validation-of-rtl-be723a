// gf_const_mult: multiplies a GF(2^m) symbol by a constant field element.
//
// The syndrome cells scale their inputs by fixed powers of the syndrome root
// (alpha^j)^1, (alpha^j)^2 and (alpha^j)^3. Because the factor is a parameter,
// the product is a fixed linear map over GF(2): each output bit is the XOR of
// the input bits selected by column i of the map, where column i is the image
// of X^i, i.e. COEF * X^i reduced by the primitive polynomial. The columns are
// computed at elaboration time, so the hardware is a pure XOR network with no
// clock and zero latency.
//
// Field (m = 4, 1 + X + X^4) follows the code definition; building the
// multiplier as a precomputed XOR matrix is this design's choice.
//
// Ports: a (M bits) in, y = a * COEF (M bits) out, combinational.
module gf_const_mult
  import rs_pkg::*;
#(
  parameter int unsigned       M    = SYM_W,
  parameter logic [GF_MAXW:0]  POLY = PRIM_POLY,
  parameter logic [M-1:0]      COEF = M'(2)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  // col[i] = COEF * X^i in GF(2^M)
  function automatic logic [M-1:0] column(input int unsigned i);
    gf_word_t xi;
    xi = gf_word_t'(1) << i;
    return M'(gf_mul(gf_word_t'(COEF), xi, M, POLY));
  endfunction

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < M; i++) begin
      if (a[i]) y ^= column(i);
    end
  end

endmodule
