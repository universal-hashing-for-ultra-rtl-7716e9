// gf_xtime: multiply an element of GF(2^W) by x, modulo the fixed reduction
// polynomial x^W + POLY.
//
// This is the modulo reduction unit of the WH datapath. The operand is shifted
// up by one position; if the bit that leaves the top was set, the low-order
// coefficients of the reduction polynomial are XORed in. With a low-weight
// polynomial (five terms) this is W-1 wires and a handful of XOR gates, which is
// how the multiplication and the reduction are interleaved at no extra delay.
//
// Purely combinational; POLY holds the coefficients of x^0..x^(W-1) of the
// irreducible polynomial (its x^W term is implied). The polynomial choice is
// this design's (see wh_pkg).
module gf_xtime #(
  parameter int unsigned W    = 64,
  parameter logic [W-1:0] POLY = W'(64'h1B)
) (
  input  logic [W-1:0] a,   // element of GF(2^W)
  output logic [W-1:0] y    // a * x mod p
);

  always_comb begin
    y = {a[W-2:0], 1'b0};
    if (a[W-1]) y = y ^ POLY;
  end

endmodule
