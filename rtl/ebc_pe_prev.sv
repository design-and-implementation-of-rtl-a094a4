// ebc_pe_prev: state evaluation of a previous-stripe processing element (PE 2
// of the context-formation array).
//
// The last row of the previous stripe is fully decoded when the current stripe
// reaches a bit-plane, so its state at bit-plane k follows from the
// coefficient word kept in the line buffer: {cf, sign, magnitude[NPLANES-1:0]},
// where cf says that the coefficient became significant in a cleanup pass.
//   phi    = magnitude bits N-1..k not all zero (d-hat | d at plane k)
//   phi_mr = phi, except for a coefficient that first became significant at
//            plane k in the cleanup pass: the previous stripe's cleanup pass
//            comes after the current stripe's first two passes in the
//            sequential pass order, so such a neighbour does not count there.
//   sign   = coefficient sign
// The cf bit is this design's reading of the twelfth bit of the 12-bit line
// buffer word. Combinational.
module ebc_pe_prev #(
  parameter int NPLANES = 10,
  parameter int PLANE   = 0
) (
  input  logic [NPLANES+1:0] word,
  output logic               phi,
  output logic               phi_mr,
  output logic               sign
);
  logic [NPLANES-1:0] mag;
  logic               above;   // a one above plane k
  always_comb begin
    mag   = word[NPLANES-1:0];
    above = 1'b0;
    for (int i = PLANE + 1; i < NPLANES; i++) above |= mag[i];
    phi    = above | mag[PLANE];
    phi_mr = above | (mag[PLANE] & ~word[NPLANES+1]);
    sign   = word[NPLANES];
  end
endmodule
