// ebc_pe: state evaluation of one current-stripe processing element (PE 0 /
// PE 1 of the context-formation array).
//
// The PE register holds (sign, d-hat, d, v, c) for one sample at bit-plane k
// (see ebc_pkg::pe_reg_t). From it the PE derives, combinationally:
//   phi      = d-hat | (d & v)        significance seen by a later sample
//                                     (the significance state of the sample)
//   phi_mr   = d-hat | (d & v & ~c)   significance as seen by the significance-
//                                     propagation and refinement passes, which
//                                     in the sequential order run before this
//                                     plane's cleanup pass
//   gamma    = d-hat & d & ~v         first-refinement flag, kept in the d
//                                     register before the visit (special code
//                                     (d-hat, d, v) = (1, 1, 0))
//   nxt      = register contents handed to the CF of bit-plane k-1:
//              d-hat(k-1) = d-hat | d, d = gamma(k-1) = ~d-hat & d
//              (first refinement pending), v = c = 0, sign unchanged. This is the PE 1 output.
// The extra register bit c (decoded in the cleanup pass) is this design's
// addition; it keeps the contexts identical to the sequential pass order.
// Purely combinational, no timing of its own.
module ebc_pe
  import ebc_pkg::*;
(
  input  pe_reg_t r,
  output logic    phi,
  output logic    phi_mr,
  output logic    gamma,
  output pe_reg_t nxt
);
  always_comb begin
    phi      = r.dh | (r.d & r.v);
    phi_mr   = r.dh | (r.d & r.v & ~r.c);
    gamma    = r.dh & r.d & ~r.v;
    nxt.sign = r.sign;
    nxt.dh   = r.dh | r.d;
    nxt.d    = ~r.dh & r.d;
    nxt.v    = 1'b0;
    nxt.c    = 1'b0;
  end
endmodule
