// full_adder: one-bit full adder in two-level sum-of-products form.
//
// sum is the odd-parity function of a, b and ci written as the OR of its
// four minterms over true and complemented inputs; co is the two-of-three
// majority written as the OR of three two-input products.  Sum and carry
// share no logic, which is the style the multiplier's compressor uses, and
// which is carried over here to the adders that sit inside the multiplier
// and the filter.  The exact cell-level structure of this adder is this
// design's own choice.  Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = (~a & ~b &  ci) | (~a &  b & ~ci) | ( a & ~b & ~ci) | ( a &  b &  ci);
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
