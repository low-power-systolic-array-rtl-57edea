// ripple_adder: W-bit carry-propagate adder made of full_adder cells.
//
// Computes {co, s} = a + b + ci with the carry rippling from bit 0 upward
// through W full adders.  It is the final addition stage of the compressor
// multiplier and the last stage of each systolic cell's adder.  Operands
// are plain bit vectors: the sum is correct modulo 2**W for signed and
// unsigned operands alike.  Purely combinational.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] carry;

  assign carry[0] = ci;
  assign co       = carry[W];

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a (a[k]),
      .b (b[k]),
      .ci(carry[k]),
      .s (s[k]),
      .co(carry[k+1])
    );
  end

endmodule
