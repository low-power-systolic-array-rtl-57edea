// compressor_4_2: low-leakage 4:2 compressor (five inputs, three outputs).
//
// Inputs a, b, cix and d are four bits of one column of partial products;
// c is the lateral carry arriving from the compressor of the next lower
// column.  The outputs satisfy
//     a + b + cix + c + d = s + 2 * (co + cox)
// cox is the lateral carry handed to the next higher column and co the
// vertical carry saved for the next reduction stage.
//
// Structure (after the proposed cell of the design):
//   * t, the parity of a, b and cix, is a two-level sum of the four odd
//     minterms over the inputs and their complements;
//   * cox is formed from a, b and cix only, in parallel with t, so it does
//     not depend on c and no carry ripples along a row of compressors;
//   * s is the parity of t, c and d; co is the majority of t, c and d.
// Port names follow the cell's own pin names.  Choosing c (not cix) as the
// input that receives the neighbouring cox is this design's reading of the
// cell: it is the choice that keeps the lateral carry free of ripple.
// Purely combinational.
module compressor_4_2 (
  input  logic a,
  input  logic b,
  input  logic cix,
  input  logic c,
  input  logic d,
  output logic s,
  output logic cox,
  output logic co
);

  logic t;

  always_comb begin
    t   = (~a & ~b &  cix) | (~a &  b & ~cix) | ( a & ~b & ~cix) | ( a &  b &  cix);
    cox = (a & b) | (b & cix) | (a & cix);
    s   = t ^ c ^ d;
    co  = (t & c) | (t & d) | (c & d);
  end

endmodule
