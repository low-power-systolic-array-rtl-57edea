// adder3: W-bit three-operand adder, s = x + y + z (mod 2**W).
//
// A row of full adders first turns the three operands into a sum row and a
// carry row (carry save), which a ripple_adder then adds.  It is the
// "Adder" of a systolic cell, which takes both products and the partial
// sum of the neighbouring cell.  The carry-save construction is this
// design's choice.  The carry out of the top bit and the top carry-save
// carry (weight 2**W) are dropped, as arithmetic modulo 2**W requires; lint
// reports that bit of pc as unused.  Purely combinational.
module adder3 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s
);

  logic [W-1:0] ps;     // carry-save sum row
  logic [W-1:0] pc;     // carry-save carry bits, weight 2**(k+1)
  logic         unused_co;

  for (genvar k = 0; k < W; k++) begin : g_csa
    full_adder u_fa (
      .a (x[k]),
      .b (y[k]),
      .ci(z[k]),
      .s (ps[k]),
      .co(pc[k])
    );
  end

  ripple_adder #(.W(W)) u_cpa (
    .a (ps),
    .b ({pc[W-2:0], 1'b0}),
    .ci(1'b0),
    .s (s),
    .co(unused_co)
  );

endmodule
