// systolic_cell: one processing element of the systolic recursive filter.
//
// The cell multiplies the input sample it sees (x) by its feed-forward
// coefficient a and the output sample it sees (y) by its feedback
// coefficient b, each in a compressor_multiplier, and adds both products,
// sign-extended to ACC_W bits, to the partial sum arriving from the next
// cell of the array:
//     sum_o = sum_i + a*x + b*y      (mod 2**ACC_W)
// Purely combinational; the delay registers sit between cells in
// systolic_iir.  The two-multiplier-and-adder organisation follows the
// design's array; the three-operand carry-save adder is this design's
// choice.
module systolic_cell #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 22
) (
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] y,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  input  logic signed [ACC_W-1:0]  sum_i,
  output logic signed [ACC_W-1:0]  sum_o
);

  logic signed [2*DATA_W-1:0] pa;
  logic signed [2*DATA_W-1:0] pb;

  compressor_multiplier #(.N(DATA_W)) u_mul_a (.a(x), .b(a), .p(pa));
  compressor_multiplier #(.N(DATA_W)) u_mul_b (.a(y), .b(b), .p(pb));

  adder3 #(.W(ACC_W)) u_add (
    .x(ACC_W'(pa)),
    .y(ACC_W'(pb)),
    .z(sum_i),
    .s(sum_o)
  );

endmodule
