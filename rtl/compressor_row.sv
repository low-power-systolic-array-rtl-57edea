// compressor_row: reduces four W-bit rows to two with a row of 4:2 compressors.
//
// Bit k of the four input rows enters compressor k; compressor k's lateral
// carry cox feeds input c of compressor k+1 (c of bit 0 is 0).  The result
// rows are sum_o = s and carry_o = co shifted up one place, so that
//     r0 + r1 + r2 + r3 == sum_o + carry_o   (mod 2**W)
// The cox of the top bit and co of the top bit carry weight 2**W and are
// dropped, which is exact for arithmetic modulo 2**W (lint reports those
// two bits as unused; carry_o[0] is always 0).  Because cox never
// depends on c, the row has the delay of one compressor whatever W is.
// Purely combinational.
module compressor_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] r0,
  input  logic [W-1:0] r1,
  input  logic [W-1:0] r2,
  input  logic [W-1:0] r3,
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  logic [W-1:0] cox;
  logic [W-1:0] co;
  logic [W-1:0] cin;

  assign cin     = {cox[W-2:0], 1'b0};
  assign carry_o = {co[W-2:0], 1'b0};

  for (genvar k = 0; k < W; k++) begin : g_col
    compressor_4_2 u_cmp (
      .a  (r0[k]),
      .b  (r1[k]),
      .cix(r2[k]),
      .c  (cin[k]),
      .d  (r3[k]),
      .s  (sum_o[k]),
      .cox(cox[k]),
      .co (co[k])
    );
  end

endmodule
