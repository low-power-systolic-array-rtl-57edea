// qrs_bandpass_filter: band-pass preprocessing filter of a QRS detector,
// built as a low-pass systolic array followed by a high-pass systolic array.
//
// The pass band wanted for QRS energy is roughly 5-15 Hz.  The low-pass
// section is meant to run
//     y(n) = 2 y(n-1) - y(n-2) + x(n) - 2 x(n-6) + x(n-12)      (13 cells)
// and the high-pass section
//     y(n) = x(n-16) - (1/32) [ y(n-1) + x(n) - x(n-32) ]       (33 cells)
// with the coefficients that filter_pkg provides (lp_a/lp_b/hp_a/hp_b).
// The coefficients are inputs, as in the array, so every multiplier is a
// full 8 x 8 compressor multiplier and other responses can be loaded.
//
// Interface.  x_i is accepted on a rising clock edge with en high.  The
// low-pass output lp_y_o for that sample appears in the next cycle; the
// high-pass section accepts it on the following en, so counted in samples
// the response from x_i to y_o is z^-1 * H_lp(z) * H_hp(z).  Both outputs
// are combinational from the registers and hold while en is low.  rst_n is an asynchronous active-low clear.
// Coefficient k of lp_b_i / hp_b_i is feedback tap b_{k+1}; coefficient k of
// lp_a_i / hp_a_i is feed-forward tap a_k; all use filter_pkg's Q2.5 format.
//
// The cascade, the two difference equations and the 8-bit multipliers come
// from the design description; the sample format, the common en strobe and
// the coefficient ports are this design's choices.
module qrs_bandpass_filter
  import filter_pkg::*;
#(
  parameter int unsigned LPC = LP_CELLS,
  parameter int unsigned HPC = HP_CELLS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_i,
  input  coef_t   lp_a_i [LPC],
  input  coef_t   lp_b_i [LPC],
  input  coef_t   hp_a_i [HPC],
  input  coef_t   hp_b_i [HPC],
  output sample_t lp_y_o,
  output sample_t y_o
);

  systolic_iir #(
    .DATA_W(DATA_W),
    .FRAC  (COEF_FRAC),
    .CELLS (LPC)
  ) u_lowpass (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .x_i     (x_i),
    .coef_a_i(lp_a_i),
    .coef_b_i(lp_b_i),
    .y_o     (lp_y_o)
  );

  systolic_iir #(
    .DATA_W(DATA_W),
    .FRAC  (COEF_FRAC),
    .CELLS (HPC)
  ) u_highpass (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .x_i     (lp_y_o),
    .coef_a_i(hp_a_i),
    .coef_b_i(hp_b_i),
    .y_o     (y_o)
  );

endmodule
