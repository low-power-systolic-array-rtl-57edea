// systolic_iir: systolic array for the recursive filter
//     H(z) = (sum_{i=0}^{CELLS-1} a_i z^-i) / (1 - sum_{i=1}^{CELLS} b_i z^-i)
// i.e. with x(n) the sample accepted at step n and y(n) the output after it
//     y(n) = [ sum_i a_i x(n-i) + sum_i b_{i+1} y(n-1-i) ] >>> FRAC
//
// Organisation.  CELLS systolic_cells stand in a row.  Input samples move
// right along an x delay line, output samples move right along a y delay
// line, and partial sums move left towards cell 0, whose result is the
// filter output.  The cells are taken in pairs: a register on the x line
// and one on the y line sit in front of every even cell, so cell i reads
// the x sample accepted i/2 steps ago (the first register is the input
// register) and the y sample of i/2 + 1 steps ago; a register on the sum
// line sits between every odd cell and the even cell on its left, so cell
// i's sum reaches the output (i+1)/2 steps later.  Both delays add up to
// i, which places tap i at delay i on x and at delay i + 1 on y.  Cell i
// multiplies its x by a_i and its y by b_{i+1}: coef_a_i[i] = a_i and
// coef_b_i[i] = b_{i+1}.
//
// Arithmetic.  Samples are DATA_W-bit two's complement, coefficients have
// the same width with FRAC fractional bits.  Partial sums are ACC_W bits,
// enough for all 2*CELLS products without overflow.  The output is the
// accumulated sum shifted right by FRAC (rounding towards minus infinity)
// and wrapped to DATA_W bits; the same value is fed back.  Wrapping rather
// than saturating keeps integer recursions such as the low-pass section
// exact whenever the true output fits in DATA_W bits.
//
// Timing.  All registers advance on a rising clock edge with en high; with
// en low the array holds.  y_o is combinational from the registers: y(n)
// appears in the cycle after the edge that accepts x(n) and stays until
// the next accepted sample.
// rst_n is an asynchronous, active-low clear of every register.
//
// The array shape (pairs of cells, placement of the delays, input delay,
// output taken at cell 0 and fed back through its own delay line) follows
// the design's array; widths, scaling, wrap-around, en and reset are this
// design's choices.
module systolic_iir #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned FRAC   = 5,
  parameter int unsigned CELLS  = 13,
  parameter int unsigned ACC_W  = 2 * DATA_W + $clog2(CELLS) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x_i,
  input  logic signed [DATA_W-1:0] coef_a_i [CELLS],
  input  logic signed [DATA_W-1:0] coef_b_i [CELLS],
  output logic signed [DATA_W-1:0] y_o
);

  localparam int unsigned XSTAGES = (CELLS + 1) / 2;  // registers on x and y lines
  localparam int unsigned SSTAGES = CELLS / 2;        // registers on the sum line

  if (CELLS < 2) begin : g_bad_cells
    $error("systolic_iir: CELLS must be at least 2");
  end
  if (ACC_W < FRAC + DATA_W) begin : g_bad_acc
    $error("systolic_iir: ACC_W too small for the output scaling");
  end

  logic signed [DATA_W-1:0] xr [XSTAGES];
  logic signed [DATA_W-1:0] yr [XSTAGES];
  logic signed [ACC_W-1:0]  sr [SSTAGES];
  logic signed [ACC_W-1:0]  sum_in  [CELLS];
  logic signed [ACC_W-1:0]  sum_out [CELLS];

  // Output of the array: scaled partial sum of cell 0, wrapped to DATA_W.
  assign y_o = sum_out[0][FRAC +: DATA_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < XSTAGES; k++) begin
        xr[k] <= '0;
        yr[k] <= '0;
      end
      for (int k = 0; k < SSTAGES; k++) begin
        sr[k] <= '0;
      end
    end else if (en) begin
      xr[0] <= x_i;
      yr[0] <= y_o;
      for (int k = 1; k < XSTAGES; k++) begin
        xr[k] <= xr[k-1];
        yr[k] <= yr[k-1];
      end
      for (int k = 0; k < SSTAGES; k++) begin
        sr[k] <= sum_out[2*k+1];
      end
    end
  end

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    // Partial sum entering cell i from its right-hand neighbour.
    if (i == CELLS - 1) begin : g_last
      assign sum_in[i] = '0;
    end else if (i % 2 == 0) begin : g_even
      assign sum_in[i] = sr[i/2];
    end else begin : g_odd
      assign sum_in[i] = sum_out[i+1];
    end

    systolic_cell #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_cell (
      .x    (xr[i/2]),
      .y    (yr[i/2]),
      .a    (coef_a_i[i]),
      .b    (coef_b_i[i]),
      .sum_i(sum_in[i]),
      .sum_o(sum_out[i])
    );
  end

endmodule
