// compressor_multiplier: N x N two's-complement multiplier whose partial
// products are reduced by rows of 4:2 compressors.
//
// Three stages, all combinational:
//   1. Partial product generation.  Row j holds a * b[j] shifted left by j,
//      in Baugh-Wooley form so that signed operands need no sign-extension
//      rows: the N-1 products that involve exactly one sign bit are
//      complemented, and the correction constant 2**N + 2**(2N-1) is placed
//      in the empty position N of row 0 and 2N-1 of row N-1.  That keeps
//      the count at exactly N rows of 2N bits.
//   2. Reduction.  Every group of four rows goes through one compressor_row
//      and becomes two rows, so each level halves the number of rows and
//      all groups of a level work in parallel.  For N = 8 that is two
//      levels: 8 -> 4 -> 2 rows.
//   3. Final addition of the two remaining rows in a ripple_adder of 2N
//      bits built from full adders.
// All arithmetic is modulo 2**(2N), which holds the full signed product.
// N must be a power of two, 4 or larger.  The signed (Baugh-Wooley) form and
// the rippled final adder are this design's choices; the three-stage
// organisation, halving of the row count by compressors and N = 8 follow
// the design description.
module compressor_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned W      = 2 * N;
  localparam int unsigned LEVELS = $clog2(N) - 1;   // compressor levels

  // Partial product rows, the input of the first reduction level.
  logic [W-1:0] pp [N];

  // Stage 1: Baugh-Wooley partial products.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = '0;
      for (int i = 0; i < N; i++) begin
        pp[j][i+j] = (a[i] & b[j]) ^ ((i == N-1) != (j == N-1));
      end
    end
    pp[0][N]       = 1'b1;
    pp[N-1][2*N-1] = 1'b1;
  end

  // Stage 2: levels of 4:2 compressor rows, each halving the row count.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned ROWS = N >> l;
    logic [W-1:0] cur [ROWS];        // rows entering this level
    logic [W-1:0] nxt [ROWS / 2];    // rows leaving this level

    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_later
      assign cur = g_level[l-1].nxt;
    end

    for (genvar g = 0; g < ROWS / 4; g++) begin : g_group
      compressor_row #(.W(W)) u_row (
        .r0     (cur[4*g]),
        .r1     (cur[4*g+1]),
        .r2     (cur[4*g+2]),
        .r3     (cur[4*g+3]),
        .sum_o  (nxt[2*g]),
        .carry_o(nxt[2*g+1])
      );
    end
  end

  // Stage 3: carry-propagate addition of the last two rows.
  logic unused_co;

  ripple_adder #(.W(W)) u_final (
    .a (g_level[LEVELS-1].nxt[0]),
    .b (g_level[LEVELS-1].nxt[1]),
    .ci(1'b0),
    .s (p),
    .co(unused_co)
  );

endmodule
