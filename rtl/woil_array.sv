// woil_array: ROWS x COLS grid of WOIL processing elements for matrix
// multiplication C = A x B with exact synchronization of the b operands.
//
// Row k of the grid handles index k of the inner product: a_ik enters row k
// at the left edge and moves right through the PEs' L-stage registers.
// Column j accumulates c_ij = sum_k a_ik * b_kj from top to bottom, a partial
// result moving D cycles per PE; its top input is the initial value
// (normally zero) and the finished c_ij leaves at the bottom. The b_kj
// operands of column j enter one shift-register chain at the top of the
// column and move down L cycles per PE.
//
// Schedule (kept by the feeder): with PE (0,0) starting at cycle 0 and new
// operands every K cycles, PE (k,j) computes its i-th operation at
// k*D + j*L + i*K. So row k's a stream is skewed by k*D, column j's c_in by
// j*L, and b_kj must enter column j's chain at k*D + i*K - k*L + j*L. Two b
// values may never need the chain input in the same cycle: the condition
// m*(D - L) != n*K of the document, otherwise K must be increased.
//
// Interface: a_in/a_valid per row, b_in and c_in per column; c_out/c_valid
// per column at the bottom edge.
//
// Default size 16 x 16 is this design's choice (the document sweeps N).
module woil_array #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = 32,
  parameter int unsigned T_MUL = 2,
  parameter int unsigned T_ADD = 1,
  parameter int unsigned D     = 10,
  parameter int unsigned L     = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] a_in    [ROWS],
  input  logic                 a_valid [ROWS],
  input  logic signed [DW-1:0] b_in    [COLS],
  input  logic signed [AW-1:0] c_in    [COLS],
  output logic signed [AW-1:0] c_out   [COLS],
  output logic                 c_valid [COLS]
);

  logic signed [DW-1:0] a_h  [ROWS][COLS+1];
  logic                 av_h [ROWS][COLS+1];
  logic signed [DW-1:0] b_v  [ROWS+1][COLS];
  logic signed [AW-1:0] c_v  [ROWS+1][COLS];
  logic                 cv_v [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_edge_a
    assign a_h[i][0]  = a_in[i];
    assign av_h[i][0] = a_valid[i];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_edge_c
    assign b_v[0][j]  = b_in[j];
    assign c_v[0][j]  = c_in[j];
    assign c_out[j]   = c_v[ROWS][j];
    assign c_valid[j] = cv_v[ROWS][j];
  end

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      woil_pe #(
        .DW(DW), .AW(AW), .T_MUL(T_MUL), .T_ADD(T_ADD), .D(D), .L(L)
      ) u_pe (
        .clk        (clk),
        .rst        (rst),
        .a_in       (a_h[k][j]),
        .a_valid_in (av_h[k][j]),
        .b_in       (b_v[k][j]),
        .c_in       (c_v[k][j]),
        .a_out      (a_h[k][j+1]),
        .a_valid_out(av_h[k][j+1]),
        .b_out      (b_v[k+1][j]),
        .c_out      (c_v[k+1][j]),
        .c_valid    (cv_v[k+1][j])
      );
    end
  end

endmodule
