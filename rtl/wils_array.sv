// wils_array: ROWS x COLS grid of WIL-S processing elements for matrix
// multiplication C = A x B, each element c_ij computed and stored in PE (i,j).
//
// Row i receives a_ik (with its control tag) at the left edge and passes it
// right through the PEs' L-stage shift registers; column j receives b_kj at
// the top edge and passes it down. The operands of step k therefore meet in
// PE (i,j) when the inputs are skewed at the edges, row i by i*L cycles and
// column j by j*L cycles, so that PE (i,j) runs the common input schedule
// S_ij = (i+j)*L cycles after PE (0,0) (its Manhattan distance times L).
// Several matrix products are interleaved by issuing their steps in the
// interleaved order; no PE has any logic for it.
//
// Interface: a_in/tag_in per row, b_in per column, and the output line of
// every PE (sum, sum_tag). Timing: see wils_pe; a result of PE (i,j) leaves
// its adder (i+j)*L + T_E + T_FF cycles after the matching input slot
// entered the array edge unskewed.
//
// The document's performance figures assume a 1024 x 1024 array. The default
// here is 128 x 128: tool run time and memory grow faster than the PE count
// (synthesis of a 32 x 32 array already takes about 1.5 minutes, six times
// the 16 x 16 time), and 128 x 128 is the largest power-of-two size the
// usual open-source flow handles in about an hour. Override ROWS/COLS for
// other sizes.
module wils_array
  import sa_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  parameter int unsigned DW   = 16,
  parameter int unsigned AW   = 32,
  parameter int unsigned T_E  = 2,
  parameter int unsigned T_FF = 1,
  parameter int unsigned T_FB = 3,
  parameter int unsigned L    = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] a_in    [ROWS],
  input  op_tag_t              tag_in  [ROWS],
  input  logic signed [DW-1:0] b_in    [COLS],
  output logic signed [AW-1:0] sum     [ROWS][COLS],
  output op_tag_t              sum_tag [ROWS][COLS]
);

  // a_h[i][j] / t_h[i][j]: operand entering PE (i,j) from the left
  // b_v[i][j]: operand entering PE (i,j) from above
  logic signed [DW-1:0] a_h [ROWS][COLS+1];
  op_tag_t              t_h [ROWS][COLS+1];
  logic signed [DW-1:0] b_v [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_edge_a
    assign a_h[i][0] = a_in[i];
    assign t_h[i][0] = tag_in[i];
  end
  for (genvar j = 0; j < COLS; j++) begin : g_edge_b
    assign b_v[0][j] = b_in[j];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      wils_pe #(
        .DW(DW), .AW(AW), .T_E(T_E), .T_FF(T_FF), .T_FB(T_FB), .L(L)
      ) u_pe (
        .clk    (clk),
        .rst    (rst),
        .a_in   (a_h[i][j]),
        .b_in   (b_v[i][j]),
        .tag_in (t_h[i][j]),
        .a_out  (a_h[i][j+1]),
        .b_out  (b_v[i+1][j]),
        .tag_out(t_h[i][j+1]),
        .sum    (sum[i][j]),
        .sum_tag(sum_tag[i][j])
      );
    end
  end

endmodule
