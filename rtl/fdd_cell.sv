// fdd_cell: finite-difference derivative cell, a processing element with an
// internal loop whose result is also passed to the neighbour (class WIL-PT).
//
// The cell approximates f'(x) = (f(x+h) - f(x)) / h. Two multiplexers pick
// the operands: with ctrl = 0 (first step) they take the function samples
// f(x) (`inup`) and f(x+h) (`inright`); with ctrl = 1 they take the cell's own
// previous result coming back around the loop and the previous result of the
// neighbour on the right (`in0`), so each step produces the next-order
// derivative. The difference (subtractor, T_SUB cycles) is multiplied by the
// stored constant 1/h (multiplier, T_MUL cycles) and truncated to W bits.
// The result goes back to the operand mux through the feedback path (T_FB
// cycles) and to the left neighbour through the propagation path (T_P
// cycles).
//
// Interface: valid_in/ctrl qualify the operands of one slot; `result` and
// `result_valid` are the multiplier output; `to_next`/`to_next_valid` are the
// same values after the propagation path, for the left neighbour's `in0`.
//
// Timing: operands entering at cycle t give `result` at t + T_SUB + T_MUL and
// `to_next` T_P cycles later; the result is back at the mux at
// t + T_LOOP with T_LOOP = T_SUB + T_MUL + T_FB, so the next-order step of
// the same function must enter exactly then. The neighbour to the left must
// run T_P - T_FB cycles later than this cell.
//
// Defaults follow the document's simulated example: 5-bit data, subtraction
// and multiplication 3 cycles each, feedback 7 cycles, propagation 10 cycles,
// h = 1. Signed two's-complement data with wrap-around truncation is this
// design's reading of "truncated, considering only LSBs"; the subtraction
// order (right operand minus the cell's own) follows equation (2).
module fdd_cell #(
  parameter int unsigned  W     = 5,
  parameter int unsigned  T_SUB = 3,
  parameter int unsigned  T_MUL = 3,
  parameter int unsigned  T_FB  = 7,
  parameter int unsigned  T_P   = 10,
  parameter logic [W-1:0] INV_H = W'(1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_in,
  input  logic                ctrl,
  input  logic signed [W-1:0] inup,
  input  logic signed [W-1:0] inright,
  input  logic signed [W-1:0] in0,
  output logic signed [W-1:0] result,
  output logic                result_valid,
  output logic signed [W-1:0] to_next,
  output logic                to_next_valid
);

  if (T_SUB + T_MUL + T_FB < 1) begin : g_bad_loop
    $error("fdd_cell: the loop needs at least one register");
  end

  logic signed [W-1:0] fb;          // own previous result, from the loop
  logic signed [W-1:0] op_own, op_right, diff_c, diff, prod_c;
  logic                diff_v;

  // operand multiplexers
  always_comb begin
    op_own   = ctrl ? fb  : inup;
    op_right = ctrl ? in0 : inright;
    diff_c   = op_right - op_own;
  end

  delay_line #(.WIDTH(W + 1), .DEPTH(T_SUB)) u_sub (
    .clk (clk),
    .rst (rst),
    .din ({diff_c, valid_in}),
    .dout({diff, diff_v})
  );

  assign prod_c = W'(diff * signed'(INV_H));

  delay_line #(.WIDTH(W + 1), .DEPTH(T_MUL)) u_mul (
    .clk (clk),
    .rst (rst),
    .din ({prod_c, diff_v}),
    .dout({result, result_valid})
  );

  delay_line #(.WIDTH(W), .DEPTH(T_FB)) u_fb (
    .clk (clk),
    .rst (rst),
    .din (result),
    .dout(fb)
  );

  delay_line #(.WIDTH(W + 1), .DEPTH(T_P)) u_prop (
    .clk (clk),
    .rst (rst),
    .din ({result, result_valid}),
    .dout({to_next, to_next_valid})
  );

endmodule
