// fdd_array: linear systolic array of NC finite-difference cells (WIL-PT)
// that evaluates successive derivatives of sampled functions.
//
// Cells are numbered 0 .. NC-1 from right to left; with sample spacing h,
// cell c evaluates the derivatives at point x = (NC-1-c)*h. Each cell gets
// f(x) and f(x+h) for the first step, and from then on combines its own
// previous result with the previous result of its right neighbour (the
// rightmost cell receives the derivatives at the boundary point NC*h from
// outside, on `bnd`). Results flow right to left.
//
// Wavefront: a cell must start T_P - T_FB cycles after its right neighbour
// when the propagation path is the longer one (computation starts at the
// rightmost cell), or T_FB - T_P cycles before it otherwise (starts at the
// leftmost cell). This array takes every input at the schedule time of the
// cell that starts first and delays each cell's inputs, including the
// ctrl/valid pair, by its own offset, so ctrl behaves as a signal travelling
// from cell to cell. All inputs share one slot schedule: slots K cycles
// apart, T_LOOP / K interleaved functions, T_LOOP % K stall cycles between
// sets (see interleave_sched).
//
// Interface: valid_in, ctrl (0 = first step), inup[c] = f at cell c's point,
// inright[c] = f one step to the right, bnd = derivative of the current
// order at the boundary (used with ctrl = 1). result[c]/result_valid[c] are
// the cells' outputs.
//
// Defaults are the document's simulated array: 5 cells, 5-bit data,
// subtraction and multiplication 3 cycles each, feedback 7, propagation 10.
module fdd_array #(
  parameter int unsigned  NC    = 5,
  parameter int unsigned  W     = 5,
  parameter int unsigned  T_SUB = 3,
  parameter int unsigned  T_MUL = 3,
  parameter int unsigned  T_FB  = 7,
  parameter int unsigned  T_P   = 10,
  parameter logic [W-1:0] INV_H = W'(1),
  localparam bit          FROM_RIGHT = (T_P >= T_FB),
  localparam int unsigned SKEW       = FROM_RIGHT ? (T_P - T_FB) : (T_FB - T_P)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_in,
  input  logic                ctrl,
  input  logic signed [W-1:0] inup    [NC],
  input  logic signed [W-1:0] inright [NC],
  input  logic signed [W-1:0] bnd,
  output logic signed [W-1:0] result       [NC],
  output logic                result_valid [NC]
);

  // per-cell delayed copy of {valid, ctrl, inup, inright}
  logic [2*W+1:0] lane_in  [NC];
  logic [2*W+1:0] lane_out [NC];
  logic signed [W-1:0] bnd_d;

  for (genvar c = 0; c < NC; c++) begin : g_lane
    assign lane_in[c] = {valid_in, ctrl, inup[c], inright[c]};
  end

  skew_bank #(
    .LANES(NC), .WIDTH(2 * W + 2), .STEP(SKEW), .OFFSET(0), .REVERSE(!FROM_RIGHT)
  ) u_skew (
    .clk (clk),
    .rst (rst),
    .din (lane_in),
    .dout(lane_out)
  );

  // the boundary derivative goes to cell 0 and follows cell 0's timing
  delay_line #(.WIDTH(W), .DEPTH(FROM_RIGHT ? 0 : (NC - 1) * SKEW)) u_bnd (
    .clk (clk),
    .rst (rst),
    .din (bnd),
    .dout(bnd_d)
  );

  logic signed [W-1:0] link   [NC+1];   // link[c]: value entering cell c's in0
  logic                link_v [NC+1];

  assign link[0]   = bnd_d;
  assign link_v[0] = 1'b1;

  for (genvar c = 0; c < NC; c++) begin : g_cell
    logic                v, ct;
    logic signed [W-1:0] up, rt;
    assign {v, ct, up, rt} = lane_out[c];

    fdd_cell #(
      .W(W), .T_SUB(T_SUB), .T_MUL(T_MUL), .T_FB(T_FB), .T_P(T_P), .INV_H(INV_H)
    ) u_cell (
      .clk          (clk),
      .rst          (rst),
      .valid_in     (v),
      .ctrl         (ct),
      .inup         (up),
      .inright      (rt),
      .in0          (link[c]),
      .result       (result[c]),
      .result_valid (result_valid[c]),
      .to_next      (link[c+1]),
      .to_next_valid(link_v[c+1])
    );

    // Wavefront rule: when a cell uses its neighbour's result, that result
    // must be arriving in the same cycle.
    if (c > 0) begin : g_chk
      a_in0_valid: assert property (@(posedge clk) disable iff (rst)
        (v && ct) |-> link_v[c])
        else $error("fdd_array: cell %0d used in0 with no result arriving", c);
    end
  end

endmodule
