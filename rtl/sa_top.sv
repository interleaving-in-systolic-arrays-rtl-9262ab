// sa_top: the interleaved systolic arrays side by side.
//
// 1. Matrix multiplier with internal-loop cells (WIL-S), the main design.
//    An interleave_sched issues input slots for MM_OPS independent products
//    C_m = A_m x B_m of MM_N x MM_N matrices: every K cycles one slot, the
//    same inner-product step k of each product in turn, then step k+1, so
//    MM_OPS = (T_FF + T_FB) / K products share the adders' loops. For each
//    slot the top asks the operand store (outside this design) for column k
//    of A_m and row k of B_m through mm_req_*; the answer is expected in the
//    same cycle on mm_a_col/mm_b_row. Row i and column j are then skewed by
//    i*L and j*L cycles and enter the array; PE (i,j) ends up holding c_ij
//    of every product, shown on its output line mm_sum/mm_sum_tag.
// 2. Finite-difference derivative array (WIL-PT), with its own scheduler:
//    FD_OPS functions interleaved, FD_ORDERS derivative orders. For each slot
//    the top asks for the samples f_m(0..NC) and, from the second order on,
//    the derivative of the previous order at the boundary point NC*h.
// 3. Matrix multiplier without internal loop (WOIL) with exact
//    synchronization; its edge ports are brought out as they are, because
//    its feeding schedule (see woil_array) belongs to the operand source.
//
// Timing: a slot requested in cycle t enters PE (i,j) of the WIL-S array at
// t + (i+j)*L; its product reaches the PE output line T_E + T_FF cycles
// later. A whole WIL-S run takes MM_N * (T_FF + T_FB) cycles of issue.
//
// Lint note: the 'last' bit of the derivative scheduler's tag is not used
// (Verilator reports fd_tag[0] unused): a derivative cell needs only
// valid and first/loop selection, and the order being issued is already
// visible on fd_req_order.
module sa_top
  import sa_pkg::*;
#(
  // WIL-S matrix multiplier (CMOS interleaved case of the document)
  parameter int unsigned MM_N   = 128,
  parameter int unsigned MM_DW  = 16,
  parameter int unsigned MM_AW  = 32,
  parameter int unsigned MM_TE  = 2,
  parameter int unsigned MM_TFF = 1,
  parameter int unsigned MM_K   = 2,
  parameter int unsigned MM_IL  = 2,
  parameter int unsigned MM_TFB = MM_IL * MM_K - MM_TFF,
  parameter int unsigned MM_L   = 1,
  // finite-difference derivative array (simulated example of the document)
  parameter int unsigned FD_NC     = 5,
  parameter int unsigned FD_W      = 5,
  parameter int unsigned FD_TSUB   = 3,
  parameter int unsigned FD_TMUL   = 3,
  parameter int unsigned FD_TFB    = 7,
  parameter int unsigned FD_TP     = 10,
  parameter int unsigned FD_K      = 3,
  parameter int unsigned FD_ORDERS = 3,
  // WOIL matrix multiplier
  parameter int unsigned WO_N  = 16,
  parameter int unsigned WO_D  = 10,
  localparam int unsigned MM_TLOOP = MM_TFF + MM_TFB,
  localparam int unsigned MM_OPS   = MM_TLOOP / MM_K,
  localparam int unsigned MM_OPW   = (MM_OPS > 1) ? $clog2(MM_OPS) : 1,
  localparam int unsigned MM_KW    = (MM_N > 1) ? $clog2(MM_N) : 1,
  localparam int unsigned FD_TLOOP = FD_TSUB + FD_TMUL + FD_TFB,
  localparam int unsigned FD_OPS   = FD_TLOOP / FD_K,
  localparam int unsigned FD_OPW   = (FD_OPS > 1) ? $clog2(FD_OPS) : 1,
  localparam int unsigned FD_OW    = (FD_ORDERS > 1) ? $clog2(FD_ORDERS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,

  // ---- WIL-S matrix multiplier --------------------------------------------
  input  logic                    mm_start,
  output logic                    mm_busy,
  output logic                    mm_done,
  output logic                    mm_stall,
  output logic                    mm_req_valid,
  output logic [MM_OPW-1:0]       mm_req_op,
  output logic [MM_KW-1:0]        mm_req_k,
  input  logic signed [MM_DW-1:0] mm_a_col   [MM_N],
  input  logic signed [MM_DW-1:0] mm_b_row   [MM_N],
  output logic signed [MM_AW-1:0] mm_sum     [MM_N][MM_N],
  output op_tag_t                 mm_sum_tag [MM_N][MM_N],

  // ---- finite-difference derivative array ---------------------------------
  input  logic                    fd_start,
  output logic                    fd_busy,
  output logic                    fd_done,
  output logic                    fd_stall,
  output logic                    fd_req_valid,
  output logic [FD_OPW-1:0]       fd_req_op,
  output logic [FD_OW-1:0]        fd_req_order,
  input  logic signed [FD_W-1:0]  fd_samples [FD_NC+1],
  input  logic signed [FD_W-1:0]  fd_bnd,
  output logic signed [FD_W-1:0]  fd_result  [FD_NC],
  output logic                    fd_result_valid [FD_NC],

  // ---- WOIL matrix multiplier (edge ports) --------------------------------
  input  logic signed [MM_DW-1:0] wo_a_in    [WO_N],
  input  logic                    wo_a_valid [WO_N],
  input  logic signed [MM_DW-1:0] wo_b_in    [WO_N],
  input  logic signed [MM_AW-1:0] wo_c_in    [WO_N],
  output logic signed [MM_AW-1:0] wo_c_out   [WO_N],
  output logic                    wo_c_valid [WO_N]
);

  localparam int unsigned TW = $bits(op_tag_t);

  // ==== 1. WIL-S matrix multiplier ==========================================
  op_tag_t mm_tag;

  interleave_sched #(
    .T_LOOP(MM_TLOOP), .K(MM_K), .OPS(MM_OPS), .STEPS(MM_N)
  ) u_mm_sched (
    .clk  (clk),
    .rst  (rst),
    .start(mm_start),
    .issue(mm_req_valid),
    .op   (mm_req_op),
    .step (mm_req_k),
    .tag  (mm_tag),
    .stall(mm_stall),
    .busy (mm_busy),
    .done (mm_done)
  );

  logic [MM_DW+TW-1:0]    mm_row_in  [MM_N];
  logic [MM_DW+TW-1:0]    mm_row_out [MM_N];
  logic [MM_DW-1:0]       mm_col_in  [MM_N];
  logic [MM_DW-1:0]       mm_col_out [MM_N];
  logic signed [MM_DW-1:0] mm_a_sk   [MM_N];
  logic signed [MM_DW-1:0] mm_b_sk   [MM_N];
  op_tag_t                 mm_t_sk   [MM_N];

  for (genvar i = 0; i < MM_N; i++) begin : g_mm_lane
    assign mm_row_in[i] = {mm_req_valid ? mm_a_col[i] : '0, mm_tag};
    assign mm_col_in[i] = mm_req_valid ? mm_b_row[i] : '0;
    assign {mm_a_sk[i], mm_t_sk[i]} = mm_row_out[i];
    assign mm_b_sk[i] = mm_col_out[i];
  end

  skew_bank #(.LANES(MM_N), .WIDTH(MM_DW + TW), .STEP(MM_L)) u_mm_skew_a (
    .clk (clk),
    .rst (rst),
    .din (mm_row_in),
    .dout(mm_row_out)
  );

  skew_bank #(.LANES(MM_N), .WIDTH(MM_DW), .STEP(MM_L)) u_mm_skew_b (
    .clk (clk),
    .rst (rst),
    .din (mm_col_in),
    .dout(mm_col_out)
  );

  wils_array #(
    .ROWS(MM_N), .COLS(MM_N), .DW(MM_DW), .AW(MM_AW),
    .T_E(MM_TE), .T_FF(MM_TFF), .T_FB(MM_TFB), .L(MM_L)
  ) u_mm_array (
    .clk    (clk),
    .rst    (rst),
    .a_in   (mm_a_sk),
    .tag_in (mm_t_sk),
    .b_in   (mm_b_sk),
    .sum    (mm_sum),
    .sum_tag(mm_sum_tag)
  );

  // ==== 2. finite-difference derivative array ================================
  op_tag_t fd_tag;
  logic signed [FD_W-1:0] fd_inup    [FD_NC];
  logic signed [FD_W-1:0] fd_inright [FD_NC];

  interleave_sched #(
    .T_LOOP(FD_TLOOP), .K(FD_K), .OPS(FD_OPS), .STEPS(FD_ORDERS)
  ) u_fd_sched (
    .clk  (clk),
    .rst  (rst),
    .start(fd_start),
    .issue(fd_req_valid),
    .op   (fd_req_op),
    .step (fd_req_order),
    .tag  (fd_tag),
    .stall(fd_stall),
    .busy (fd_busy),
    .done (fd_done)
  );

  // cell c (counted from the right) works at point x = NC-1-c
  for (genvar c = 0; c < FD_NC; c++) begin : g_fd_map
    assign fd_inup[c]    = fd_samples[FD_NC - 1 - c];
    assign fd_inright[c] = fd_samples[FD_NC - c];
  end

  fdd_array #(
    .NC(FD_NC), .W(FD_W), .T_SUB(FD_TSUB), .T_MUL(FD_TMUL),
    .T_FB(FD_TFB), .T_P(FD_TP)
  ) u_fd_array (
    .clk         (clk),
    .rst         (rst),
    .valid_in    (fd_tag.valid),
    .ctrl        (fd_tag.acc),
    .inup        (fd_inup),
    .inright     (fd_inright),
    .bnd         (fd_bnd),
    .result      (fd_result),
    .result_valid(fd_result_valid)
  );

  // ==== 3. WOIL matrix multiplier =============================================
  woil_array #(
    .ROWS(WO_N), .COLS(WO_N), .DW(MM_DW), .AW(MM_AW),
    .T_MUL(MM_TE), .T_ADD(MM_TFF), .D(WO_D), .L(MM_L)
  ) u_wo_array (
    .clk    (clk),
    .rst    (rst),
    .a_in   (wo_a_in),
    .a_valid(wo_a_valid),
    .b_in   (wo_b_in),
    .c_in   (wo_c_in),
    .c_out  (wo_c_out),
    .c_valid(wo_c_valid)
  );

endmodule
