// woil_pe: processing element without internal loop (class WOIL) for matrix
// multiplication, arranged for exact synchronization of both operands.
//
// The cell multiplies the operand a_ik arriving from the left by the operand
// b_kj taken from the chain passing through it (entry section, T_MUL
// cycles), adds the partial result c_ij(k-1) arriving from the cell above,
// and sends c_ij(k) to the cell below. The path P from c_in to c_out, adder
// plus registers, takes D cycles. Instead of holding b_kj in a preloaded
// register, the cell samples it from a shift-register chain that runs down
// the column: every cell has L stages of that chain, and the feeder puts
// each b value into the chain so that it reaches the cell exactly when the
// cell needs it. a (with a valid flag) passes to the right through L stages.
//
// Interface: a_in/a_valid_in from the left, b_in (chain) and c_in from above;
// a_out/a_valid_out to the right, b_out (chain) and c_out/c_valid to the
// cell below.
//
// Timing: a and b sampled at cycle t - T_MUL meet the c_in arriving at t;
// c_out at t + D. New operands may enter every K cycles (set by the feeder).
//
// Defaults are the document's interleaved CMOS case: 16-bit operands, 32-bit
// partial results, multiplier 2 cycles, adder 1 cycle, D = n*K = 10 for
// n = 5 interleaved products, L = 1. Signed arithmetic and the valid flag are
// this design's choices.
module woil_pe #(
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = 32,
  parameter int unsigned T_MUL = 2,
  parameter int unsigned T_ADD = 1,
  parameter int unsigned D     = 10,
  parameter int unsigned L     = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] a_in,
  input  logic                 a_valid_in,
  input  logic signed [DW-1:0] b_in,
  input  logic signed [AW-1:0] c_in,
  output logic signed [DW-1:0] a_out,
  output logic                 a_valid_out,
  output logic signed [DW-1:0] b_out,
  output logic signed [AW-1:0] c_out,
  output logic                 c_valid
);

  if (D < T_ADD || T_ADD < 1) begin : g_bad_d
    $error("woil_pe: need 1 <= T_ADD <= D");
  end

  logic signed [AW-1:0] prod_c, prod, sum_c, sum;
  logic                 prod_v, sum_v;

  assign prod_c = AW'(a_in * b_in);

  delay_line #(.WIDTH(AW + 1), .DEPTH(T_MUL)) u_mul (
    .clk (clk),
    .rst (rst),
    .din ({prod_c, a_valid_in}),
    .dout({prod, prod_v})
  );

  assign sum_c = prod + c_in;

  // adder stages followed by the extra registers of path P
  delay_line #(.WIDTH(AW + 1), .DEPTH(T_ADD)) u_add (
    .clk (clk),
    .rst (rst),
    .din ({sum_c, prod_v}),
    .dout({sum, sum_v})
  );

  delay_line #(.WIDTH(AW + 1), .DEPTH(D - T_ADD)) u_path (
    .clk (clk),
    .rst (rst),
    .din ({sum, sum_v}),
    .dout({c_out, c_valid})
  );

  delay_line #(.WIDTH(DW + 1), .DEPTH(L)) u_sr_a (
    .clk (clk),
    .rst (rst),
    .din ({a_in, a_valid_in}),
    .dout({a_out, a_valid_out})
  );

  delay_line #(.WIDTH(DW), .DEPTH(L)) u_sr_b (
    .clk (clk),
    .rst (rst),
    .din (b_in),
    .dout(b_out)
  );

endmodule
