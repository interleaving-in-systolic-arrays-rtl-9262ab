// wils_pe: processing element with an internal loop whose result is stored
// in the cell (class WIL-S), as used for matrix multiplication.
//
// Structure: the two operands a and b are multiplied (entry section, T_E
// cycles). A multiplexer driven by the `acc` control bit (the "ctrl" signal)
// selects either zero, for the first step of an operation, or the partial sum
// coming back around the loop; the adder (forward part of the loop, T_FF
// cycles) adds the product to it, and the sum is sent back through the
// feedback path (T_FB cycles). The loop therefore takes
// T_LOOP = T_FF + T_FB cycles and holds T_LOOP / K interleaved operations
// when inputs arrive every K cycles. a (with its control tag) and b are
// also passed on unchanged to the right and lower neighbours through L-stage
// shift registers.
//
// Interface: a_in/tag_in from the left neighbour, b_in from the upper one;
// a_out/tag_out and b_out to the next cells; `sum`/`sum_tag` is the output
// line of the cell, the adder output with the tag of the operation that made
// it. sum_tag.last marks a finished result.
//
// Timing: an operand pair entering at cycle t appears at `sum` at
// t + T_E + T_FF and is added again at t + T_E + T_LOOP, so the next step of
// the same operation must enter exactly T_LOOP cycles after this one.
//
// Defaults are the CMOS interleaved case of the document: 16-bit operands,
// 32-bit result, multiplier 2 cycles, adder 1 cycle, n = 2 interleaved
// operations so T_FB = n*K - T_FF = 3, shift registers of L = 1.
// This design's own choices: signed two's-complement arithmetic; arithmetic
// blocks are modelled as a combinational unit followed by its cycle count of
// registers; on an empty slot (tag.valid = 0) the loop value is kept
// circulating unchanged, so a finished result stays stored in the cell.
module wils_pe
  import sa_pkg::*;
#(
  parameter int unsigned DW   = 16,
  parameter int unsigned AW   = 32,
  parameter int unsigned T_E  = 2,
  parameter int unsigned T_FF = 1,
  parameter int unsigned T_FB = 3,
  parameter int unsigned L    = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] a_in,
  input  logic signed [DW-1:0] b_in,
  input  op_tag_t              tag_in,
  output logic signed [DW-1:0] a_out,
  output logic signed [DW-1:0] b_out,
  output op_tag_t              tag_out,
  output logic signed [AW-1:0] sum,
  output op_tag_t              sum_tag
);

  localparam int unsigned TW = $bits(op_tag_t);

  if (T_FF < 1) begin : g_bad_tff
    $error("wils_pe: the adder needs T_FF >= 1 to break the loop");
  end

  // ---- entry section: multiplier ------------------------------------------
  logic signed [AW-1:0] prod_c, prod;
  op_tag_t              ptag;

  assign prod_c = AW'(a_in * b_in);

  delay_line #(.WIDTH(AW + TW), .DEPTH(T_E)) u_mul (
    .clk (clk),
    .rst (rst),
    .din ({prod_c, tag_in}),
    .dout({prod, ptag})
  );

  // ---- loop: mux, adder, feedback --------------------------------------------
  logic signed [AW-1:0] fb, lhs, rhs, sum_c;

  always_comb begin
    lhs   = ptag.valid ? prod : '0;
    rhs   = (!ptag.valid || ptag.acc) ? fb : '0;
    sum_c = lhs + rhs;
  end

  delay_line #(.WIDTH(AW + TW), .DEPTH(T_FF)) u_add (
    .clk (clk),
    .rst (rst),
    .din ({sum_c, ptag}),
    .dout({sum, sum_tag})
  );

  delay_line #(.WIDTH(AW), .DEPTH(T_FB)) u_fb (
    .clk (clk),
    .rst (rst),
    .din (sum),
    .dout(fb)
  );

  // ---- shift registers to the neighbours -------------------------------------
  delay_line #(.WIDTH(DW + TW), .DEPTH(L)) u_sr_a (
    .clk (clk),
    .rst (rst),
    .din ({a_in, tag_in}),
    .dout({a_out, tag_out})
  );

  delay_line #(.WIDTH(DW), .DEPTH(L)) u_sr_b (
    .clk (clk),
    .rst (rst),
    .din (b_in),
    .dout(b_out)
  );

endmodule
