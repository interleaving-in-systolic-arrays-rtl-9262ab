// skew_bank: LANES parallel lanes, lane i delayed by OFFSET + i*STEP cycles
// (or OFFSET + (LANES-1-i)*STEP when REVERSE is set).
//
// In a systolic array every processing element runs the same input
// schedule, but shifted in time by its distance from the cell that starts
// first: S_i = m_i * L for the matrix arrays, (T_p - T_fb) per cell for the
// finite-difference array. Feeding all lanes from one schedule through this
// bank produces that wavefront.
//
// Timing: out[i](t) = in[i](t - OFFSET - i*STEP). Reset clears all stages.
module skew_bank #(
  parameter int unsigned LANES   = 4,
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned STEP    = 1,
  parameter int unsigned OFFSET  = 0,
  parameter bit          REVERSE = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din  [LANES],
  output logic [WIDTH-1:0] dout [LANES]
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    localparam int unsigned POS = REVERSE ? (LANES - 1 - i) : i;
    delay_line #(.WIDTH(WIDTH), .DEPTH(OFFSET + POS * STEP)) u_dl (
      .clk (clk),
      .rst (rst),
      .din (din[i]),
      .dout(dout[i])
    );
  end

endmodule
