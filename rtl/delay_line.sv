// delay_line: a chain of DEPTH registers, WIDTH bits wide.
//
// Used everywhere a block or wire of the arrays takes a whole number of clock
// cycles: the pipelined arithmetic units, the feedback path of a loop, the
// propagation path to the neighbour cell and the L-stage shift registers
// that pass operands along a row or column. DEPTH = 0 is a plain wire.
//
// Timing: dout(t) = din(t - DEPTH). Registers clear to zero on reset
// (synchronous, active high), a choice of this design.
//
// Lint note: with DEPTH = 0 the clk and rst inputs are not used (the block
// is a wire), so Verilator reports them as unused for those instances. The
// ports are kept so every delay in the arrays has the same interface.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign dout = stage[DEPTH-1];
  end

endmodule
