// tb_delay_line: checks that a 12-bit, 5-deep delay_line returns every random
// input exactly 5 cycles later, that reset clears it, and that a depth-0
// instance is a plain wire.
module tb_delay_line;
  localparam int WIDTH = 12, DEPTH = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WIDTH-1:0] din, dout, dout0;
  delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut  (.clk, .rst, .din, .dout);
  delay_line #(.WIDTH(WIDTH), .DEPTH(0))     dut0 (.clk, .rst, .din, .dout(dout0));

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(dout == '0, "reset clears the chain");
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      din = WIDTH'($urandom);
      #1 check(dout0 == din, "depth 0 is a wire");
      hist.push_back(din);
      @(negedge clk);
      // after the posedge, dout holds the value driven DEPTH cycles ago
      if (hist.size() >= DEPTH)
        check(dout == hist[hist.size() - DEPTH],
              $sformatf("t=%0d got %h exp %h", t, dout, hist[hist.size() - DEPTH]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
