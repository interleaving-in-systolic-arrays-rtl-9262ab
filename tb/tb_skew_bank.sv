// tb_skew_bank: checks lane delays of two skew_bank instances, one forward
// (lane i delayed 2 + 3*i cycles) and one reversed (lane i delayed
// 2*(LANES-1-i) cycles), with random data on every lane.
module tb_skew_bank;
  localparam int LANES = 4, WIDTH = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [WIDTH-1:0] din [LANES], dout_f [LANES], dout_r [LANES];

  skew_bank #(.LANES(LANES), .WIDTH(WIDTH), .STEP(3), .OFFSET(2)) dut_f (
    .clk, .rst, .din, .dout(dout_f));
  skew_bank #(.LANES(LANES), .WIDTH(WIDTH), .STEP(2), .REVERSE(1'b1)) dut_r (
    .clk, .rst, .din, .dout(dout_r));

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [LANES][$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (din[i]) din[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 100; t++) begin
      foreach (din[i]) begin
        din[i] = WIDTH'($urandom);
        hist[i].push_back(din[i]);
      end
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        int df, dr, n;
        df = 2 + 3 * i;
        dr = 2 * (LANES - 1 - i);
        n  = hist[i].size();
        if (df >= 1 && n >= df)
          check(dout_f[i] == hist[i][n - df], $sformatf("fwd lane %0d t=%0d", i, t));
        if (dr >= 1 && n >= dr)
          check(dout_r[i] == hist[i][n - dr], $sformatf("rev lane %0d t=%0d", i, t));
        if (dr == 0)
          check(dout_r[i] == din[i], $sformatf("rev lane %0d wire", i));
      end
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
