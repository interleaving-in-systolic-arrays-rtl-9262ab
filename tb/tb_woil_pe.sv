// tb_woil_pe: checks one WOIL cell at its default timing (multiplier 2,
// path D = 10 with a 1-cycle adder, L = 1). Random signed operands a, b
// enter every K = 2 cycles and the partial result c_in arrives 2 cycles
// later, when the product is ready; c_out must equal c_in + a*b exactly D
// cycles after c_in, flagged valid, and never be valid otherwise. The
// pass-through registers of a (with its valid) and b are checked each cycle.
module tb_woil_pe;
  localparam int DW = 16, AW = 32, TMUL = 2, D = 10, K = 2, NOPS = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [DW-1:0] a_in, b_in, a_out, b_out;
  logic                 a_valid_in, a_valid_out, c_valid;
  logic signed [AW-1:0] c_in, c_out;
  woil_pe dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit running = 0;
  longint prod [int];      // product by slot time
  longint expv [int];      // expected c_out by cycle
  logic signed [DW-1:0] pa, pb;
  logic pv;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  always @(negedge clk) begin
    a_in = '0; b_in = '0; a_valid_in = 0; c_in = '0;
    if (running && cyc < NOPS * K && cyc % K == 0) begin
      a_in = DW'($urandom); b_in = DW'($urandom); a_valid_in = 1;
      prod[cyc] = longint'(a_in) * longint'(b_in);
    end
    if (running && prod.exists(cyc - TMUL)) begin
      c_in = AW'($urandom);
      expv[cyc + D] = longint'(c_in) + prod[cyc - TMUL];
    end
    if (running) begin
      check(c_valid == expv.exists(cyc), "c_valid timing");
      if (expv.exists(cyc)) check(c_out == AW'(expv[cyc]), "c_out = c_in + a*b");
      check(a_out == pa && b_out == pb && a_valid_out == pv, "pass-through registers");
    end
    pa = a_in; pb = b_in; pv = a_valid_in;
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    wait (cyc == NOPS * K + TMUL + D + 4);
    @(negedge clk);
    check(expv.num() == NOPS, "operation count");
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
