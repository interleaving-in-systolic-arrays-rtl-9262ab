// tb_fdd_cell: checks one finite-difference cell at its default timing
// (subtract 3, multiply 3, feedback 7, propagation 10 cycles, 5-bit data).
// Four interleaved operations run four steps each, slots at s*13 + o*3.
// Step 0 uses the samples (ctrl = 0), later steps use the cell's own
// previous result and a random neighbour value on in0 (ctrl = 1). The
// expected result, wrap(right - own) with h = 1, must appear exactly 6
// cycles after the slot and on to_next 10 cycles after that; no other
// cycle may be valid.
module tb_fdd_cell;
  localparam int W = 5, NOP = 4, NST = 4, K = 3, TLOOP = 13, LAT = 6, TP = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                valid_in, ctrl, result_valid, to_next_valid;
  logic signed [W-1:0] inup, inright, in0, result, to_next;
  fdd_cell dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit running = 0;
  int own [NOP];           // cell's previous result per operation
  int expv [int];          // expected result by completion cycle

  function automatic int wrap(int v);
    int r = v & ((1 << W) - 1);
    return (r >= (1 << (W - 1))) ? r - (1 << W) : r;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  always @(negedge clk) begin
    valid_in = 0; ctrl = 0; inup = '0; inright = '0; in0 = '0;
    if (running && cyc < NST * TLOOP && (cyc % TLOOP) % K == 0 && (cyc % TLOOP) / K < NOP) begin
      int o, s, a, b, r;
      o = (cyc % TLOOP) / K;
      s = cyc / TLOOP;
      valid_in = 1;
      ctrl = (s != 0);
      a = wrap($urandom_range(0, 31));
      b = wrap($urandom_range(0, 31));
      if (s == 0) begin
        inup = W'(a); inright = W'(b);
        r = wrap(b - a);
      end else begin
        inup = W'(a);           // ignored when ctrl = 1
        in0 = W'(b);
        r = wrap(b - own[o]);
      end
      own[o] = r;
      expv[cyc + LAT] = r;
    end
    if (running) begin
      check(result_valid == expv.exists(cyc), "result_valid timing");
      if (expv.exists(cyc)) check(result == W'(expv[cyc]),
        $sformatf("result %0d exp %0d", result, expv[cyc]));
      check(to_next_valid == expv.exists(cyc - TP), "to_next_valid timing");
      if (expv.exists(cyc - TP)) check(to_next == W'(expv[cyc - TP]), "to_next value");
    end
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    wait (cyc == NST * TLOOP + LAT + TP + 5);
    @(negedge clk);
    check(expv.num() == NOP * NST, "slot count");
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
