// tb_wils_pe: checks one WIL-S cell with the timing of the document's
// Table 1 example (multiplier T_E = 3, adder T_FF = 3, feedback T_FB = 10,
// inputs every K = 3 cycles): the four elements of a 2 x 2 product
// C = A x B are interleaved in one cell, slots at 0, 3, 6, 9, one stall, then
// 13, 16, 19, 22. The partial sum of each slot must appear on `sum` exactly
// T_E + T_FF = 6 cycles after it, with the right tag; the final c_ij (tag
// last) must equal the product computed here. After the run the results must
// stay circulating in the loop, visible on `sum` every 13 cycles. Two
// products run back to back, so the second must discard the first's sums
// through the ctrl multiplexer. The
// pass-through registers (L = 1) are checked every cycle. Operands are
// random signed 16-bit values.
module tb_wils_pe;
  import sa_pkg::*;
  localparam int DW = 16, AW = 32, TE = 3, TFF = 3, TFB = 10, K = 3;
  localparam int TLOOP = TFF + TFB, LAT = TE + TFF, NOP = 4, NST = 2, NRUN = 2;
  localparam int TRUN = NST * TLOOP, TEND = NRUN * TRUN;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [DW-1:0] a_in, b_in, a_out, b_out;
  logic signed [AW-1:0] sum;
  op_tag_t tag_in, tag_out, sum_tag;

  wils_pe #(.DW(DW), .AW(AW), .T_E(TE), .T_FF(TFF), .T_FB(TFB), .L(1)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit running = 0;
  longint A [NRUN][2][2], B [NRUN][2][2], C [NRUN][2][2];
  longint part [NOP];
  longint expv [int];
  bit     expl [int];
  logic signed [DW-1:0] pa, pb;
  op_tag_t pt;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  initial begin
    foreach (A[r, i, j]) begin
      A[r][i][j] = longint'($signed(DW'($urandom)));
      B[r][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (C[r, i, j]) C[r][i][j] = A[r][i][0] * B[r][0][j] + A[r][i][1] * B[r][1][j];
  end

  always @(negedge clk) begin
    int ph, o, s, r;
    a_in = '0; b_in = '0; tag_in = '0;
    ph = cyc % TLOOP;
    if (running && cyc < TEND && ph % K == 0 && ph / K < NOP) begin
      o = ph / K;
      r = cyc / TRUN;
      s = (cyc % TRUN) / TLOOP;
      a_in = DW'(A[r][o / 2][s]);
      b_in = DW'(B[r][s][o % 2]);
      tag_in.valid = 1; tag_in.acc = (s != 0); tag_in.last = (s == NST - 1);
      part[o] = (s == 0 ? 0 : part[o]) + A[r][o / 2][s] * B[r][s][o % 2];
      expv[cyc + LAT] = part[o];
      expl[cyc + LAT] = (s == NST - 1);
    end
    if (running) begin
      check(sum_tag.valid == expv.exists(cyc), "sum valid timing");
      if (expv.exists(cyc)) begin
        check(sum == AW'(expv[cyc]), $sformatf("sum %0d exp %0d", sum, expv[cyc]));
        check(sum_tag.last == expl[cyc], "last tag");
        if (expl[cyc]) begin
          int oo, rr;
          oo = ((cyc - LAT) % TLOOP) / K;
          rr = (cyc - LAT) / TRUN;
          check(sum == AW'(C[rr][oo / 2][oo % 2]), "final c_ij vs matrix product");
        end
      end
      // stored results keep circulating after the run
      if (cyc >= TEND + LAT && cyc < TEND + LAT + 3 * TLOOP) begin
        int ph2;
        ph2 = (cyc - LAT) % TLOOP;
        if (ph2 % K == 0 && ph2 / K < NOP)
          check(sum == AW'(C[NRUN-1][(ph2 / K) / 2][(ph2 / K) % 2]), "result stored in loop");
      end
      check(a_out == pa && b_out == pb && tag_out == pt, "pass-through registers");
    end
    pa = a_in; pb = b_in; pt = tag_in;
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    wait (cyc == TEND + LAT + 3 * TLOOP + 2);
    @(negedge clk);
    check(expv.num() == NOP * NST * NRUN, "slot count");
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
