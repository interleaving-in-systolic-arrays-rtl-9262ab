// tb_wils_workloads: runs the WIL-S matrix multiplier with the timing of each
// configuration the document evaluates, on an 8 x 8 array (the document's
// tables assume 1024 x 1024):
//   no interleave, CMOS slow clock: T_E = T_FF = T_FB = 1, K = T_loop = 2
//   CMOS fast clock n = 1, 2, 3:   T_E = 2, T_FF = 1, T_FB = 2n - 1, K = 2
//   NML (Table 2, interleave):     T_E = 38, T_FF = 19, T_FB = 19, K = 19, L = 20
//   NWFET (Sec. 7):                T_E = 68, T_FF = 33, T_FB = 33, K = 34, L = 20
// Each run checks all final results and the total time against equation (8).
module tb_wils_workloads;
  logic clk = 0, rst = 1, go = 0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  logic done [NW];
  int ch [NW], fl [NW], st [NW], inf [NW];

  wils_workload_run #(.N(8), .TE(1),  .TFF(1),  .TFB(1),  .K(2),  .L(1),  .NAME("no-interleave"))
    w0 (.clk, .rst, .go, .done(done[0]), .checks(ch[0]), .failures(fl[0]), .stalls(st[0]), .inflight_max(inf[0]));
  wils_workload_run #(.N(8), .TE(2),  .TFF(1),  .TFB(1),  .K(2),  .L(1),  .NAME("cmos n=1"))
    w1 (.clk, .rst, .go, .done(done[1]), .checks(ch[1]), .failures(fl[1]), .stalls(st[1]), .inflight_max(inf[1]));
  wils_workload_run #(.N(8), .TE(2),  .TFF(1),  .TFB(3),  .K(2),  .L(1),  .NAME("cmos n=2"))
    w2 (.clk, .rst, .go, .done(done[2]), .checks(ch[2]), .failures(fl[2]), .stalls(st[2]), .inflight_max(inf[2]));
  wils_workload_run #(.N(8), .TE(2),  .TFF(1),  .TFB(5),  .K(2),  .L(1),  .NAME("cmos n=3"))
    w3 (.clk, .rst, .go, .done(done[3]), .checks(ch[3]), .failures(fl[3]), .stalls(st[3]), .inflight_max(inf[3]));
  wils_workload_run #(.N(8), .TE(38), .TFF(19), .TFB(19), .K(19), .L(20), .NAME("nml interleave"))
    w4 (.clk, .rst, .go, .done(done[4]), .checks(ch[4]), .failures(fl[4]), .stalls(st[4]), .inflight_max(inf[4]));
  wils_workload_run #(.N(8), .TE(68), .TFF(33), .TFB(33), .K(34), .L(20), .NAME("nwfet"))
    w5 (.clk, .rst, .go, .done(done[5]), .checks(ch[5]), .failures(fl[5]), .stalls(st[5]), .inflight_max(inf[5]));

  int checks = 0, failures = 0;

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    do begin
      @(negedge clk);
      all = 1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    foreach (ch[i]) begin checks += ch[i]; failures += fl[i]; end
    // the interleave level reached in each loop must match T_loop / K
    checks += 6;
    if (inf[1] != 1) failures++;
    if (inf[2] != 2) failures++;
    if (inf[3] != 3) failures++;
    if (inf[4] != 2) failures++;
    if (st[5] == 0) failures++;   // NWFET: T_loop = 66, K = 34 leaves 32 stall cycles per set
    if (inf[0] != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
