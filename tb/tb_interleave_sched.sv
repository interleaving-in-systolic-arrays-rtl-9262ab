// tb_interleave_sched: checks the slot schedule of interleave_sched for the
// document's example T_LOOP = 13, K = 3 (4 interleaved operations, 1 stall
// cycle per set; Table 1's 2 x 2 product in one PE: slots at 0, 3, 6, 9,
// stall at 12, then 13, 16, 19, 22) over 3 steps, and for T_LOOP = 4,
// K = 2, 2 operations, no stall (the CMOS case with n = 2) over 5 steps.
// Every cycle of each run is compared with the rule
// issue(t) <=> t = s*T_LOOP + o*K, o < T_LOOP/K, and the run length, the
// tag bits and the stall count are checked.
module tb_interleave_sched;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start_a = 0, start_b = 0;
  logic issue_a, stall_a, busy_a, done_a, issue_b, stall_b, busy_b, done_b;
  logic [1:0] op_a;  logic [1:0] step_a;
  logic       op_b;  logic [2:0] step_b;
  op_tag_t tag_a, tag_b;

  interleave_sched #(.T_LOOP(13), .K(3), .STEPS(3)) dut_a (
    .clk, .rst, .start(start_a), .issue(issue_a), .op(op_a), .step(step_a),
    .tag(tag_a), .stall(stall_a), .busy(busy_a), .done(done_a));
  interleave_sched #(.T_LOOP(4), .K(2), .STEPS(5)) dut_b (
    .clk, .rst, .start(start_b), .issue(issue_b), .op(op_b), .step(step_b),
    .tag(tag_b), .stall(stall_b), .busy(busy_b), .done(done_b));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Run one scheduler and compare every cycle with the rule.
  task automatic run(input int which, input int tloop, input int k, input int steps);
    int n, nstall, nissue, t;
    n = tloop / k; nstall = 0; nissue = 0;
    @(negedge clk);
    if (which == 0) start_a = 1; else start_b = 1;
    @(negedge clk);
    start_a = 0; start_b = 0;
    for (t = 0; t < tloop * steps + 5; t++) begin
      logic iss, stl, bsy, dn, acc, lst;
      int o, s;
      bit exp_iss, in_run;
      if (which == 0) begin
        iss = issue_a; stl = stall_a; bsy = busy_a; dn = done_a;
        o = op_a; s = step_a; acc = tag_a.acc; lst = tag_a.last;
      end else begin
        iss = issue_b; stl = stall_b; bsy = busy_b; dn = done_b;
        o = op_b; s = step_b; acc = tag_b.acc; lst = tag_b.last;
      end
      in_run  = t < tloop * steps;
      exp_iss = in_run && ((t % tloop) % k == 0) && ((t % tloop) / k < n);
      check(iss == exp_iss, $sformatf("sched %0d t=%0d issue %0b", which, t, iss));
      check(bsy == in_run, $sformatf("sched %0d t=%0d busy", which, t));
      check(dn == (t == tloop * steps - 1), $sformatf("sched %0d t=%0d done", which, t));
      check(stl == (in_run && (t % tloop) >= n * k), $sformatf("sched %0d t=%0d stall", which, t));
      if (exp_iss) begin
        check(o == (t % tloop) / k && s == t / tloop,
              $sformatf("sched %0d t=%0d op %0d step %0d", which, t, o, s));
        check(acc == (s != 0) && lst == (s == steps - 1),
              $sformatf("sched %0d t=%0d tag", which, t));
        nissue++;
      end
      if (stl) nstall++;
      @(negedge clk);
    end
    check(nissue == n * steps, "slot count");
    check(nstall == steps * (tloop % k), "stall count");
    $display("schedule %0d: %0d slots, %0d stall cycles", which, nissue, nstall);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0, 13, 3, 3);
    run(1, 4, 2, 5);
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
