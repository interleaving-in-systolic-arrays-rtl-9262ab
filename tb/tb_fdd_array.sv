// tb_fdd_array: self-checking test of the finite-difference derivative array
// at its default size (5 cells, 5-bit data, K = 3, T_LOOP = 13).
//
// Four functions are interleaved, three derivative orders each. Function 0
// is f(x) = 5, 7, 11, 3, 8, 7 for x = 0..5 with f'(5) = 1, f''(5) = 2,
// f'''(5) = 3; its first three derivatives at x = 0..4 are also checked
// against the literal values 2 4 -8 5 -1 / 2 -12 13 -6 2 / -14 25 -19 8 0,
// wrapped to 5 bits (so f'''(1) reads -7 and f'''(2) reads 13). The other
// functions are random. Every cell output is checked in every cycle:
// result_valid must be high exactly at slot_time + 3*c + 6 and the value
// must equal a difference table computed here. Slot times are
// order*13 + function*3, i.e. 4 slots 3 cycles apart and 1 stall cycle.
module tb_fdd_array;
  localparam int NC = 5, W = 5, NF = 4, NO = 3, K = 3, TLOOP = 13;
  localparam int SKEW = 3, LAT = 6;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                valid_in, ctrl;
  logic signed [W-1:0] inup [NC], inright [NC], bnd;
  logic signed [W-1:0] result [NC];
  logic                result_valid [NC];

  fdd_array dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  bit running = 0;

  // samples s[f][x], derivative tables d[f][o][x] (o = 0 is the function)
  int d [NF][NO+1][NC+1];

  function automatic int wrap(int v);
    int r = v & ((1 << W) - 1);
    return (r >= (1 << (W - 1))) ? r - (1 << W) : r;
  endfunction

  // document's table for f
  int fdoc [NO][NC] = '{'{2, 4, -8, 5, -1}, '{2, -12, 13, -6, 2}, '{-14, 25, -19, 8, 0}};
  int fval [NC+1] = '{5, 7, 11, 3, 8, 7};
  int fbnd [NO] = '{1, 2, 3};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int x = 0; x <= NC; x++)
        d[f][0][x] = (f == 0) ? fval[x] : wrap($urandom_range(0, 31));
      for (int o = 1; o <= NO; o++) begin
        for (int x = 0; x < NC; x++) d[f][o][x] = wrap(d[f][o-1][x+1] - d[f][o-1][x]);
        d[f][o][NC] = (f == 0) ? fbnd[o-1] : wrap($urandom_range(0, 31));
      end
    end
    // independent cross-check of the reference against the document's table
    for (int o = 1; o <= NO; o++)
      for (int x = 0; x < NC; x++)
        check(d[0][o][x] == wrap(fdoc[o-1][x]), "reference table vs document");
  end

  // slot lookup: returns 1 and (o, f) if time u is an issue slot
  function automatic bit slot_at(int u, output int o, output int f);
    o = 0; f = 0;
    if (u < 0) return 0;
    o = u / TLOOP;
    if (o >= NO) return 0;
    if ((u % TLOOP) % K != 0) return 0;
    f = (u % TLOOP) / K;
    return f < NF;
  endfunction

  int nvalid = 0, nstall = 0, nfirst = 0, nhigher = 0;

  // drive at the negative edge for posedge index `cyc`
  always @(negedge clk) begin
    int o, f;
    valid_in = 0; ctrl = 0; bnd = '0;
    foreach (inup[c]) begin inup[c] = '0; inright[c] = '0; end
    if (running && slot_at(cyc, o, f)) begin
      valid_in = 1;
      ctrl     = (o != 0);
      if (o == 0) nfirst++; else nhigher++;
      for (int c = 0; c < NC; c++) begin
        inup[c]    = W'(d[f][0][NC-1-c]);
        inright[c] = W'(d[f][0][NC-c]);
      end
      bnd = W'(d[f][o][NC]);
    end else if (running && cyc < NO * TLOOP && (cyc % TLOOP) >= NF * K) begin
      nstall++;
    end
    // check every cell output
    if (running) begin
      for (int c = 0; c < NC; c++) begin
        bit exp_v;
        exp_v = slot_at(cyc - SKEW * c - LAT, o, f);
        check(result_valid[c] == exp_v, $sformatf("cell %0d valid got %0b exp %0b", c, result_valid[c], exp_v));
        if (exp_v) begin
          nvalid++;
          check(result[c] == W'(d[f][o+1][NC-1-c]),
                $sformatf("cell %0d func %0d order %0d: got %0d exp %0d",
                          c, f, o + 1, result[c], d[f][o+1][NC-1-c]));
        end
      end
    end
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    wait (cyc == NO * TLOOP + SKEW * (NC - 1) + LAT + 20);
    @(negedge clk);
    check(nvalid == NC * NF * NO, $sformatf("result count %0d", nvalid));
    check(nstall == NO * (TLOOP % K), $sformatf("stall cycles %0d", nstall));
    check(nfirst > 0 && nhigher > 0, "both mux settings used");
    $display("first-step slots %0d, higher-order slots %0d, stall cycles %0d",
             nfirst, nhigher, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
