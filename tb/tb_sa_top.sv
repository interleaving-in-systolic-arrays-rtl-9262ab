// tb_sa_top: end-to-end test of the three arrays in sa_top.
//
// WIL-S multiplier (MM_N = MM_SIZE = 16, CMOS interleaved timing, 2 products
// interleaved): the operand requests are answered in the same cycle with
// column k of A_m and row k of B_m. Every request is logged; every output
// line of every PE is compared in every cycle: a valid sum must appear
// exactly (i+j)*L + T_E + T_FF cycles after a request, with the partial sum
// of that request's product, and the final ones must equal C_m. The run
// must last MM_N * T_LOOP cycles.
// Derivative array (defaults: 5 cells, K = 3, T_LOOP = 13): 4 functions,
// 3 orders, function 0 being the document's f(x) = 5 7 11 3 8 7; results are
// checked against a difference table with 5-bit wrap-around.
// WOIL multiplier: WN x WN (16 x 16, its default size) with exact synchronization of b, as in
// tb_woil_array; the input spacing K is the smallest one for which the b
// chains are free of collisions (the document's rule of raising K).
// Mechanisms counted, each must occur: interleaved operations in flight in
// one loop, first-step (zero) and accumulate selections of the loop mux,
// stall cycles, derivative steps fed from the loop and the neighbour, and b
// operands delivered through the exact-synchronization chains.
module tb_sa_top;
  import sa_pkg::*;
  localparam int MM_SIZE = 16, DW = 16, AW = 32, TE = 2, TFF = 1, K = 2, IL = 2;
  localparam int TFB = IL * K - TFF, TLOOP = TFF + TFB, L = 1, LAT = TE + TFF;
  localparam int NC = 5, W = 5, NF = 4, NO = 3, FK = 3, FTLOOP = 13, FSKEW = 3, FLAT = 6;
  localparam int WN = 16, WD = 10, NPW = 2, NOPSW = NPW * WN;
  localparam int OPW = (IL > 1) ? $clog2(IL) : 1, KWD = (MM_SIZE > 1) ? $clog2(MM_SIZE) : 1;

  // WOIL input spacing: the smallest K >= 2 for which no two b values need
  // the same chain slot (k1*(D-L) + i1*K == k2*(D-L) + i2*K with k1 != k2).
  function automatic int pick_kwo();
    for (int kk = 2; kk < 4 * WN * WD; kk++) begin
      bit ok;
      ok = 1;
      for (int k1 = 0; k1 < WN; k1++) for (int k2 = 0; k2 < WN; k2++)
        for (int i1 = 0; i1 < NOPSW; i1++) for (int i2 = 0; i2 < NOPSW; i2++)
          if ((k1 != k2 || i1 != i2) && k1 * (WD - L) + i1 * kk == k2 * (WD - L) + i2 * kk) ok = 0;
      if (ok) return kk;
    end
    return 4 * WN * WD;
  endfunction
  localparam int KWO = pick_kwo();
  localparam int TSTOP = 2 * ((MM_SIZE * TLOOP + 2 * MM_SIZE * L) > (WN * WD + NOPSW * KWO + WN * L)
                              ? (MM_SIZE * TLOOP + 2 * MM_SIZE * L) : (WN * WD + NOPSW * KWO + WN * L)) + 100;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mm_start = 0, mm_busy, mm_done, mm_stall, mm_req_valid;
  logic [OPW-1:0] mm_req_op;
  logic [KWD-1:0] mm_req_k;
  logic signed [DW-1:0] mm_a_col [MM_SIZE], mm_b_row [MM_SIZE];
  logic signed [AW-1:0] mm_sum [MM_SIZE][MM_SIZE];
  op_tag_t              mm_sum_tag [MM_SIZE][MM_SIZE];

  logic fd_start = 0, fd_busy, fd_done, fd_stall, fd_req_valid;
  logic [1:0] fd_req_op, fd_req_order;
  logic signed [W-1:0] fd_samples [NC+1], fd_bnd, fd_result [NC];
  logic fd_result_valid [NC];

  logic signed [DW-1:0] wo_a_in [WN], wo_b_in [WN];
  logic wo_a_valid [WN], wo_c_valid [WN];
  logic signed [AW-1:0] wo_c_in [WN], wo_c_out [WN];

  sa_top #(.MM_N(MM_SIZE), .WO_N(WN)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit running = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  function automatic int wrap(int v);
    int r = v & ((1 << W) - 1);
    return (r >= (1 << (W - 1))) ? r - (1 << W) : r;
  endfunction

  // ---- reference data ------------------------------------------------------
  longint A [IL][MM_SIZE][MM_SIZE], B [IL][MM_SIZE][MM_SIZE], C [IL][MM_SIZE][MM_SIZE];
  int d [NF][NO+1][NC+1];
  int fval [NC+1] = '{5, 7, 11, 3, 8, 7};
  int fbnd [NO] = '{1, 2, 3};
  longint WA [NPW][WN][WN], WB [NPW][WN][WN], WC [NPW][WN][WN];
  longint bsched [WN][int];

  initial begin
    foreach (A[m, i, j]) begin
      A[m][i][j] = longint'($signed(DW'($urandom)));
      B[m][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (C[m, i, j]) begin
      C[m][i][j] = 0;
      for (int k = 0; k < MM_SIZE; k++) C[m][i][j] += A[m][i][k] * B[m][k][j];
    end
    for (int f = 0; f < NF; f++) begin
      for (int x = 0; x <= NC; x++) d[f][0][x] = (f == 0) ? fval[x] : wrap($urandom_range(0, 31));
      for (int o = 1; o <= NO; o++) begin
        for (int x = 0; x < NC; x++) d[f][o][x] = wrap(d[f][o-1][x+1] - d[f][o-1][x]);
        d[f][o][NC] = (f == 0) ? fbnd[o-1] : wrap($urandom_range(0, 31));
      end
    end
    foreach (WA[m, i, j]) begin
      WA[m][i][j] = longint'($signed(DW'($urandom)));
      WB[m][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (WC[m, i, j]) begin
      WC[m][i][j] = 0;
      for (int k = 0; k < WN; k++) WC[m][i][j] += WA[m][i][k] * WB[m][k][j];
    end
    for (int j = 0; j < WN; j++)
      for (int k = 0; k < WN; k++)
        for (int i = 0; i < NOPSW; i++) begin
          int t;
          t = k * WD + j * L + i * KWO - k * L;
          check(!bsched[j].exists(t), "WOIL chain slot free");
          bsched[j][t] = WB[i % NPW][k][j];
        end
  end

  // ---- mechanism counters ----------------------------------------------------
  int n_mm_req = 0, n_mm_first = 0, n_mm_acc = 0, n_mm_final = 0, n_mm_inflight_max = 0;
  int n_fd_req = 0, n_fd_stall = 0, n_fd_loop = 0, n_fd_res = 0;
  int n_wo_chain = 0, n_wo_res = 0;
  int mm_t0 = -1, mm_tdone = -1, fd_t0 = -1;
  int mm_log_op [int], mm_log_k [int];   // requests by cycle
  int fd_log_op [int], fd_log_o [int];

  always @(negedge clk) begin
    // ---- WIL-S operand store ----
    foreach (mm_a_col[i]) begin mm_a_col[i] = '0; mm_b_row[i] = '0; end
    if (mm_req_valid) begin
      int m, k, inflight;
      m = int'(mm_req_op); k = int'(mm_req_k);
      for (int i = 0; i < MM_SIZE; i++) begin
        mm_a_col[i] = DW'(A[m][i][k]);
        mm_b_row[i] = DW'(B[m][k][i]);
      end
      if (mm_t0 < 0) mm_t0 = cyc;
      mm_log_op[cyc] = m; mm_log_k[cyc] = k;
      n_mm_req++;
      if (k == 0) n_mm_first++; else n_mm_acc++;
      // operations issued within the last loop period are all in flight
      inflight = 0;
      for (int t = cyc - TLOOP + 1; t <= cyc; t++) if (mm_log_op.exists(t)) inflight++;
      if (inflight > n_mm_inflight_max) n_mm_inflight_max = inflight;
    end
    if (mm_done) mm_tdone = cyc;
    // ---- WIL-S outputs ----
    for (int i = 0; i < MM_SIZE; i++) for (int j = 0; j < MM_SIZE; j++) begin
      int u;
      bit ev;
      u = cyc - (i + j) * L - LAT;
      ev = mm_log_op.exists(u);
      check(mm_sum_tag[i][j].valid == ev, $sformatf("WIL-S PE %0d,%0d valid timing", i, j));
      if (ev) begin
        int m, k;
        longint p;
        m = mm_log_op[u]; k = mm_log_k[u];
        p = 0;
        for (int kk = 0; kk <= k; kk++) p += A[m][i][kk] * B[m][kk][j];
        check(mm_sum[i][j] == AW'(p), $sformatf("WIL-S PE %0d,%0d partial sum", i, j));
        if (mm_sum_tag[i][j].last) begin
          check(mm_sum[i][j] == AW'(C[m][i][j]), "WIL-S final c_ij");
          n_mm_final++;
        end
      end
    end

    // ---- derivative samples ----
    foreach (fd_samples[x]) fd_samples[x] = '0;
    fd_bnd = '0;
    if (fd_req_valid) begin
      int f, o;
      f = int'(fd_req_op); o = int'(fd_req_order);
      for (int x = 0; x <= NC; x++) fd_samples[x] = W'(d[f][0][x]);
      fd_bnd = W'(d[f][o][NC]);
      if (fd_t0 < 0) fd_t0 = cyc;
      fd_log_op[cyc] = f; fd_log_o[cyc] = o;
      n_fd_req++;
      if (o != 0) n_fd_loop++;
    end
    if (fd_stall) n_fd_stall++;
    for (int c = 0; c < NC; c++) begin
      int u;
      bit ev;
      u = cyc - FSKEW * c - FLAT;
      ev = fd_log_op.exists(u);
      check(fd_result_valid[c] == ev, $sformatf("derivative cell %0d valid timing", c));
      if (ev) begin
        check(fd_result[c] == W'(d[fd_log_op[u]][fd_log_o[u] + 1][NC-1-c]),
              $sformatf("derivative cell %0d value", c));
        n_fd_res++;
      end
    end

    // ---- WOIL feeder and outputs ----
    for (int x = 0; x < WN; x++) begin
      int u;
      wo_a_in[x] = '0; wo_a_valid[x] = 0; wo_c_in[x] = '0; wo_b_in[x] = '0;
      u = cyc - x * WD;
      if (running && u >= 0 && u % KWO == 0 && u / KWO < NOPSW) begin
        wo_a_in[x] = DW'(WA[(u / KWO) % NPW][(u / KWO) / NPW][x]);
        wo_a_valid[x] = 1;
      end
      if (running && bsched[x].exists(cyc)) begin
        wo_b_in[x] = DW'(bsched[x][cyc]);
        n_wo_chain++;
      end
    end
    if (running) begin
      for (int j = 0; j < WN; j++) begin
        int u;
        bit ev;
        u = cyc - ((WN - 1) * WD + j * L + TE + WD);
        ev = (u >= 0 && u % KWO == 0 && u / KWO < NOPSW);
        check(wo_c_valid[j] == ev, "WOIL valid timing");
        if (ev) begin
          check(wo_c_out[j] == AW'(WC[(u / KWO) % NPW][(u / KWO) / NPW][j]), "WOIL result");
          n_wo_res++;
        end
      end
    end
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    foreach (wo_a_in[x]) begin wo_a_in[x] = '0; wo_a_valid[x] = 0; wo_b_in[x] = '0; wo_c_in[x] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    @(negedge clk) mm_start = 1; fd_start = 1;
    @(negedge clk) mm_start = 0; fd_start = 0;
    wait (cyc == TSTOP);
    @(negedge clk);
    check(mm_t0 >= 0 && mm_tdone - mm_t0 + 1 == MM_SIZE * TLOOP, "WIL-S run length");
    check(n_mm_final == IL * MM_SIZE * MM_SIZE, $sformatf("WIL-S final results %0d", n_mm_final));
    check(n_fd_res == NC * NF * NO, $sformatf("derivative results %0d", n_fd_res));
    check(n_wo_res == NOPSW * WN, $sformatf("WOIL results %0d", n_wo_res));
    $display("mechanisms: interleaved ops in one loop %0d, first-step %0d, accumulate %0d,",
             n_mm_inflight_max, n_mm_first, n_mm_acc);
    $display("            stall cycles %0d, derivative steps from loop+neighbour %0d,",
             n_fd_stall, n_fd_loop);
    $display("            b values through sync chains %0d (WOIL input spacing K = %0d)", n_wo_chain, KWO);
    check(n_mm_inflight_max >= 2, "interleaving happened");
    check(n_mm_first > 0 && n_mm_acc > 0, "both loop-mux settings happened");
    check(n_fd_stall > 0, "stall happened");
    check(n_fd_loop > 0, "feedback/neighbour step happened");
    check(n_wo_chain > 0, "exact synchronization happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TSTOP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
