// wils_workload_run: test harness (not part of the design) that runs one
// configuration of the WIL-S matrix multiplier end to end and checks it.
//
// It instantiates interleave_sched, a skew stage and a wils_array with the
// given timing, answers the scheduler's operand requests with random signed
// matrices (NPROD = T_LOOP / K products interleaved), and compares every
// final c_ij with a product computed here. It also checks the total time
// against T_end = 2(N-1)L + (p-1)K + T_cell with p = n*N, T_cell = T_E + T_FF
// (the document's equation (8)), extended by the R stall cycles of each set
// when K does not divide T_LOOP. Pulse `go`; `done` rises when finished.
module wils_workload_run
  import sa_pkg::*;
#(
  parameter int N    = 4,
  parameter int TE   = 2,
  parameter int TFF  = 1,
  parameter int TFB  = 3,
  parameter int K    = 2,
  parameter int L    = 1,
  parameter string NAME = "cmos"
) (
  input  logic clk,
  input  logic rst,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   inflight_max
);
  localparam int DW = 16, AW = 32, TLOOP = TFF + TFB, NP = TLOOP / K, R = TLOOP % K;
  localparam int OPW = (NP > 1) ? $clog2(NP) : 1, KW = (N > 1) ? $clog2(N) : 1;

  logic issue, stall, busy, sdone;
  logic [OPW-1:0] op;
  logic [KW-1:0]  step;
  op_tag_t        tag;

  interleave_sched #(.T_LOOP(TLOOP), .K(K), .STEPS(N)) u_sched (
    .clk, .rst, .start(go), .issue, .op, .step, .tag, .stall, .busy, .done(sdone));

  logic signed [DW-1:0] a_col [N], b_row [N], a_sk [N], b_sk [N];
  logic [DW+2:0] row_in [N], row_out [N];
  logic [DW-1:0] col_in [N], col_out [N];
  op_tag_t t_sk [N];
  logic signed [AW-1:0] sum [N][N];
  op_tag_t sum_tag [N][N];

  for (genvar i = 0; i < N; i++) begin : g_l
    assign row_in[i] = {a_col[i], tag};
    assign col_in[i] = b_row[i];
    assign {a_sk[i], t_sk[i]} = row_out[i];
    assign b_sk[i] = col_out[i];
  end
  skew_bank #(.LANES(N), .WIDTH(DW + 3), .STEP(L)) u_sa (.clk, .rst, .din(row_in), .dout(row_out));
  skew_bank #(.LANES(N), .WIDTH(DW), .STEP(L)) u_sb (.clk, .rst, .din(col_in), .dout(col_out));

  wils_array #(.ROWS(N), .COLS(N), .DW(DW), .AW(AW), .T_E(TE), .T_FF(TFF), .T_FB(TFB), .L(L))
    u_arr (.clk, .rst, .a_in(a_sk), .tag_in(t_sk), .b_in(b_sk), .sum, .sum_tag);

  longint A [NP][N][N], B [NP][N][N], C [NP][N][N];
  int cyc = 0, t_first = -1, t_last = -1, nfinal = 0;
  int log_op [int];

  initial begin
    checks = 0; failures = 0; stalls = 0; inflight_max = 0; done = 0;
    foreach (A[m, i, j]) begin
      A[m][i][j] = longint'($signed(DW'($urandom)));
      B[m][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (C[m, i, j]) begin
      C[m][i][j] = 0;
      for (int k = 0; k < N; k++) C[m][i][j] += A[m][i][k] * B[m][k][j];
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s cyc %0d: %s", NAME, cyc, what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    foreach (a_col[i]) begin a_col[i] = '0; b_row[i] = '0; end
    if (issue) begin
      int m, k, nin;
      m = int'(op); k = int'(step);
      for (int i = 0; i < N; i++) begin
        a_col[i] = DW'(A[m][i][k]);
        b_row[i] = DW'(B[m][k][i]);
      end
      if (t_first < 0) t_first = cyc;
      log_op[cyc] = m;
      nin = 0;
      for (int t = cyc - TLOOP + 1; t <= cyc; t++) if (log_op.exists(t)) nin++;
      if (nin > inflight_max) inflight_max = nin;
    end
    if (stall) stalls++;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (sum_tag[i][j].valid && sum_tag[i][j].last) begin
        int u;
        u = cyc - (i + j) * L - TE - TFF;
        check(log_op.exists(u), "final result at a slot time");
        if (log_op.exists(u)) check(sum[i][j] == AW'(C[log_op[u]][i][j]), "final c_ij");
        nfinal++;
        t_last = cyc;
      end
    if (!done && t_first >= 0 && !busy && cyc > t_first + N * TLOOP + 2 * N * L + TE + TFF + 2) begin
      int p, tend;
      p = NP * N;
      // eq. (8) plus R stalls per set boundary, counted from the first slot
      tend = 2 * (N - 1) * L + (p - 1) * K + (N - 1) * R + TE + TFF;
      check(nfinal == NP * N * N, $sformatf("final results %0d", nfinal));
      check(t_last - t_first == tend, $sformatf("T_end %0d expected %0d", t_last - t_first, tend));
      $display("%s: N=%0d K=%0d T_loop=%0d -> %0d products interleaved, %0d stall cycles, T_end=%0d cycles",
               NAME, N, K, TLOOP, NP, stalls, t_last - t_first);
      done = 1;
    end
  end
endmodule
