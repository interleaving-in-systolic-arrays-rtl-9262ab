// tb_woil_array: a 3 x 3 WOIL array (multiplier 2, path D = 10, L = 1,
// inputs every K = 2 cycles) computes two interleaved 3 x 3 products
// C_m = A_m x B_m with exact synchronization: operation i = 2*r + m (row r
// of product m) runs in PE (k,j) at k*D + j*L + i*K. The feeder here skews
// row k's a stream by k*D and column j's zero c_in by j*L, and puts b_kj of
// product m into column j's chain at k*D + j*L + i*K - k*L; it first checks
// that no two b values need the same chain slot (the document's condition
// m*(D-L) != n*K). Each bottom output must carry c_rj of the right product
// exactly (ROWS-1)*D + j*L + i*K + 2 + D cycles after PE (0,0)'s start, and
// be invalid in every other cycle.
module tb_woil_array;
  localparam int N = 3, DW = 16, AW = 32, TMUL = 2, TADD = 1, D = 10, L = 1, K = 2;
  localparam int NP = 2, NOPS = NP * N;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [DW-1:0] a_in [N], b_in [N];
  logic                 a_valid [N], c_valid [N];
  logic signed [AW-1:0] c_in [N], c_out [N];

  woil_array #(.ROWS(N), .COLS(N), .DW(DW), .AW(AW), .T_MUL(TMUL), .T_ADD(TADD),
               .D(D), .L(L)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nres = 0, nchain = 0;
  bit running = 0;
  longint A [NP][N][N], B [NP][N][N], C [NP][N][N];
  longint bsched [N][int];   // column j: chain input value by cycle

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  initial begin
    foreach (A[m, i, j]) begin
      A[m][i][j] = longint'($signed(DW'($urandom)));
      B[m][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (C[m, i, j]) begin
      C[m][i][j] = 0;
      for (int k = 0; k < N; k++) C[m][i][j] += A[m][i][k] * B[m][k][j];
    end
    // b chain schedule, with the collision check
    for (int j = 0; j < N; j++)
      for (int k = 0; k < N; k++)
        for (int i = 0; i < NOPS; i++) begin
          int t;
          t = k * D + j * L + i * K - k * L;
          check(!bsched[j].exists(t), "exact synchronization: chain slot free");
          bsched[j][t] = B[i % NP][k][j];
          nchain++;
        end
  end

  always @(negedge clk) begin
    for (int x = 0; x < N; x++) begin
      int u;
      a_in[x] = '0; a_valid[x] = 0; c_in[x] = '0; b_in[x] = '0;
      // row x = k: a of operation i at x*D + i*K
      u = cyc - x * D;
      if (running && u >= 0 && u % K == 0 && u / K < NOPS) begin
        a_in[x] = DW'(A[(u / K) % NP][(u / K) / NP][x]);
        a_valid[x] = 1;
      end
      if (running && bsched[x].exists(cyc)) b_in[x] = DW'(bsched[x][cyc]);
    end
    if (running) begin
      for (int j = 0; j < N; j++) begin
        int u;
        bit ev;
        u = cyc - ((N - 1) * D + j * L + TMUL + D);
        ev = (u >= 0 && u % K == 0 && u / K < NOPS);
        check(c_valid[j] == ev, $sformatf("column %0d valid timing", j));
        if (ev) begin
          check(c_out[j] == AW'(C[(u / K) % NP][(u / K) / NP][j]),
                $sformatf("column %0d op %0d result", j, u / K));
          nres++;
        end
      end
    end
  end

  always @(posedge clk) if (running) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(posedge clk);
    #1 running = 1;
    wait (cyc == N * D + 2 * N * L + NOPS * K + TMUL + 10);
    @(negedge clk);
    check(nres == NOPS * N, $sformatf("result count %0d", nres));
    $display("b values through the chains %0d, results %0d", nchain, nres);
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
