// tb_wils_array: a 4 x 4 WIL-S array with the CMOS interleaved timing
// (T_E = 2, T_FF = 1, T_FB = 3, K = 2, L = 1) computes two independent
// 4 x 4 products C_m = A_m x B_m interleaved: slot (m, k) enters PE (0,0)
// at k*4 + m*2 and is skewed here by i*L on row i and j*L on column j. Every
// PE output is compared each cycle: a valid sum must appear at
// slot + (i+j)*L + T_E + T_FF and nowhere else, with the partial sum of the
// product, and the final one (tag last) must equal c_ij of C_m computed
// here. Operands are random signed 16-bit values.
module tb_wils_array;
  import sa_pkg::*;
  localparam int N = 4, DW = 16, AW = 32, TE = 2, TFF = 1, TFB = 3, K = 2, L = 1;
  localparam int TLOOP = TFF + TFB, NOP = TLOOP / K, LAT = TE + TFF;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [DW-1:0] a_in [N], b_in [N];
  op_tag_t              tag_in [N];
  logic signed [AW-1:0] sum [N][N];
  op_tag_t              sum_tag [N][N];

  wils_array #(.ROWS(N), .COLS(N), .DW(DW), .AW(AW), .T_E(TE), .T_FF(TFF),
               .T_FB(TFB), .L(L)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nfinal = 0;
  bit running = 0;
  longint A [NOP][N][N], B [NOP][N][N], C [NOP][N][N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  // slot at unskewed time u: product m, step k
  function automatic bit slot_at(int u, output int m, output int k);
    m = 0; k = 0;
    if (u < 0 || u >= N * TLOOP) return 0;
    k = u / TLOOP;
    if ((u % TLOOP) % K != 0) return 0;
    m = (u % TLOOP) / K;
    return m < NOP;
  endfunction

  initial begin
    foreach (A[m, i, j]) begin
      A[m][i][j] = longint'($signed(DW'($urandom)));
      B[m][i][j] = longint'($signed(DW'($urandom)));
    end
    foreach (C[m, i, j]) begin
      C[m][i][j] = 0;
      for (int k = 0; k < N; k++) C[m][i][j] += A[m][i][k] * B[m][k][j];
    end
  end

  always @(negedge clk) begin
    int m, k;
    for (int i = 0; i < N; i++) begin
      a_in[i] = '0; tag_in[i] = '0; b_in[i] = '0;
      if (running && slot_at(cyc - i * L, m, k)) begin
        a_in[i] = DW'(A[m][i][k]);
        tag_in[i].valid = 1; tag_in[i].acc = (k != 0); tag_in[i].last = (k == N - 1);
      end
      if (running && slot_at(cyc - i * L, m, k)) b_in[i] = DW'(B[m][k][i]);
    end
    if (running) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        bit ev;
        ev = slot_at(cyc - (i + j) * L - LAT, m, k);
        check(sum_tag[i][j].valid == ev, $sformatf("PE %0d,%0d valid timing", i, j));
        if (ev) begin
          longint p;
          p = 0;
          for (int kk = 0; kk <= k; kk++) p += A[m][i][kk] * B[m][kk][j];
          check(sum[i][j] == AW'(p), $sformatf("PE %0d,%0d partial sum", i, j));
          check(sum_tag[i][j].last == (k == N - 1), "last tag");
          if (k == N - 1) begin
            check(sum[i][j] == AW'(C[m][i][j]), $sformatf("PE %0d,%0d c of product %0d", i, j, m));
            nfinal++;
          end
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
    wait (cyc == N * TLOOP + 2 * (N - 1) * L + LAT + 5);
    @(negedge clk);
    check(nfinal == NOP * N * N, $sformatf("final results %0d", nfinal));
    $display("interleaved products %0d, final results %0d", NOP, nfinal);
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
