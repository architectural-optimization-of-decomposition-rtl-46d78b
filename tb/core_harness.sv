// core_harness: runs the QR, LU and Cholesky cores at one word format
// (W bits, F fractional), one matrix size N and NDIV dividers per core on NT
// random problems each, compares every result word with the golden
// fixed-point models and every run's cycle count with the schedule's
// formula; the last cycle count of each core is left on qr_cycles,
// lu_cycles and ch_cycles. Reports its counts on
// 'checks'/'failures' and raises 'finished' when all runs are over.
module core_harness #(
  parameter int W  = 20,
  parameter int F  = 12,
  parameter int N  = 4,
  parameter int NT = 5,
  parameter int NDIV = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished,
  output int   qr_cycles,
  output int   lu_cycles,
  output int   ch_cycles
);
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int AB = (N > 1) ? $clog2(N) : 1;
  localparam int HW = (W + F + 1) / 2;
  localparam int DL = W + F + 1;

  // start-to-done cycles of each schedule (see the cores' headers)
  function automatic int exp_qr();
    int c = 1;
    for (int i = 0; i < N; i++)
      c += (N + 2) + (HW + 2) + div_phase(N, NDIV, DL) + (N - 1 - i) * ((N + 2) + N);
    return c;
  endfunction
  function automatic int exp_lu();
    int c = 1;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < j; k++) c += 2 + ((j - 1 - k > 0) ? j - 1 - k : 0);
      c += 1;
      for (int k = 0; k < j; k++) c += 2 + (N - j);
      c += 2 + div_phase(N - 1 - j, NDIV, DL);
    end
    return c;
  endfunction
  function automatic int exp_ch();
    int c = 1;
    for (int k = 0; k < N; k++) begin
      c += HW + 2 + div_phase(N - 1 - k, NDIV, DL);
      for (int j = k + 1; j < N; j++) c += 1 + (N - j);
    end
    return c;
  endfunction

  logic q_we = 0, q_start = 0, q_busy, q_done, q_ovf;
  logic l_we = 0, l_start = 0, l_busy, l_done, l_ovf;
  logic c_we = 0, c_start = 0, c_busy, c_done, c_ovf;
  logic [AB-1:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  logic signed [W-1:0] wr_data = '0, q_rd, l_rd, c_rd;
  qr_sel_e q_sel = SEL_R;

  qr_mgs_core #(.WIDTH(W), .FRAC(F), .M(N), .N(N), .NDIV(NDIV)) u_qr (
    .clk, .rst_n, .load_we(q_we), .load_row(wr_row), .load_col(wr_col), .load_data(wr_data),
    .start(q_start), .busy(q_busy), .done(q_done), .ovf(q_ovf),
    .rd_sel(q_sel), .rd_row, .rd_col, .rd_data(q_rd));
  lu_core #(.WIDTH(W), .FRAC(F), .N(N), .NDIV(NDIV)) u_lu (
    .clk, .rst_n, .load_we(l_we), .load_row(wr_row), .load_col(wr_col), .load_data(wr_data),
    .start(l_start), .busy(l_busy), .done(l_done), .ovf(l_ovf),
    .rd_row, .rd_col, .rd_data(l_rd));
  chol_core #(.WIDTH(W), .FRAC(F), .N(N), .NDIV(NDIV)) u_ch (
    .clk, .rst_n, .load_we(c_we), .load_row(wr_row), .load_col(wr_col), .load_data(wr_data),
    .start(c_start), .busy(c_busy), .done(c_done), .ovf(c_ovf),
    .rd_row, .rd_col, .rd_data(c_rd));

  longint A[N][N], G[N][N], Q[N][N], R[N][N];

  task automatic check_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL W=%0d N=%0d %s = %0d, expected %0d", W, N, what, got, exp_v);
    end
  endtask

  // which: 0 QR, 1 LU, 2 Cholesky
  task automatic load_run(int which);
    int cyc, exp_c;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        wr_row = AB'(r); wr_col = AB'(c); wr_data = W'(A[r][c]);
        q_we = (which == 0); l_we = (which == 1); c_we = (which == 2);
      end
    @(negedge clk);
    q_we = 0; l_we = 0; c_we = 0;
    q_start = (which == 0); l_start = (which == 1); c_start = (which == 2);
    @(negedge clk);
    q_start = 0; l_start = 0; c_start = 0;
    cyc = 1;
    while (!(q_done || l_done || c_done)) begin @(negedge clk); cyc++; end
    exp_c = (which == 0) ? exp_qr() : (which == 1) ? exp_lu() : exp_ch();
    check_eq((which == 0) ? "QR cycles" : (which == 1) ? "LU cycles" : "Cholesky cycles", cyc, exp_c);
    if (which == 0) qr_cycles = cyc;
    else if (which == 1) lu_cycles = cyc;
    else ch_cycles = cyc;
  endtask

  task automatic do_qr();
    longint acc;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) A[r][c] = from_real(((r == c) ? 2.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
    Q = A;
    foreach (R[r, c]) R[r][c] = 0;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int k = 0; k < N; k++) acc = add(acc, mul(Q[k][i], Q[k][i], W, F), W);
      R[i][i] = fx_ref_pkg::sqrt(acc, W, F);
      for (int k = 0; k < N; k++) Q[k][i] = div(Q[k][i], R[i][i], W, F);
      for (int j = i + 1; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < N; k++) acc = add(acc, mul(Q[k][i], Q[k][j], W, F), W);
        R[i][j] = acc;
        for (int k = 0; k < N; k++) Q[k][j] = fx_ref_pkg::sub(Q[k][j], mul(Q[k][i], R[i][j], W, F), W);
      end
    end
    load_run(0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        rd_row = AB'(r); rd_col = AB'(c);
        q_sel = SEL_Q; #1; check_eq("Q", longint'(q_rd), Q[r][c]);
        q_sel = SEL_R; #1; check_eq("R", longint'(q_rd), R[r][c]);
      end
  endtask

  task automatic do_lu();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) A[r][c] = from_real(((r == c) ? 4.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
    G = A;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < j; k++)
        for (int i = k + 1; i < N; i++) G[i][j] = fx_ref_pkg::sub(G[i][j], mul(G[i][k], G[k][j], W, F), W);
      for (int i = j + 1; i < N; i++) G[i][j] = div(G[i][j], G[j][j], W, F);
    end
    load_run(1);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        rd_row = AB'(r); rd_col = AB'(c); #1; check_eq("LU", longint'(l_rd), G[r][c]);
      end
  endtask

  task automatic do_ch();
    real b[N][N], s;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) b[r][c] = rnd_real(-1.0, 1.0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = (r == c) ? 2.0 : 0.0;
        for (int k = 0; k < N; k++) s += b[r][k] * b[c][k];
        A[r][c] = from_real(s, W, F);
      end
    G = A;
    for (int k = 0; k < N; k++) begin
      G[k][k] = fx_ref_pkg::sqrt(G[k][k], W, F);
      for (int i = k + 1; i < N; i++) G[i][k] = div(G[i][k], G[k][k], W, F);
      for (int j = k + 1; j < N; j++)
        for (int t = j; t < N; t++) G[t][j] = fx_ref_pkg::sub(G[t][j], mul(G[t][k], G[j][k], W, F), W);
    end
    for (int r = 0; r < N; r++)
      for (int c = r + 1; c < N; c++) G[r][c] = 0;
    load_run(2);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        rd_row = AB'(r); rd_col = AB'(c); #1; check_eq("G", longint'(c_rd), G[r][c]);
      end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    for (int t = 0; t < NT; t++) begin
      do_qr();
      do_lu();
      do_ch();
    end
    finished = 1'b1;
  end
endmodule
