// tb_chol_core: decomposes random symmetric positive definite 4x4 matrices
// (B*B^T + 2I) and checks
//  - every entry of G against a golden Cholesky model in fixed point (same
//    operation order and rounding), bit for bit, with zeros above the
//    diagonal,
//  - that G*G^T reproduces A within a small tolerance (real arithmetic),
//  - the cycle count from start to done against the schedule's formula.
module tb_chol_core;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int N = DEF_N;
  localparam int HW = (W + F + 1) / 2;
  localparam int DW = W + F;
  parameter int NDIV = 1;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0, busy, done, ovf;
  logic [1:0] load_row, rd_row, load_col, rd_col;
  logic signed [W-1:0] load_data, rd_data;
  int checks = 0, failures = 0;

  chol_core #(.NDIV(NDIV)) dut (.*);

  always #5 clk = ~clk;

  longint A[N][N], G[N][N];

  task automatic golden();
    G = A;
    for (int k = 0; k < N; k++) begin
      G[k][k] = fx_ref_pkg::sqrt(G[k][k], W, F);
      for (int i = k + 1; i < N; i++) G[i][k] = div(G[i][k], G[k][k], W, F);
      for (int j = k + 1; j < N; j++)
        for (int t = j; t < N; t++)
          G[t][j] = fx_ref_pkg::sub(G[t][j], mul(G[t][k], G[j][k], W, F), W);
    end
    for (int r = 0; r < N; r++)
      for (int c = r + 1; c < N; c++) G[r][c] = 0;
  endtask

  function automatic int expected_cycles();
    int c = 1;
    for (int k = 0; k < N; k++) begin
      c += HW + 2;
      c += div_phase(N - 1 - k, NDIV, DW + 1);
      for (int j = k + 1; j < N; j++) c += 1 + (N - j);
    end
    return c;
  endfunction

  task automatic run_one(int t);
    int cyc;
    real b[N][N], s, err;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) b[r][c] = rnd_real(-1.0, 1.0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = (r == c) ? 2.0 : 0.0;
        for (int k = 0; k < N; k++) s += b[r][k] * b[c][k];
        A[r][c] = from_real(s, W, F);
      end
    golden();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        load_we = 1; load_row = 2'(r); load_col = 2'(c); load_data = W'(A[r][c]);
      end
    @(negedge clk);
    load_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != expected_cycles()) begin
      failures++;
      $display("FAIL test %0d: %0d cycles, expected %0d", t, cyc, expected_cycles());
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        rd_row = 2'(r); rd_col = 2'(c); #1;
        checks++;
        if (longint'(rd_data) != G[r][c]) begin
          failures++;
          $display("FAIL test %0d G[%0d][%0d] = %0d, expected %0d", t, r, c, rd_data, G[r][c]);
        end
      end
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = 0.0;
        for (int k = 0; k < N; k++) s += to_real(G[r][k], F) * to_real(G[c][k], F);
        s -= to_real(A[r][c], F);
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin
      failures++;
      $display("FAIL test %0d: max |GG'-A| = %f", t, err);
    end
    checks++;
    if (ovf) begin failures++; $display("FAIL test %0d: unexpected saturation", t); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_row = '0; load_col = '0; load_data = '0; rd_row = '0; rd_col = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) run_one(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
