// tb_lu_core: decomposes random diagonally dominant 4x4 matrices and checks
//  - every entry of the in-place L\U result against a golden Doolittle model
//    in fixed point (standard k-ordered updates, same rounding), bit for bit,
//  - that L*U reproduces A within a small tolerance (real arithmetic),
//  - the cycle count from start to done against the schedule's formula.
module tb_lu_core;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int N = DEF_N;
  localparam int DW = W + F;
  parameter int NDIV = 1;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0, busy, done, ovf;
  logic [1:0] load_row, rd_row, load_col, rd_col;
  logic signed [W-1:0] load_data, rd_data;
  int checks = 0, failures = 0;

  lu_core #(.NDIV(NDIV)) dut (.*);

  always #5 clk = ~clk;

  longint A[N][N], G[N][N];

  task automatic golden();
    G = A;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < j; k++)
        for (int i = k + 1; i < N; i++)
          G[i][j] = fx_ref_pkg::sub(G[i][j], mul(G[i][k], G[k][j], W, F), W);
      for (int i = j + 1; i < N; i++) G[i][j] = div(G[i][j], G[j][j], W, F);
    end
  endtask

  function automatic int expected_cycles();
    int c = 1;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < j; k++) c += 2 + ((j - 1 - k > 0) ? j - 1 - k : 0);
      c += 1;
      for (int k = 0; k < j; k++) c += 2 + (N - j);
      c += 2;
      c += div_phase(N - 1 - j, NDIV, DW + 1);
    end
    return c;
  endfunction

  task automatic run_one(int t);
    int cyc;
    real err, s, l, u;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        A[r][c] = from_real(((r == c) ? 4.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
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
          $display("FAIL test %0d LU[%0d][%0d] = %0d, expected %0d", t, r, c, rd_data, G[r][c]);
        end
      end
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = 0.0;
        for (int k = 0; k < N; k++) begin
          l = (k > r) ? 0.0 : (k == r) ? 1.0 : to_real(G[r][k], F);
          u = (k > c) ? 0.0 : to_real(G[k][c], F);
          s += l * u;
        end
        s -= to_real(A[r][c], F);
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin
      failures++;
      $display("FAIL test %0d: max |LU-A| = %f", t, err);
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
