// tb_qr_mgs_core: decomposes random well-conditioned 4x4 matrices and checks
//  - every entry of Q and R against a golden modified Gram-Schmidt model in
//    fixed point (same operation order and rounding), bit for bit,
//  - zeros below the diagonal of R,
//  - that Q*R reproduces A within a small tolerance (real arithmetic),
//  - the cycle count from start to done against the schedule's formula.
module tb_qr_mgs_core;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int M = DEF_N;
  localparam int N = DEF_N;
  localparam int HW = (W + F + 1) / 2;
  localparam int DW = W + F;
  parameter int NDIV = 1;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0, busy, done, ovf;
  logic [1:0] load_row, rd_row, load_col, rd_col;
  logic signed [W-1:0] load_data, rd_data;
  qr_sel_e rd_sel;
  int checks = 0, failures = 0;

  qr_mgs_core #(.NDIV(NDIV)) dut (.*);

  always #5 clk = ~clk;

  longint A[M][N], X[M][N], Q[M][N], R[N][N];

  // golden model
  task automatic golden();
    longint acc;
    X = A;
    foreach (R[r, c]) R[r][c] = 0;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int k = 0; k < M; k++) acc = add(acc, mul(X[k][i], X[k][i], W, F), W);
      R[i][i] = fx_ref_pkg::sqrt(acc, W, F);
      for (int k = 0; k < M; k++) X[k][i] = div(X[k][i], R[i][i], W, F);
      for (int j = i + 1; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < M; k++) acc = add(acc, mul(X[k][i], X[k][j], W, F), W);
        R[i][j] = acc;
        for (int k = 0; k < M; k++) X[k][j] = fx_ref_pkg::sub(X[k][j], mul(X[k][i], R[i][j], W, F), W);
      end
    end
    Q = X;
  endtask

  function automatic int expected_cycles();
    int c = 1;
    for (int i = 0; i < N; i++)
      c += (M + 2) + (HW + 2) + div_phase(M, NDIV, DW + 1) + (N - 1 - i) * ((M + 2) + M);
    return c;
  endfunction

  task automatic run_one(int t);
    int cyc;
    real err, s;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        A[r][c] = from_real(((r == c) ? 2.0 : 0.0) + rnd_real(-1.4, 1.4), W, F);
    golden();
    for (int r = 0; r < M; r++)
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
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        rd_sel = SEL_Q; rd_row = 2'(r); rd_col = 2'(c); #1;
        checks++;
        if (longint'(rd_data) != Q[r][c]) begin
          failures++;
          $display("FAIL test %0d Q[%0d][%0d] = %0d, expected %0d", t, r, c, rd_data, Q[r][c]);
        end
        rd_sel = SEL_R; #1;
        checks++;
        if (longint'(rd_data) != R[r][c]) begin
          failures++;
          $display("FAIL test %0d R[%0d][%0d] = %0d, expected %0d", t, r, c, rd_data, R[r][c]);
        end
      end
    // Q*R against A, in real arithmetic on the golden words
    err = 0.0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        s = 0.0;
        for (int k = 0; k < N; k++) s += to_real(Q[r][k], F) * to_real(R[k][c], F);
        s -= to_real(A[r][c], F);
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.02) begin
      failures++;
      $display("FAIL test %0d: max |QR-A| = %f", t, err);
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
    load_row = '0; load_col = '0; load_data = '0; rd_row = '0; rd_col = '0; rd_sel = SEL_R;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) run_one(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
