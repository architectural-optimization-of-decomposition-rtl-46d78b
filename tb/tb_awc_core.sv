// tb_awc_core: runs the adaptive weight calculation on random 4x4 systems
// A x = b and checks
//  - R and c = Q^T b (read back through the core's port) and the weights x
//    against a golden model (MGS on [A | b], then back-substitution), bit
//    for bit,
//  - that A*x reproduces b within a tolerance (real arithmetic),
//  - the cycle count from start to done against the schedule's formula,
//  - that a matrix whose column norm overflows raises the saturation flag.
module tb_awc_core;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int M = DEF_N;
  localparam int N = DEF_N;
  localparam int NC = N + 1;
  localparam int HW = (W + F + 1) / 2;
  localparam int DW = W + F;
  parameter int NDIV = 1;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0, busy, done, ovf;
  logic [1:0] load_row, rd_row;
  logic [2:0] load_col, rd_col;
  logic signed [W-1:0] load_data, rd_data;
  logic signed [W-1:0] x_out [N];
  qr_sel_e rd_sel;
  int checks = 0, failures = 0;

  awc_core #(.NDIV(NDIV)) dut (.*);

  always #5 clk = ~clk;

  longint A[M][NC], X[M][NC], R[N][NC], XS[N];

  task automatic golden();
    longint acc, s;
    X = A;
    foreach (R[r, c]) R[r][c] = 0;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int k = 0; k < M; k++) acc = add(acc, mul(X[k][i], X[k][i], W, F), W);
      R[i][i] = fx_ref_pkg::sqrt(acc, W, F);
      for (int k = 0; k < M; k++) X[k][i] = div(X[k][i], R[i][i], W, F);
      for (int j = i + 1; j < NC; j++) begin
        acc = 0;
        for (int k = 0; k < M; k++) acc = add(acc, mul(X[k][i], X[k][j], W, F), W);
        R[i][j] = acc;
        for (int k = 0; k < M; k++) X[k][j] = fx_ref_pkg::sub(X[k][j], mul(X[k][i], R[i][j], W, F), W);
      end
    end
    for (int i = N - 1; i >= 0; i--) begin
      s = R[i][N];
      for (int j = i + 1; j < N; j++) s = fx_ref_pkg::sub(s, mul(R[i][j], XS[j], W, F), W);
      XS[i] = div(s, R[i][i], W, F);
    end
  endtask

  function automatic int expected_cycles();
    int cq = 1, cb = 1;
    for (int i = 0; i < N; i++)
      cq += (M + 2) + (HW + 2) + div_phase(M, NDIV, DW + 1) + (NC - 1 - i) * ((M + 2) + M);
    for (int i = 0; i < N; i++) cb += 1 + (N - 1 - i) + DW + 2;
    return cq + cb + 2;
  endfunction

  task automatic load_and_run(output int cyc);
    for (int r = 0; r < M; r++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        load_we = 1; load_row = 2'(r); load_col = 3'(c); load_data = W'(A[r][c]);
      end
    @(negedge clk);
    load_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic run_one(int t);
    int cyc;
    real s, err;
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N; c++)
        A[r][c] = from_real(((r == c) ? 2.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
      A[r][N] = from_real(rnd_real(-2.0, 2.0), W, F);
    end
    golden();
    load_and_run(cyc);
    checks++;
    if (cyc != expected_cycles()) begin
      failures++;
      $display("FAIL test %0d: %0d cycles, expected %0d", t, cyc, expected_cycles());
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < NC; c++) begin
        rd_sel = SEL_R; rd_row = 2'(r); rd_col = 3'(c); #1;
        checks++;
        if (longint'(rd_data) != R[r][c]) begin
          failures++;
          $display("FAIL test %0d R[%0d][%0d] = %0d, expected %0d", t, r, c, rd_data, R[r][c]);
        end
      end
    err = 0.0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (longint'(x_out[i]) != XS[i]) begin
        failures++;
        $display("FAIL test %0d x[%0d] = %0d, expected %0d", t, i, x_out[i], XS[i]);
      end
    end
    for (int r = 0; r < M; r++) begin
      s = -to_real(A[r][N], F);
      for (int c = 0; c < N; c++) s += to_real(A[r][c], F) * to_real(x_out[c], F);
      if (s < 0) s = -s;
      if (s > err) err = s;
    end
    checks++;
    if (err > 0.05) begin
      failures++;
      $display("FAIL test %0d: max |Ax-b| = %f", t, err);
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
    int cyc;
    load_row = '0; load_col = '0; load_data = '0; rd_row = '0; rd_col = '0; rd_sel = SEL_R;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 15; t++) run_one(t);
    // a column of norm^2 beyond the number range must flag saturation
    for (int r = 0; r < M; r++)
      for (int c = 0; c < NC; c++) A[r][c] = (c == 0) ? from_real(100.0, W, F) : from_real((r == c) ? 1.0 : 0.0, W, F);
    load_and_run(cyc);
    checks++;
    if (!ovf) begin failures++; $display("FAIL saturation not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
