// tb_decomp_top: end-to-end test of the whole design at its default sizes.
//
// The three engines run concurrently. Each round loads a fresh random
// problem into every engine, starts all three, and checks every result word
// against golden fixed-point models (MGS + back-substitution for the AWC
// engine, Doolittle LU, Cholesky), plus the residuals A*x - b, L*U - A and
// G*G^T - A in real arithmetic. A last round feeds each engine a matrix that
// overflows the number range and checks its saturation flag.
// Counted mechanisms, each of which must occur: QR decompositions, back-
// substitutions (weights produced), LU decompositions, Cholesky
// decompositions, concurrent operation of all three engines, saturation
// reported by each engine.
module tb_decomp_top;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int M = DEF_N;
  localparam int N = DEF_N;
  localparam int NC = N + 1;

  logic clk = 0, rst_n = 0;
  logic awc_load_we = 0, awc_start = 0, awc_busy, awc_done, awc_ovf, awc_rd_sel = 1;
  logic [1:0] awc_load_row = '0, awc_rd_row = '0;
  logic [2:0] awc_load_col = '0, awc_rd_col = '0;
  logic signed [W-1:0] awc_load_data = '0, awc_rd_data;
  logic signed [W-1:0] awc_x [N];
  logic lu_load_we = 0, lu_start = 0, lu_busy, lu_done, lu_ovf;
  logic [1:0] lu_load_row = '0, lu_load_col = '0, lu_rd_row = '0, lu_rd_col = '0;
  logic signed [W-1:0] lu_load_data = '0, lu_rd_data;
  logic ch_load_we = 0, ch_start = 0, ch_busy, ch_done, ch_ovf;
  logic [1:0] ch_load_row = '0, ch_load_col = '0, ch_rd_row = '0, ch_rd_col = '0;
  logic signed [W-1:0] ch_load_data = '0, ch_rd_data;

  int checks = 0, failures = 0;
  int n_qr = 0, n_bs = 0, n_lu = 0, n_ch = 0, n_overlap = 0;
  int n_sat_awc = 0, n_sat_lu = 0, n_sat_ch = 0;

  decomp_top dut (.*);

  always #5 clk = ~clk;

  // all three busy in the same cycle
  always @(posedge clk) if (awc_busy && lu_busy && ch_busy) n_overlap++;

  longint QA[M][NC], QX[M][NC], QR[N][NC], XS[N];
  longint LA[N][N], LG[N][N];
  longint CA[N][N], CG[N][N];

  task automatic check_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, exp_v);
    end
  endtask

  // ------------------------------------------------------------ golden models
  task automatic golden_awc();
    longint acc, s;
    QX = QA;
    foreach (QR[r, c]) QR[r][c] = 0;
    for (int i = 0; i < N; i++) begin
      acc = 0;
      for (int k = 0; k < M; k++) acc = add(acc, mul(QX[k][i], QX[k][i], W, F), W);
      QR[i][i] = fx_ref_pkg::sqrt(acc, W, F);
      for (int k = 0; k < M; k++) QX[k][i] = div(QX[k][i], QR[i][i], W, F);
      for (int j = i + 1; j < NC; j++) begin
        acc = 0;
        for (int k = 0; k < M; k++) acc = add(acc, mul(QX[k][i], QX[k][j], W, F), W);
        QR[i][j] = acc;
        for (int k = 0; k < M; k++) QX[k][j] = fx_ref_pkg::sub(QX[k][j], mul(QX[k][i], QR[i][j], W, F), W);
      end
    end
    for (int i = N - 1; i >= 0; i--) begin
      s = QR[i][N];
      for (int j = i + 1; j < N; j++) s = fx_ref_pkg::sub(s, mul(QR[i][j], XS[j], W, F), W);
      XS[i] = div(s, QR[i][i], W, F);
    end
  endtask

  task automatic golden_lu();
    LG = LA;
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < j; k++)
        for (int i = k + 1; i < N; i++)
          LG[i][j] = fx_ref_pkg::sub(LG[i][j], mul(LG[i][k], LG[k][j], W, F), W);
      for (int i = j + 1; i < N; i++) LG[i][j] = div(LG[i][j], LG[j][j], W, F);
    end
  endtask

  task automatic golden_ch();
    CG = CA;
    for (int k = 0; k < N; k++) begin
      CG[k][k] = fx_ref_pkg::sqrt(CG[k][k], W, F);
      for (int i = k + 1; i < N; i++) CG[i][k] = div(CG[i][k], CG[k][k], W, F);
      for (int j = k + 1; j < N; j++)
        for (int t = j; t < N; t++)
          CG[t][j] = fx_ref_pkg::sub(CG[t][j], mul(CG[t][k], CG[j][k], W, F), W);
    end
    for (int r = 0; r < N; r++)
      for (int c = r + 1; c < N; c++) CG[r][c] = 0;
  endtask

  // ------------------------------------------------------------ engine drivers
  task automatic run_awc(bit expect_sat);
    real s, err;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        awc_load_we = 1; awc_load_row = 2'(r); awc_load_col = 3'(c); awc_load_data = W'(QA[r][c]);
      end
    @(negedge clk);
    awc_load_we = 0; awc_start = 1;
    @(negedge clk);
    awc_start = 0;
    while (!awc_done) @(negedge clk);
    n_qr++;
    n_bs++;
    if (awc_ovf) n_sat_awc++;
    checks++;
    if (awc_ovf != expect_sat) begin failures++; $display("FAIL awc ovf=%0b", awc_ovf); end
    if (expect_sat) return;
    golden_awc();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < NC; c++) begin
        awc_rd_sel = 1; awc_rd_row = 2'(r); awc_rd_col = 3'(c); #1;
        check_eq($sformatf("R[%0d][%0d]", r, c), longint'(awc_rd_data), QR[r][c]);
      end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        awc_rd_sel = 0; awc_rd_row = 2'(r); awc_rd_col = 3'(c); #1;
        check_eq($sformatf("Q[%0d][%0d]", r, c), longint'(awc_rd_data), QX[r][c]);
      end
    for (int i = 0; i < N; i++) check_eq($sformatf("x[%0d]", i), longint'(awc_x[i]), XS[i]);
    err = 0.0;
    for (int r = 0; r < M; r++) begin
      s = -to_real(QA[r][N], F);
      for (int c = 0; c < N; c++) s += to_real(QA[r][c], F) * to_real(awc_x[c], F);
      if (s < 0) s = -s;
      if (s > err) err = s;
    end
    checks++;
    if (err > 0.05) begin failures++; $display("FAIL |Ax-b| = %f", err); end
  endtask

  task automatic run_lu(bit expect_sat);
    real s, err, l, u;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        lu_load_we = 1; lu_load_row = 2'(r); lu_load_col = 2'(c); lu_load_data = W'(LA[r][c]);
      end
    @(negedge clk);
    lu_load_we = 0; lu_start = 1;
    @(negedge clk);
    lu_start = 0;
    while (!lu_done) @(negedge clk);
    n_lu++;
    if (lu_ovf) n_sat_lu++;
    checks++;
    if (lu_ovf != expect_sat) begin failures++; $display("FAIL lu ovf=%0b", lu_ovf); end
    if (expect_sat) return;
    golden_lu();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        lu_rd_row = 2'(r); lu_rd_col = 2'(c); #1;
        check_eq($sformatf("LU[%0d][%0d]", r, c), longint'(lu_rd_data), LG[r][c]);
      end
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = -to_real(LA[r][c], F);
        for (int k = 0; k < N; k++) begin
          l = (k > r) ? 0.0 : (k == r) ? 1.0 : to_real(LG[r][k], F);
          u = (k > c) ? 0.0 : to_real(LG[k][c], F);
          s += l * u;
        end
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin failures++; $display("FAIL |LU-A| = %f", err); end
  endtask

  task automatic run_ch(bit expect_sat);
    real s, err;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        ch_load_we = 1; ch_load_row = 2'(r); ch_load_col = 2'(c); ch_load_data = W'(CA[r][c]);
      end
    @(negedge clk);
    ch_load_we = 0; ch_start = 1;
    @(negedge clk);
    ch_start = 0;
    while (!ch_done) @(negedge clk);
    n_ch++;
    if (ch_ovf) n_sat_ch++;
    checks++;
    if (ch_ovf != expect_sat) begin failures++; $display("FAIL chol ovf=%0b", ch_ovf); end
    if (expect_sat) return;
    golden_ch();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ch_rd_row = 2'(r); ch_rd_col = 2'(c); #1;
        check_eq($sformatf("G[%0d][%0d]", r, c), longint'(ch_rd_data), CG[r][c]);
      end
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = -to_real(CA[r][c], F);
        for (int k = 0; k < N; k++) s += to_real(CG[r][k], F) * to_real(CG[c][k], F);
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin failures++; $display("FAIL |GG'-A| = %f", err); end
  endtask

  // ------------------------------------------------------------ problems
  task automatic make_problems();
    real b[N][N], s;
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N; c++)
        QA[r][c] = from_real(((r == c) ? 2.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
      QA[r][N] = from_real(rnd_real(-2.0, 2.0), W, F);
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        LA[r][c] = from_real(((r == c) ? 4.0 : 0.0) + rnd_real(-1.0, 1.0), W, F);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) b[r][c] = rnd_real(-1.0, 1.0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = (r == c) ? 2.0 : 0.0;
        for (int k = 0; k < N; k++) s += b[r][k] * b[c][k];
        CA[r][c] = from_real(s, W, F);
      end
  endtask

  // matrices whose intermediate values exceed the 20-bit range
  task automatic make_overflow_problems();
    for (int r = 0; r < M; r++)
      for (int c = 0; c < NC; c++) QA[r][c] = from_real((c == 0) ? 100.0 : ((r == c) ? 1.0 : 0.0), W, F);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) LA[r][c] = from_real((r == c) ? 0.01 : 100.0, W, F);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) CA[r][c] = from_real((r == c) ? 0.01 : 100.0, W, F);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      make_problems();
      fork
        run_awc(1'b0);
        run_lu(1'b0);
        run_ch(1'b0);
      join
    end
    make_overflow_problems();
    fork
      run_awc(1'b1);
      run_lu(1'b1);
      run_ch(1'b1);
    join
    $display("mechanisms: qr=%0d back_subst=%0d lu=%0d chol=%0d overlap_cycles=%0d sat_awc=%0d sat_lu=%0d sat_chol=%0d",
             n_qr, n_bs, n_lu, n_ch, n_overlap, n_sat_awc, n_sat_lu, n_sat_ch);
    checks++; if (n_qr == 0)      begin failures++; $display("FAIL no QR run"); end
    checks++; if (n_bs == 0)      begin failures++; $display("FAIL no back-substitution"); end
    checks++; if (n_lu == 0)      begin failures++; $display("FAIL no LU run"); end
    checks++; if (n_ch == 0)      begin failures++; $display("FAIL no Cholesky run"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL engines never ran concurrently"); end
    checks++; if (n_sat_awc == 0) begin failures++; $display("FAIL AWC saturation never seen"); end
    checks++; if (n_sat_lu == 0)  begin failures++; $display("FAIL LU saturation never seen"); end
    checks++; if (n_sat_ch == 0)  begin failures++; $display("FAIL Cholesky saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
