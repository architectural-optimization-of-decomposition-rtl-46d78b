// tb_back_subst: solves R x = c for random upper-triangular 4x4 systems held
// in a testbench array that answers the unit's read port, and checks
//  - every x[i] against a golden fixed-point back-substitution, bit for bit,
//  - that R*x reproduces c within a small tolerance (real arithmetic),
//  - the cycle count from start to done against the schedule's formula.
module tb_back_subst;
  import fx_ref_pkg::*;
  import decomp_pkg::*;
  localparam int W = DEF_WIDTH;
  localparam int F = DEF_FRAC;
  localparam int N = DEF_N;
  localparam int DW = W + F;

  logic clk = 0, rst_n = 0, start = 0, busy, done, ovf;
  logic [1:0] r_row;
  logic [2:0] r_col;
  logic signed [W-1:0] r_data;
  logic signed [W-1:0] x_out [N];
  int checks = 0, failures = 0;

  back_subst dut (.*);

  always #5 clk = ~clk;

  longint RC[N][N+1], X[N];

  // memory model answering the read port: [R | c]
  always_comb r_data = W'(RC[r_row][r_col]);

  task automatic golden();
    longint s;
    for (int i = N - 1; i >= 0; i--) begin
      s = RC[i][N];
      for (int j = i + 1; j < N; j++) s = fx_ref_pkg::sub(s, mul(RC[i][j], X[j], W, F), W);
      X[i] = div(s, RC[i][i], W, F);
    end
  endtask

  function automatic int expected_cycles();
    int c = 1;
    for (int i = 0; i < N; i++) c += 1 + (N - 1 - i) + DW + 2;
    return c;
  endfunction

  task automatic run_one(int t);
    int cyc;
    real s, err;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++)
        RC[r][c] = (c < r) ? 0 : (c == r) ? from_real(rnd_real(1.0, 2.0), W, F)
                                          : from_real(rnd_real(-1.0, 1.0), W, F);
      RC[r][N] = from_real(rnd_real(-2.0, 2.0), W, F);
    end
    golden();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != expected_cycles()) begin
      failures++;
      $display("FAIL test %0d: %0d cycles, expected %0d", t, cyc, expected_cycles());
    end
    err = 0.0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (longint'(x_out[i]) != X[i]) begin
        failures++;
        $display("FAIL test %0d x[%0d] = %0d, expected %0d", t, i, x_out[i], X[i]);
      end
      s = -to_real(RC[i][N], F);
      for (int j = i; j < N; j++) s += to_real(RC[i][j], F) * to_real(x_out[j], F);
      if (s < 0) s = -s;
      if (s > err) err = s;
    end
    checks++;
    if (err > 0.02) begin
      failures++;
      $display("FAIL test %0d: max |Rx-c| = %f", t, err);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (RC[r, c]) RC[r][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) run_one(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
