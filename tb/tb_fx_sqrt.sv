// tb_fx_sqrt: checks the sequential square root against the golden model
// (bisection), including negative inputs and the largest input, and that
// 'done' arrives (WIDTH+FRAC rounded up to even)/2 + 1 cycles after 'start'.
module tb_fx_sqrt;
  import fx_ref_pkg::*;
  localparam int W = 20;
  localparam int F = 12;
  localparam int LAT = ((W + F + 1) / 2) + 1;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [W-1:0] a, y;
  int checks = 0, failures = 0;

  fx_sqrt #(.WIDTH(W), .FRAC(F)) dut (.clk, .rst_n, .start, .a, .busy, .done, .y);

  always #5 clk = ~clk;

  task automatic check(longint av);
    longint exp_v;
    int cyc;
    @(negedge clk);
    a = W'(av); start = 1;
    @(negedge clk);
    start = 0;
    a = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_v = fx_ref_pkg::sqrt(av, W, F);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      $display("FAIL sqrt(%0d) : y=%0d exp=%0d", av, y, exp_v);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(4 <<< F);             // sqrt(4) = 2
    check(2 <<< F);
    check(1);
    check(0);
    check(-(3 <<< F));          // negative -> 0
    check(maxv(W));
    for (int n = 0; n < 500; n++) check(longint'($urandom_range(0, 32'(maxv(W)))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
