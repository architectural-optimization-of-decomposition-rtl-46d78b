// tb_fx_div: checks the sequential divider against the golden model, and
// that 'done' arrives exactly WIDTH+FRAC+1 cycles after 'start'.
module tb_fx_div;
  import fx_ref_pkg::*;
  localparam int W = 20;
  localparam int F = 12;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  fx_div #(.WIDTH(W), .FRAC(F)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  always #5 clk = ~clk;

  task automatic check(longint av, longint bv);
    longint exp_v;
    int cyc;
    @(negedge clk);
    a = W'(av); b = W'(bv); start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_v = div(av, bv, W, F);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      $display("FAIL %0d / %0d : y=%0d exp=%0d", av, bv, y, exp_v);
    end
    checks++;
    if (cyc != W + F + 1) begin
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
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(1 <<< F, 3 <<< F);
    check(-(5 <<< F), 2 <<< F);
    check(7 <<< F, -(1 <<< (F - 2)));
    check(maxv(W), 1);          // overflow -> saturate
    check(minv(W), 1 <<< F);
    check(123, 0);              // divide by zero
    check(-123, 0);
    for (int n = 0; n < 300; n++) begin
      longint bv;
      bv = sx($urandom, W);
      if (bv == 0) bv = 1;
      check(sx($urandom, W), bv);
    end
    for (int n = 0; n < 300; n++) begin
      longint bv;
      bv = sx($urandom, 16);
      if (bv == 0) bv = 7;
      check(sx($urandom, 14), bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
