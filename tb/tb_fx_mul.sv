// tb_fx_mul: checks the fixed-point multiplier (round half up, saturation)
// against the golden model on random, small and overflowing operands.
module tb_fx_mul;
  import fx_ref_pkg::*;
  localparam int W = 20;
  localparam int F = 12;

  logic signed [W-1:0] a, b, y;
  logic sat_o;
  int checks = 0, failures = 0;

  fx_mul #(.WIDTH(W), .FRAC(F)) dut (.a, .b, .y, .sat(sat_o));

  task automatic check(longint av, longint bv);
    longint exp_v;
    a = W'(av); b = W'(bv);
    #1;
    exp_v = mul(av, bv, W, F);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d exp=%0d", av, bv, y, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1 <<< F, 1 <<< F);            // 1.0 * 1.0
    check(-(1 <<< F), 3 <<< (F - 1));   // -1.0 * 1.5
    check(1, 1 <<< (F - 1));            // rounding of half an LSB
    check(-1, 1 <<< (F - 1));
    check(maxv(W), maxv(W));            // saturates high
    check(minv(W), maxv(W));            // saturates low
    for (int n = 0; n < 1000; n++) check(sx($urandom, W), sx($urandom, W));
    for (int n = 0; n < 1000; n++) check(sx($urandom, 15), sx($urandom, 15));
    // saturation flag on a known overflow
    a = W'(maxv(W)); b = W'(maxv(W)); #1;
    checks++;
    if (!sat_o) begin failures++; $display("FAIL sat flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
