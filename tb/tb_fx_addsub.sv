// tb_fx_addsub: checks the saturating adder/subtractor against the golden
// model on random operands and on the overflow corners of both directions.
module tb_fx_addsub;
  import fx_ref_pkg::*;
  localparam int W = 20;

  logic signed [W-1:0] a, b, y;
  logic sub, sat_o;
  int checks = 0, failures = 0;

  fx_addsub #(.WIDTH(W)) dut (.a, .b, .sub, .y, .sat(sat_o));

  task automatic check(longint av, longint bv, bit s);
    longint exp_v, raw;
    a = W'(av); b = W'(bv); sub = s;
    #1;
    raw   = s ? av - bv : av + bv;
    exp_v = s ? fx_ref_pkg::sub(av, bv, W) : add(av, bv, W);
    checks++;
    if (longint'(y) != exp_v || sat_o != (raw != exp_v)) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0b y=%0d exp=%0d sat=%0b", av, bv, s, y, exp_v, sat_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(maxv(W), 1, 0);
    check(minv(W), 1, 1);
    check(minv(W), -1, 0);
    check(maxv(W), -1, 1);
    check(0, minv(W), 1);
    check(100, -300, 0);
    for (int n = 0; n < 2000; n++)
      check(sx($urandom, W), sx($urandom, W), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
