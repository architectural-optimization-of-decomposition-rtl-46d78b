// tb_div_units: the 4x4 QR, LU and Cholesky cores at the default 20-bit word
// with 1, 2 and 4 dividers per core (sequential versus overlapped column
// divisions), and the 8x8 cores with 8 dividers. Every result word is checked
// against the golden models and every run's cycle count against the
// schedule's formula; the testbench also checks that more dividers never cost
// cycles and that two dividers already save cycles on every core, and that
// the ordering reported for the published sequential and parallel runs holds
// for 4x4 at every divider count: QR takes the most cycles, and Cholesky more
// than LU (its square roots). At 8x8 only QR being slowest is required: with
// one multiplier per engine, LU's larger number of updates outweighs
// Cholesky's square roots once the divisions overlap (the published parallel
// runs also replicate multipliers, which is not built here). It prints the
// cycle counts side by side.
module tb_div_units;
  logic clk = 0, rst_n = 0;
  int c1, f1, c2, f2, c4, f4, c8, f8;
  int q1, l1, h1, q2, l2, h2, q4, l4, h4, q8, l8, h8;
  logic d1, d2, d4, d8;
  int checks, failures;

  core_harness #(.NDIV(1), .NT(3)) u1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1),
                                       .qr_cycles(q1), .lu_cycles(l1), .ch_cycles(h1));
  core_harness #(.NDIV(2), .NT(3)) u2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2),
                                       .qr_cycles(q2), .lu_cycles(l2), .ch_cycles(h2));
  core_harness #(.NDIV(4), .NT(3)) u4 (.clk, .rst_n, .checks(c4), .failures(f4), .finished(d4),
                                       .qr_cycles(q4), .lu_cycles(l4), .ch_cycles(h4));
  core_harness #(.N(8), .NDIV(8), .NT(2)) u8 (.clk, .rst_n, .checks(c8), .failures(f8), .finished(d8),
                                              .qr_cycles(q8), .lu_cycles(l8), .ch_cycles(h8));

  always #5 clk = ~clk;

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c4 + c8, f1 + f2 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d1 && d2 && d4 && d8);
    expect_true("QR: 2 dividers faster than 1", q2 < q1);
    expect_true("LU: 2 dividers faster than 1", l2 < l1);
    expect_true("Cholesky: 2 dividers faster than 1", h2 < h1);
    expect_true("QR: 4 dividers no slower than 2", q4 <= q2);
    expect_true("LU: 4 dividers no slower than 2", l4 <= l2);
    expect_true("Cholesky: 4 dividers no slower than 2", h4 <= h2);
    expect_true("1 divider: QR > Cholesky > LU", q1 > h1 && h1 > l1);
    expect_true("2 dividers: QR > Cholesky > LU", q2 > h2 && h2 > l2);
    expect_true("4 dividers: QR > Cholesky > LU", q4 > h4 && h4 > l4);
    expect_true("8x8, 8 dividers: QR slowest", q8 > h8 && q8 > l8);
    $display("4x4 cycles   1 divider: QR %0d LU %0d Cholesky %0d", q1, l1, h1);
    $display("4x4 cycles  2 dividers: QR %0d LU %0d Cholesky %0d", q2, l2, h2);
    $display("4x4 cycles  4 dividers: QR %0d LU %0d Cholesky %0d", q4, l4, h4);
    $display("8x8 cycles  8 dividers: QR %0d LU %0d Cholesky %0d", q8, l8, h8);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c4 + c8 + checks, f1 + f2 + f4 + f8 + failures);
    $finish;
  end
endmodule
