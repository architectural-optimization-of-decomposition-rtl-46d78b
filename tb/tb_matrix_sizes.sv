// tb_matrix_sizes: the QR, LU and Cholesky cores at the default 20-bit word
// for matrix sizes 2x2, 3x3, 6x6 and 8x8 (4x4 is covered by the other
// testbenches), checked word for word against the golden models. The random
// problems are diagonally weighted so that they stay well conditioned and
// inside the number range at every size.
module tb_matrix_sizes;
  logic clk = 0, rst_n = 0;
  int c2, f2, c3, f3, c6, f6, c8, f8;
  logic d2, d3, d6, d8;

  core_harness #(.N(2), .NT(4)) u2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2),
              .qr_cycles(qc2), .lu_cycles(lc2), .ch_cycles(cc2));
  core_harness #(.N(3), .NT(4)) u3 (.clk, .rst_n, .checks(c3), .failures(f3), .finished(d3),
              .qr_cycles(qc3), .lu_cycles(lc3), .ch_cycles(cc3));
  core_harness #(.N(6), .NT(3)) u6 (.clk, .rst_n, .checks(c6), .failures(f6), .finished(d6),
              .qr_cycles(qc6), .lu_cycles(lc6), .ch_cycles(cc6));
  core_harness #(.N(8), .NT(2)) u8 (.clk, .rst_n, .checks(c8), .failures(f8), .finished(d8),
              .qr_cycles(qc8), .lu_cycles(lc8), .ch_cycles(cc8));

  int qc2, lc2, cc2, qc3, lc3, cc3, qc6, lc6, cc6, qc8, lc8, cc8;

  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c6 + c8, f2 + f3 + f6 + f8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d2 && d3 && d6 && d8);
    $display("2x2: %0d, 3x3: %0d, 6x6: %0d, 8x8: %0d checks", c2, c3, c6, c8);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c6 + c8, f2 + f3 + f6 + f8);
    $finish;
  end
endmodule
