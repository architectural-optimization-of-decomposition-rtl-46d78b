// tb_bitwidths: the 4x4 QR, LU and Cholesky cores at the three data widths
// of the area/throughput comparison, 19, 26 and 32 bits (8 integer bits each,
// the rest fractional), checked word for word against the golden models.
module tb_bitwidths;
  logic clk = 0, rst_n = 0;
  int c19, f19, c26, f26, c32, f32;
  logic d19, d26, d32;

  core_harness #(.W(19), .F(11)) u19 (.clk, .rst_n, .checks(c19), .failures(f19), .finished(d19),
                .qr_cycles(qc19), .lu_cycles(lc19), .ch_cycles(cc19));
  core_harness #(.W(26), .F(18)) u26 (.clk, .rst_n, .checks(c26), .failures(f26), .finished(d26),
                .qr_cycles(qc26), .lu_cycles(lc26), .ch_cycles(cc26));
  core_harness #(.W(32), .F(24)) u32 (.clk, .rst_n, .checks(c32), .failures(f32), .finished(d32),
                .qr_cycles(qc32), .lu_cycles(lc32), .ch_cycles(cc32));

  int qc19, lc19, cc19, qc26, lc26, cc26, qc32, lc32, cc32;

  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", c19 + c26 + c32, f19 + f26 + f32 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d19 && d26 && d32);
    $display("19-bit: %0d checks, 26-bit: %0d checks, 32-bit: %0d checks", c19, c26, c32);
    $display("TB_RESULT checks=%0d failures=%0d", c19 + c26 + c32, f19 + f26 + f32);
    $finish;
  end
endmodule
