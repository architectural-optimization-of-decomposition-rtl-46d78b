// tb_matrix_mem: writes a whole matrix, then reads every entry back through
// both read ports, checks read-before-write in the same cycle, and
// overwrites a random subset against a shadow copy.
module tb_matrix_mem;
  localparam int W = 20;
  localparam int R = 4;
  localparam int C = 5;

  logic clk = 0, we = 0;
  logic [1:0] wr_row, rd0_row, rd1_row;
  logic [2:0] wr_col, rd0_col, rd1_col;
  logic [W-1:0] wr_data, rd0_data, rd1_data;
  logic [W-1:0] shadow [R][C];
  int checks = 0, failures = 0;

  matrix_mem #(.WIDTH(W), .ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  task automatic wr(int r, int c, logic [W-1:0] d);
    @(negedge clk);
    we = 1; wr_row = 2'(r); wr_col = 3'(c); wr_data = d;
    shadow[r][c] = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd_all();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        rd0_row = 2'(r); rd0_col = 3'(c);
        rd1_row = 2'(R - 1 - r); rd1_col = 3'(C - 1 - c);
        #1;
        checks++;
        if (rd0_data != shadow[r][c] || rd1_data != shadow[R-1-r][C-1-c]) begin
          failures++;
          $display("FAIL read (%0d,%0d)", r, c);
        end
      end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) wr(r, c, W'($urandom));
    rd_all();
    // same-cycle read of the entry being written returns the old word
    @(negedge clk);
    we = 1; wr_row = 2; wr_col = 3; wr_data = ~shadow[2][3];
    rd0_row = 2; rd0_col = 3;
    #1;
    checks++;
    if (rd0_data != shadow[2][3]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    we = 0;
    shadow[2][3] = ~shadow[2][3];
    for (int n = 0; n < 10; n++) wr($urandom_range(0, R - 1), $urandom_range(0, C - 1), W'($urandom));
    rd_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
