// matrix_mem: storage for one matrix, ROWS x COLS words of WIDTH bits, with
// two asynchronous read ports and one synchronous write port.
//
// Entry (r, c) lives at address r*COLS + c. Both read ports return the word
// at their (row, col) in the same cycle; a write (we = 1) lands on the rising
// clock edge, so a read of the same entry in the same cycle returns the old
// word. The two-read / one-write organisation lets a core fetch both operands
// of a multiply in one cycle. Contents are not reset: every core writes a
// matrix in before it reads it. The memory unit with two outputs follows the
// architecture's description; its addressing and timing are own choices.
module matrix_mem #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH,
  parameter int unsigned ROWS  = decomp_pkg::DEF_N,
  parameter int unsigned COLS  = decomp_pkg::DEF_N,
  localparam int unsigned RB   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CB   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [RB-1:0]    wr_row,
  input  logic [CB-1:0]    wr_col,
  input  logic [WIDTH-1:0] wr_data,
  // read port 0
  input  logic [RB-1:0]    rd0_row,
  input  logic [CB-1:0]    rd0_col,
  output logic [WIDTH-1:0] rd0_data,
  // read port 1
  input  logic [RB-1:0]    rd1_row,
  input  logic [CB-1:0]    rd1_col,
  output logic [WIDTH-1:0] rd1_data
);
  logic [WIDTH-1:0] mem [ROWS*COLS];

  function automatic int unsigned addr(input logic [RB-1:0] r, input logic [CB-1:0] c);
    return int'(r) * COLS + int'(c);
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[addr(wr_row, wr_col)] <= wr_data;
  end

  assign rd0_data = mem[addr(rd0_row, rd0_col)];
  assign rd1_data = mem[addr(rd1_row, rd1_col)];

  // Writes must address an existing entry.
  a_wr_in_range: assert property (@(posedge clk) we |-> (int'(wr_row) < ROWS && int'(wr_col) < COLS));
endmodule
