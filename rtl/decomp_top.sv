// decomp_top: three application-specific fixed-point matrix decomposition
// engines side by side, each a complete design with its own ports:
//
//   awc_*  adaptive weight calculation: QR decomposition by modified
//          Gram-Schmidt of an M x N observation matrix A with a training
//          vector b appended, followed by back-substitution R x = Q^T b.
//          The QR factors Q and R (c = Q^T b in column N of R) can be read
//          back while idle.
//   lu_*   LU decomposition (Doolittle, in place) of an N x N matrix.
//   ch_*   Cholesky decomposition (in place) of an N x N symmetric positive
//          definite matrix.
//
// Every engine follows the same protocol: while idle, *_load_we writes one
// matrix entry per cycle; a one-cycle *_start runs the decomposition;
// *_busy is high until *_done pulses; results are then read combinationally
// through *_rd_row / *_rd_col. *_ovf reports saturation during the last run.
// awc_rd_sel selects Q (0) or R (1). All engines share one clock and an
// active-low asynchronous reset, and run independently of each other.
// Defaults: 20-bit words with 12 fractional bits, 4x4 matrices, one divider
// per engine (NDIV dividers let the independent divisions of a column
// overlap, trading area for latency).
// The set of engines, the 4x4 size and the 20-bit word follow the published
// application-specific architectures; placing them side by side in one top
// and the shared port pattern are this design's own choices.
module decomp_top
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned M     = DEF_N,     // AWC observation rows
  parameter int unsigned N     = DEF_N,     // matrix columns / dimension
  parameter int unsigned NDIV  = 1,         // dividers per engine
  localparam int unsigned RB   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CB   = $clog2(N + 1),
  localparam int unsigned NB   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // adaptive weight calculation (QR-MGS + back-substitution)
  input  logic                    awc_load_we,
  input  logic [RB-1:0]           awc_load_row,
  input  logic [CB-1:0]           awc_load_col,
  input  logic signed [WIDTH-1:0] awc_load_data,
  input  logic                    awc_start,
  output logic                    awc_busy,
  output logic                    awc_done,
  output logic                    awc_ovf,
  input  logic                    awc_rd_sel,
  input  logic [RB-1:0]           awc_rd_row,
  input  logic [CB-1:0]           awc_rd_col,
  output logic signed [WIDTH-1:0] awc_rd_data,
  output logic signed [WIDTH-1:0] awc_x [N],
  // LU decomposition
  input  logic                    lu_load_we,
  input  logic [NB-1:0]           lu_load_row,
  input  logic [NB-1:0]           lu_load_col,
  input  logic signed [WIDTH-1:0] lu_load_data,
  input  logic                    lu_start,
  output logic                    lu_busy,
  output logic                    lu_done,
  output logic                    lu_ovf,
  input  logic [NB-1:0]           lu_rd_row,
  input  logic [NB-1:0]           lu_rd_col,
  output logic signed [WIDTH-1:0] lu_rd_data,
  // Cholesky decomposition
  input  logic                    ch_load_we,
  input  logic [NB-1:0]           ch_load_row,
  input  logic [NB-1:0]           ch_load_col,
  input  logic signed [WIDTH-1:0] ch_load_data,
  input  logic                    ch_start,
  output logic                    ch_busy,
  output logic                    ch_done,
  output logic                    ch_ovf,
  input  logic [NB-1:0]           ch_rd_row,
  input  logic [NB-1:0]           ch_rd_col,
  output logic signed [WIDTH-1:0] ch_rd_data
);
  awc_core #(.WIDTH(WIDTH), .FRAC(FRAC), .M(M), .N(N), .NDIV(NDIV)) u_awc (
    .clk, .rst_n,
    .load_we(awc_load_we), .load_row(awc_load_row), .load_col(awc_load_col),
    .load_data(awc_load_data),
    .start(awc_start), .busy(awc_busy), .done(awc_done), .ovf(awc_ovf),
    .rd_sel(awc_rd_sel ? SEL_R : SEL_Q), .rd_row(awc_rd_row), .rd_col(awc_rd_col),
    .rd_data(awc_rd_data), .x_out(awc_x)
  );

  lu_core #(.WIDTH(WIDTH), .FRAC(FRAC), .N(N), .NDIV(NDIV)) u_lu (
    .clk, .rst_n,
    .load_we(lu_load_we), .load_row(lu_load_row), .load_col(lu_load_col),
    .load_data(lu_load_data),
    .start(lu_start), .busy(lu_busy), .done(lu_done), .ovf(lu_ovf),
    .rd_row(lu_rd_row), .rd_col(lu_rd_col), .rd_data(lu_rd_data)
  );

  chol_core #(.WIDTH(WIDTH), .FRAC(FRAC), .N(N), .NDIV(NDIV)) u_chol (
    .clk, .rst_n,
    .load_we(ch_load_we), .load_row(ch_load_row), .load_col(ch_load_col),
    .load_data(ch_load_data),
    .start(ch_start), .busy(ch_busy), .done(ch_done), .ovf(ch_ovf),
    .rd_row(ch_rd_row), .rd_col(ch_rd_col), .rd_data(ch_rd_data)
  );
endmodule
