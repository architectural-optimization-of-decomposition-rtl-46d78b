// qr_mgs_core: application-specific QR decomposition core using the modified
// Gram-Schmidt (MGS) algorithm, A = Q * R, in fixed point.
//
// Algorithm (per column i = 0..N-1):
//   R[i][i] = sqrt(<X_i, X_i>)                 (Euclidean norm of column i)
//   Q_i     = X_i / R[i][i]                     (overwrites X_i in place)
//   for j = i+1 .. N+NB-1:
//     R[i][j] = <Q_i, X_j>                      (projection)
//     X_j     = X_j - R[i][j] * Q_i             (update of the later columns)
// The NB extra columns are right-hand sides: they are projected and updated
// but never normalised, so for an appended vector b the last column of R
// becomes c = Q^T b (used by the adaptive weight calculation core).
//
// Datapath: one multiplier, one adder/subtractor, one divider and one square
// root unit around an M x (N+NB) X/Q memory and an N x (N+NB) R memory, with
// only the connections this algorithm uses. A fixed loop-counter FSM sequences
// the algorithm (statically scheduled; no run-time scheduling).
//   dot product : one multiply per cycle, pipelined into the accumulator,
//                 M+2 cycles
//   square root : (WIDTH+FRAC rounded up to even)/2 + 2 cycles
//   Q column    : M divisions streamed into NDIV dividers (fx_div_bank), one
//                 issue per cycle while a divider is free; with L = WIDTH+FRAC+1
//                 and P = min(NDIV, L), row e issues at floor(e/P)*L + e mod P
//                 and the phase takes issue(M-1) + L + 1 cycles (NDIV = 1:
//                 M*L + 1)
//   update      : one element per cycle, M cycles
//
// Interface: while idle, load_we writes A[load_row][load_col] (columns N..
// N+NB-1 take the right-hand sides). A one-cycle 'start' runs the
// decomposition; 'busy' is high until 'done' pulses. While idle the read port
// returns Q or R (rd_sel) combinationally; entries of R below the diagonal read
// as zero. 'ovf' is a sticky flag, cleared at start, set when any multiply or
// add/subtract saturated during the run.
// The algorithm follows MGS as published, and the number of dividers is a
// resource-allocation parameter as in the published design space; the default
// of one divider, the other unit counts, the memory organisation, the
// RHS-column extension and the timing are this design's own choices.
module qr_mgs_core
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned M     = DEF_N,     // rows
  parameter int unsigned N     = DEF_N,     // columns to orthonormalise
  parameter int unsigned NB    = 0,         // extra right-hand-side columns
  parameter int unsigned NDIV  = 1,         // dividers for the Q column
  localparam int unsigned NC   = N + NB,
  localparam int unsigned RB   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CB   = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned NRB  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // matrix load (idle only)
  input  logic                    load_we,
  input  logic [RB-1:0]           load_row,
  input  logic [CB-1:0]           load_col,
  input  logic signed [WIDTH-1:0] load_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    ovf,
  // result read (idle only)
  input  qr_sel_e                 rd_sel,
  input  logic [RB-1:0]           rd_row,
  input  logic [CB-1:0]           rd_col,
  output logic signed [WIDTH-1:0] rd_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_DOT, S_SQRT_GO, S_SQRT_WAIT, S_NORM, S_UPD
  } state_e;

  state_e state;
  logic [NRB-1:0] i;          // current pivot column
  logic [CB-1:0]  j;          // column being projected / updated
  logic [RB:0]    k;          // row counter (one extra bit for the end test)
  logic [RB:0]    w;          // Q rows written back in S_NORM
  logic signed [WIDTH-1:0] acc, p_r, rii, rij;
  logic p_v;

  // ---------------------------------------------------------------- memories
  logic                    x_we;
  logic [RB-1:0]           x_wr_row, x_rd0_row;
  logic [CB-1:0]           x_wr_col, x_rd0_col, x_rd1_col;
  logic signed [WIDTH-1:0] x_wr_data, x_rd0, x_rd1;
  logic                    r_we;
  logic signed [WIDTH-1:0] r_wr_data, r_rd;
  logic [NRB-1:0]          r_rd_row;

  matrix_mem #(.WIDTH(WIDTH), .ROWS(M), .COLS(NC)) u_xmem (
    .clk, .we(x_we), .wr_row(x_wr_row), .wr_col(x_wr_col), .wr_data(x_wr_data),
    .rd0_row(x_rd0_row), .rd0_col(x_rd0_col), .rd0_data(x_rd0),
    .rd1_row(x_rd0_row), .rd1_col(x_rd1_col), .rd1_data(x_rd1)
  );

  matrix_mem #(.WIDTH(WIDTH), .ROWS(N), .COLS(NC)) u_rmem (
    .clk, .we(r_we), .wr_row(i), .wr_col(j), .wr_data(r_wr_data),
    .rd0_row(r_rd_row), .rd0_col(rd_col), .rd0_data(r_rd),
    .rd1_row(r_rd_row), .rd1_col(rd_col), .rd1_data()
  );

  // ------------------------------------------------------- arithmetic units
  logic signed [WIDTH-1:0] mul_a, mul_b, mul_y, as_a, as_b, as_y;
  logic                    as_sub, mul_sat, as_sat;
  logic                    sq_start, sq_busy, sq_done, dv_valid, dv_ready, dv_done;
  logic signed [WIDTH-1:0] sq_y, dv_y;
  logic [RB-1:0]           dv_tag;

  fx_mul    #(.WIDTH(WIDTH), .FRAC(FRAC)) u_mul (.a(mul_a), .b(mul_b), .y(mul_y), .sat(mul_sat));
  fx_addsub #(.WIDTH(WIDTH))              u_as  (.a(as_a), .b(as_b), .sub(as_sub), .y(as_y), .sat(as_sat));
  fx_sqrt   #(.WIDTH(WIDTH), .FRAC(FRAC)) u_sqrt (.clk, .rst_n, .start(sq_start), .a(acc),
                                                  .busy(sq_busy), .done(sq_done), .y(sq_y));
  fx_div_bank #(.WIDTH(WIDTH), .FRAC(FRAC), .NDIV(NDIV), .TAGW(RB)) u_div (
    .clk, .rst_n, .in_valid(dv_valid), .in_ready(dv_ready), .a(x_rd0), .b(rii),
    .in_tag(k[RB-1:0]), .out_valid(dv_done), .out_y(dv_y), .out_tag(dv_tag)
  );

  // ------------------------------------------------------------ interconnect
  always_comb begin
    // X memory read addresses: port 0 walks the pivot column i (Q_i / X_i),
    // port 1 the column j; when idle port 0 serves the external read port.
    x_rd0_row = k[RB-1:0];
    x_rd0_col = CB'(i);
    x_rd1_col = j;
    if (state == S_IDLE) begin
      x_rd0_row = rd_row;
      x_rd0_col = rd_col;
    end
    // multiplier: dot product X_i[k]*X_j[k], or R_ij * Q_i[k] in the update
    mul_a  = x_rd0;
    mul_b  = (state == S_UPD) ? rij : x_rd1;
    // adder: accumulate, or X_j[k] - R_ij*Q_i[k]
    as_sub = (state == S_UPD);
    as_a   = (state == S_UPD) ? x_rd1 : acc;
    as_b   = (state == S_UPD) ? mul_y : p_r;
    // X memory writes: external load, Q_i[k] from the divider, update
    x_we      = 1'b0;
    x_wr_row  = k[RB-1:0];
    x_wr_col  = j;
    x_wr_data = as_y;
    unique case (state)
      S_IDLE: begin
        x_we      = load_we;
        x_wr_row  = load_row;
        x_wr_col  = load_col;
        x_wr_data = load_data;
      end
      S_NORM: begin
        x_we      = dv_done;
        x_wr_row  = dv_tag;
        x_wr_col  = CB'(i);
        x_wr_data = dv_y;
      end
      S_UPD: x_we = 1'b1;
      default: ;
    endcase
    // R memory writes: diagonal from the square root, off-diagonal from dot
    r_we      = 1'b0;
    r_wr_data = acc;
    if (state == S_SQRT_WAIT && sq_done) begin
      r_we      = 1'b1;
      r_wr_data = sq_y;
    end else if (state == S_DOT && k == (RB+1)'(M) && !p_v && j != CB'(i)) begin
      r_we      = 1'b1;
    end
    sq_start = (state == S_SQRT_GO);
    dv_valid = (state == S_NORM) && (k != (RB+1)'(M));
    // external read port
    r_rd_row = NRB'(rd_row);
    if (rd_sel == SEL_Q)                                   rd_data = x_rd0;
    else if (int'(rd_row) > int'(rd_col) || int'(rd_row) >= N) rd_data = '0;
    else                                                   rd_data = r_rd;
  end

  // -------------------------------------------------------------- controller
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      j     <= '0;
      k     <= '0;
      w     <= '0;
      acc   <= '0;
      p_r   <= '0;
      p_v   <= 1'b0;
      rii   <= '0;
      rij   <= '0;
      done  <= 1'b0;
      ovf   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_DOT;
          i     <= '0;
          j     <= '0;
          k     <= '0;
          acc   <= '0;
          p_v   <= 1'b0;
          ovf   <= 1'b0;
        end
        S_DOT: begin
          // issue one product per cycle, accumulate one cycle later
          if (k != (RB+1)'(M)) begin
            p_r <= mul_y;
            p_v <= 1'b1;
            k   <= k + 1'b1;
            if (mul_sat) ovf <= 1'b1;
          end else begin
            p_v <= 1'b0;
          end
          if (p_v) begin
            acc <= as_y;
            if (as_sat) ovf <= 1'b1;
          end
          if (k == (RB+1)'(M) && !p_v) begin
            k <= '0;
            if (j == CB'(i)) begin
              state <= S_SQRT_GO;
            end else begin
              rij   <= acc;
              state <= S_UPD;
            end
          end
        end
        S_SQRT_GO: state <= S_SQRT_WAIT;
        S_SQRT_WAIT: if (sq_done) begin
          rii   <= sq_y;
          k     <= '0;
          w     <= '0;
          state <= S_NORM;
        end
        S_NORM: begin
          // issue row k while a divider is free; retire results in order
          if (dv_valid && dv_ready) k <= k + 1'b1;
          if (dv_done) w <= w + 1'b1;
          if (dv_done && w == (RB+1)'(M - 1)) begin
            k <= '0;
            if (int'(i) + 1 < NC) begin
              j     <= CB'(i) + 1'b1;
              acc   <= '0;
              state <= S_DOT;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_UPD: begin
          if (mul_sat || as_sat) ovf <= 1'b1;
          if (k == (RB+1)'(M - 1)) begin
            k   <= '0;
            acc <= '0;
            if (int'(j) + 1 < NC) begin
              j     <= j + 1'b1;
              state <= S_DOT;
            end else if (int'(i) + 1 < N) begin
              i     <= i + 1'b1;
              j     <= CB'(i) + 1'b1;
              state <= S_DOT;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The external port may only load a matrix while the core is idle, and an
  // iterative unit is only started when it is free; divider results arrive
  // only while a Q column is being written.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load_we);
  a_div_in_norm:  assert property (@(posedge clk) disable iff (!rst_n) dv_done |-> state == S_NORM);
  a_sqrt_free:    assert property (@(posedge clk) disable iff (!rst_n) sq_start |-> !sq_busy);
endmodule
