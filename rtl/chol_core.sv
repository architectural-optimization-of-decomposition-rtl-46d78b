// chol_core: application-specific Cholesky decomposition core, A = G * G^T
// for a symmetric positive definite A, computed in place in fixed point.
//
// Algorithm, column by column (k = 0..N-1), on the lower triangle of A:
//   G[k][k] = sqrt(A[k][k])
//   for i = k+1..N-1            : G[i][k] = A[i][k] / G[k][k]
//   for j = k+1..N-1, t = j..N-1: A[t][j] = A[t][j] - G[t][k] * G[j][k]
// Only the lower triangle of A is read; the upper triangle of the result
// reads as zero.
//
// Datapath: one square root unit, one divider, one multiplier and one
// adder/subtractor around an N x N matrix memory with two read ports. For
// each j, G[j][k] is first fetched into a register (1 cycle); each update then
// reads G[t][k] and A[t][j] and writes A[t][j] in the same cycle. The square
// root takes (WIDTH+FRAC rounded up to even)/2 + 2 cycles. The n = N-1-k
// divisions of column k are streamed into NDIV dividers (fx_div_bank), one
// issue per cycle while a divider is free: with L = WIDTH+FRAC+1 and
// P = min(NDIV, L) they take floor((n-1)/P)*L + (n-1) mod P + L + 1 cycles
// (NDIV = 1: n*L + 1). The controller is a fixed loop-counter FSM.
//
// Interface: while idle, load_we writes A[load_row][load_col] (only entries on
// or below the diagonal are used). A one-cycle 'start' runs the decomposition;
// 'busy' stays high until 'done' pulses. While idle, rd_row/rd_col read G
// combinationally. 'ovf' is a sticky saturation flag, cleared at start.
// The division uses the already computed diagonal G[k][k] (the standard
// Cholesky step); the number of dividers is a resource-allocation parameter
// as in the published design space; its default of one, the other unit
// counts, the memory organisation and the timing are this design's own
// choices.
module chol_core
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned NDIV  = 1,         // dividers for the G column
  localparam int unsigned NB   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_we,
  input  logic [NB-1:0]           load_row,
  input  logic [NB-1:0]           load_col,
  input  logic signed [WIDTH-1:0] load_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    ovf,
  input  logic [NB-1:0]           rd_row,
  input  logic [NB-1:0]           rd_col,
  output logic signed [WIDTH-1:0] rd_data
);
  typedef enum logic [2:0] {
    S_IDLE, S_SQ_GO, S_SQ_WAIT, S_DIV, S_LDJ, S_UPD
  } state_e;

  state_e state;
  logic [NB:0] k, i, j;               // i doubles as t in the update loop
  logic signed [WIDTH-1:0] gkk, gjk;

  // ---------------------------------------------------------------- memory
  logic                    m_we;
  logic [NB-1:0]           m_wr_row, m_wr_col, m_rd0_row, m_rd0_col, m_rd1_row, m_rd1_col;
  logic signed [WIDTH-1:0] m_wr_data, m_rd0, m_rd1;

  matrix_mem #(.WIDTH(WIDTH), .ROWS(N), .COLS(N)) u_mem (
    .clk, .we(m_we), .wr_row(m_wr_row), .wr_col(m_wr_col), .wr_data(m_wr_data),
    .rd0_row(m_rd0_row), .rd0_col(m_rd0_col), .rd0_data(m_rd0),
    .rd1_row(m_rd1_row), .rd1_col(m_rd1_col), .rd1_data(m_rd1)
  );

  // ------------------------------------------------------- arithmetic units
  logic signed [WIDTH-1:0] mul_y, as_y, dv_y, sq_y;
  logic                    mul_sat, as_sat, dv_valid, dv_ready, dv_done, sq_busy, sq_done;
  logic [NB-1:0]           dv_tag;

  fx_mul    #(.WIDTH(WIDTH), .FRAC(FRAC)) u_mul (.a(m_rd0), .b(gjk), .y(mul_y), .sat(mul_sat));
  fx_addsub #(.WIDTH(WIDTH))              u_as  (.a(m_rd1), .b(mul_y), .sub(1'b1), .y(as_y), .sat(as_sat));
  fx_sqrt   #(.WIDTH(WIDTH), .FRAC(FRAC)) u_sqrt (.clk, .rst_n, .start(state == S_SQ_GO), .a(m_rd0),
                                                  .busy(sq_busy), .done(sq_done), .y(sq_y));
  fx_div_bank #(.WIDTH(WIDTH), .FRAC(FRAC), .NDIV(NDIV), .TAGW(NB)) u_div (
    .clk, .rst_n, .in_valid(dv_valid), .in_ready(dv_ready), .a(m_rd0), .b(gkk),
    .in_tag(i[NB-1:0]), .out_valid(dv_done), .out_y(dv_y), .out_tag(dv_tag)
  );
  assign dv_valid = (state == S_DIV) && (i != (NB+1)'(N));

  // ------------------------------------------------------------ interconnect
  always_comb begin
    // port 0: A[k][k] (square root), A[i][k] (division, G[t][k] in update),
    //         A[j][k] (fetch of G[j][k]); port 1: A[t][j] (update)
    m_rd0_row = i[NB-1:0];
    m_rd0_col = k[NB-1:0];
    m_rd1_row = i[NB-1:0];
    m_rd1_col = j[NB-1:0];
    unique case (state)
      S_IDLE: begin
        m_rd0_row = rd_row;
        m_rd0_col = rd_col;
      end
      S_SQ_GO: m_rd0_row = k[NB-1:0];
      S_LDJ:   m_rd0_row = j[NB-1:0];
      default: ;
    endcase
    m_we      = 1'b0;
    m_wr_row  = i[NB-1:0];
    m_wr_col  = j[NB-1:0];
    m_wr_data = as_y;
    unique case (state)
      S_IDLE: begin
        m_we      = load_we;
        m_wr_row  = load_row;
        m_wr_col  = load_col;
        m_wr_data = load_data;
      end
      S_SQ_WAIT: begin
        m_we      = sq_done;
        m_wr_row  = k[NB-1:0];
        m_wr_col  = k[NB-1:0];
        m_wr_data = sq_y;
      end
      S_DIV: begin
        m_we      = dv_done;
        m_wr_row  = dv_tag;
        m_wr_col  = k[NB-1:0];
        m_wr_data = dv_y;
      end
      S_UPD: m_we = 1'b1;
      default: ;
    endcase
    rd_data = (rd_row < rd_col) ? '0 : m_rd0;
  end

  // -------------------------------------------------------------- controller
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      j     <= '0;
      k     <= '0;
      gkk   <= '0;
      gjk   <= '0;
      done  <= 1'b0;
      ovf   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SQ_GO;
          k     <= '0;
          ovf   <= 1'b0;
        end
        S_SQ_GO: state <= S_SQ_WAIT;
        S_SQ_WAIT: if (sq_done) begin
          gkk <= sq_y;
          if (k + 1'b1 == (NB+1)'(N)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i     <= k + 1'b1;
            state <= S_DIV;
          end
        end
        // issue row i while a divider is free; results return in row order,
        // so the column is finished when row N-1 is written
        S_DIV: begin
          if (dv_valid && dv_ready) i <= i + 1'b1;
          if (dv_done && int'(dv_tag) == N - 1) begin
            j     <= k + 1'b1;
            state <= S_LDJ;
          end
        end
        S_LDJ: begin
          gjk   <= m_rd0;
          i     <= j;
          state <= S_UPD;
        end
        S_UPD: begin
          if (mul_sat || as_sat) ovf <= 1'b1;
          if (i + 1'b1 == (NB+1)'(N)) begin
            if (j + 1'b1 == (NB+1)'(N)) begin
              k     <= k + 1'b1;
              state <= S_SQ_GO;
            end else begin
              j     <= j + 1'b1;
              state <= S_LDJ;
            end
          end else begin
            i <= i + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The external port may only load a matrix while the core is idle, and an
  // iterative unit is only started when it is free (divider results only
  // arrive while a column is being divided).
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load_we);
  a_div_in_col:   assert property (@(posedge clk) disable iff (!rst_n) dv_done |-> state == S_DIV);
  a_sqrt_free:    assert property (@(posedge clk) disable iff (!rst_n) (state == S_SQ_GO) |-> !sq_busy);
endmodule
