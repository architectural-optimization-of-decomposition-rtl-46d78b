// lu_core: application-specific LU decomposition core, A = L * U, computed in
// place in fixed point (Doolittle form: L has a unit diagonal that is not
// stored, U is upper triangular including the diagonal).
//
// Algorithm, column by column (j = 0..N-1), as the published column-oriented
// formulation orders it:
//   for k = 0..j-1, i = k+1..j-1 : A[i][j] -= A[i][k] * A[k][j]   (U part)
//   for k = 0..j-1, i = j..N-1   : A[i][j] -= A[i][k] * A[k][j]   (L part)
//   for i = j+1..N-1             : A[i][j]  = A[i][j] / A[j][j]    (scale L)
// Afterwards A[i][j] holds U[i][j] for i <= j and L[i][j] for i > j.
//
// Datapath: one multiplier, one adder/subtractor and one divider around an
// N x N matrix memory with two read ports. A[k][j] is first fetched into a
// register (1 cycle); each update then reads A[i][k] and A[i][j] and writes
// A[i][j] back in the same cycle, so an inner loop of length L takes L cycles.
// The divisions of a column are streamed into NDIV dividers (fx_div_bank),
// one issue per cycle while a divider is free: with L = WIDTH+FRAC+1 and
// P = min(NDIV, L), the n divisions of a column take
// floor((n-1)/P)*L + (n-1) mod P + L + 1 cycles (NDIV = 1: n*L + 1).
// The controller is a fixed loop-counter FSM (statically scheduled).
//
// Interface: while idle, load_we writes A[load_row][load_col]. A one-cycle
// 'start' runs the decomposition; 'busy' stays high until 'done' pulses.
// While idle, rd_row/rd_col read the combined L\U matrix combinationally.
// 'ovf' is a sticky saturation flag, cleared at start.
// The loop order follows the published algorithm, and the number of dividers
// is a resource-allocation parameter as in the published design space; the
// default of one divider, the other unit counts, the memory organisation and
// the timing are this design's own choices.
module lu_core
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned NDIV  = 1,         // dividers for the L column
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
    S_IDLE, S_COL, S_LDK, S_UPD, S_LDD, S_DIV
  } state_e;

  state_e state;
  logic   ph_l;                       // 0: U part of column j, 1: L part
  logic [NB:0] i, j, k;               // one extra bit for end tests
  logic signed [WIDTH-1:0] akj, ajj;

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
  logic signed [WIDTH-1:0] mul_y, as_y, dv_y;
  logic                    mul_sat, as_sat, dv_valid, dv_ready, dv_done;
  logic [NB-1:0]           dv_tag;

  fx_mul    #(.WIDTH(WIDTH), .FRAC(FRAC)) u_mul (.a(m_rd0), .b(akj), .y(mul_y), .sat(mul_sat));
  fx_addsub #(.WIDTH(WIDTH))              u_as  (.a(m_rd1), .b(mul_y), .sub(1'b1), .y(as_y), .sat(as_sat));
  fx_div_bank #(.WIDTH(WIDTH), .FRAC(FRAC), .NDIV(NDIV), .TAGW(NB)) u_div (
    .clk, .rst_n, .in_valid(dv_valid), .in_ready(dv_ready), .a(m_rd1), .b(ajj),
    .in_tag(i[NB-1:0]), .out_valid(dv_done), .out_y(dv_y), .out_tag(dv_tag)
  );
  assign dv_valid = (state == S_DIV) && (i != (NB+1)'(N));

  // inner-loop bounds of the current phase
  logic [NB:0] i_first, i_last;       // i runs i_first..i_last-1
  always_comb begin
    i_first = ph_l ? j : k + 1'b1;
    i_last  = ph_l ? (NB+1)'(N) : j;
  end

  // ------------------------------------------------------------ interconnect
  always_comb begin
    // port 0: A[i][k] (update), A[k][j] (fetch of the row-k operand), A[j][j];
    // port 1: A[i][j] (update / division)
    m_rd0_row = i[NB-1:0];
    m_rd0_col = k[NB-1:0];
    m_rd1_row = i[NB-1:0];
    m_rd1_col = j[NB-1:0];
    unique case (state)
      S_IDLE: begin
        m_rd0_row = rd_row;
        m_rd0_col = rd_col;
      end
      S_LDK: begin
        m_rd0_row = k[NB-1:0];
        m_rd0_col = j[NB-1:0];
      end
      S_LDD: begin
        m_rd0_row = j[NB-1:0];
        m_rd0_col = j[NB-1:0];
      end
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
      S_UPD:      m_we = 1'b1;
      S_DIV: begin
        m_we      = dv_done;
        m_wr_row  = dv_tag;
        m_wr_data = dv_y;
      end
      default: ;
    endcase
    rd_data = m_rd0;
  end

  // -------------------------------------------------------------- controller
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ph_l  <= 1'b0;
      i     <= '0;
      j     <= '0;
      k     <= '0;
      akj   <= '0;
      ajj   <= '0;
      done  <= 1'b0;
      ovf   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_COL;
          j     <= '0;
          k     <= '0;
          ph_l  <= 1'b0;
          ovf   <= 1'b0;
        end
        // next k of the current phase, or the next phase / the scaling
        S_COL: begin
          if (k == j) begin
            k <= '0;
            if (!ph_l) ph_l <= 1'b1;
            else       state <= S_LDD;
          end else begin
            state <= S_LDK;
          end
        end
        S_LDK: begin
          akj <= m_rd0;
          i   <= i_first;
          if (i_first >= i_last) begin
            k     <= k + 1'b1;
            state <= S_COL;
          end else begin
            state <= S_UPD;
          end
        end
        S_UPD: begin
          if (mul_sat || as_sat) ovf <= 1'b1;
          if (i + 1'b1 == i_last) begin
            k     <= k + 1'b1;
            state <= S_COL;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_LDD: begin
          ajj <= m_rd0;
          i   <= j + 1'b1;
          if (j + 1'b1 == (NB+1)'(N)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_DIV;
          end
        end
        // issue row i while a divider is free; results return in row order,
        // so the column is finished when row N-1 is written
        S_DIV: begin
          if (dv_valid && dv_ready) i <= i + 1'b1;
          if (dv_done && int'(dv_tag) == N - 1) begin
            j     <= j + 1'b1;
            k     <= '0;
            ph_l  <= 1'b0;
            state <= S_COL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The external port may only load a matrix while the core is idle, and an
  // divider result only arrives while a column is being scaled.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load_we);
  a_div_in_col:   assert property (@(posedge clk) disable iff (!rst_n) dv_done |-> state == S_DIV);
endmodule
