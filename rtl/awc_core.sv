// awc_core: adaptive weight calculation core (QRD-RLS style least squares).
//
// Solves the (possibly over-determined) system A x = b + e in the least
// squares sense for an M x N observation matrix A (M >= N) and a training
// vector b. The QR core decomposes the augmented matrix [A | b] by modified
// Gram-Schmidt: A = Q R, and the projections of b onto the columns of Q give
// c = Q^T b in column N of R. The back-substitution unit then solves R x = c.
//
// Interface: while idle, load_we writes entry (load_row, load_col) of [A | b]
// (load_col = N addresses b). A one-cycle 'start' runs QR then
// back-substitution; 'busy' stays high until 'done' pulses, after which x_out
// holds the weights. While idle, the rd_* port reads Q or R (with c in column
// N) from the QR core. 'ovf' is set if either stage saturated.
// Latency: the QR core's run on N+1 columns, plus one cycle to hand over, plus
// the back-substitution's run, plus one cycle.
// NDIV sets the number of dividers the QR core uses to normalise a column
// (back-substitution divisions depend on each other and use one divider).
// Producing c by carrying b along as an extra column of the QR step is this
// design's own choice of how b is converted before back-substitution.
module awc_core
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned M     = DEF_N,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned NDIV  = 1,         // dividers in the QR core
  localparam int unsigned RB   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CB   = $clog2(N + 1),
  localparam int unsigned NRB  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_we,
  input  logic [RB-1:0]           load_row,
  input  logic [CB-1:0]           load_col,
  input  logic signed [WIDTH-1:0] load_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    ovf,
  input  qr_sel_e                 rd_sel,
  input  logic [RB-1:0]           rd_row,
  input  logic [CB-1:0]           rd_col,
  output logic signed [WIDTH-1:0] rd_data,
  output logic signed [WIDTH-1:0] x_out [N]
);
  typedef enum logic [1:0] {A_IDLE, A_QR, A_BS} state_e;
  state_e state;

  logic qr_start, qr_busy, qr_done, qr_ovf;
  logic bs_start, bs_busy, bs_done, bs_ovf;
  qr_sel_e                 q_sel;
  logic [RB-1:0]           q_row;
  logic [CB-1:0]           q_col;
  logic signed [WIDTH-1:0] q_data;
  logic [NRB-1:0]          bs_row;
  logic [CB-1:0]           bs_col;

  qr_mgs_core #(.WIDTH(WIDTH), .FRAC(FRAC), .M(M), .N(N), .NB(1), .NDIV(NDIV)) u_qr (
    .clk, .rst_n,
    .load_we(load_we && state == A_IDLE), .load_row, .load_col, .load_data,
    .start(qr_start), .busy(qr_busy), .done(qr_done), .ovf(qr_ovf),
    .rd_sel(q_sel), .rd_row(q_row), .rd_col(q_col), .rd_data(q_data)
  );

  back_subst #(.WIDTH(WIDTH), .FRAC(FRAC), .N(N)) u_bs (
    .clk, .rst_n, .start(bs_start), .busy(bs_busy), .done(bs_done), .ovf(bs_ovf),
    .r_row(bs_row), .r_col(bs_col), .r_data(q_data), .x_out
  );

  // The QR core's read port serves the back-substitution while it runs and
  // the external reader otherwise.
  always_comb begin
    if (state == A_BS) begin
      q_sel = SEL_R;
      q_row = RB'(bs_row);
      q_col = bs_col;
    end else begin
      q_sel = rd_sel;
      q_row = rd_row;
      q_col = rd_col;
    end
  end

  assign rd_data  = q_data;
  assign qr_start = (state == A_IDLE) && start;
  assign busy     = (state != A_IDLE);
  assign ovf      = qr_ovf | bs_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      bs_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      bs_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        A_IDLE: if (start) state <= A_QR;
        A_QR: if (qr_done) begin
          bs_start <= 1'b1;
          state    <= A_BS;
        end
        A_BS: if (bs_done) begin
          done  <= 1'b1;
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  // Each stage is started only when it is idle; loads only while idle.
  a_qr_free: assert property (@(posedge clk) disable iff (!rst_n) qr_start |-> !qr_busy);
  a_bs_free: assert property (@(posedge clk) disable iff (!rst_n) bs_start |-> !bs_busy);
  a_no_load: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load_we);
endmodule
