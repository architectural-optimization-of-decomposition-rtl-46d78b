// back_subst: back-substitution unit solving R * x = c for an upper
// triangular N x N matrix R in fixed point.
//
//   for i = N-1 down to 0:
//     s    = c[i] - sum_{j=i+1..N-1} R[i][j] * x[j]   (subtractions in j order)
//     x[i] = s / R[i][i]
//
// The unit has no copy of R: it reads R and c through a combinational read
// port (r_row, r_col -> r_data) of the memory that holds them, where column N
// holds c. x is kept in a register file inside the unit.
//
// Datapath: one multiplier, one adder/subtractor and one divider. Per row: one
// cycle to fetch c[i], one cycle per off-diagonal product, then a division of
// WIDTH+FRAC+2 cycles.
//
// Interface: a one-cycle 'start' begins a solve; 'busy' stays high until
// 'done' pulses; x is then valid on x_out until the next start. 'ovf' is a
// sticky saturation flag, cleared at start.
// Back-substitution after the QR step is how the weights are obtained; the
// unit's organisation and timing are this design's own choices.
module back_subst
  import decomp_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned N     = DEF_N,
  localparam int unsigned RB   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CB   = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    ovf,
  // read port into the memory holding [R | c]
  output logic [RB-1:0]           r_row,
  output logic [CB-1:0]           r_col,
  input  logic signed [WIDTH-1:0] r_data,
  // solution
  output logic signed [WIDTH-1:0] x_out [N]
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_MAC, S_DIV_GO, S_DIV_WAIT} state_e;

  state_e state;
  logic [RB-1:0] i;
  logic [CB-1:0] j;
  logic signed [WIDTH-1:0] s;
  logic signed [WIDTH-1:0] x [N];

  logic signed [WIDTH-1:0] mul_y, as_y, dv_y;
  logic                    mul_sat, as_sat, dv_busy, dv_done;

  fx_mul    #(.WIDTH(WIDTH), .FRAC(FRAC)) u_mul (.a(r_data), .b(x[RB'(j)]), .y(mul_y), .sat(mul_sat));
  fx_addsub #(.WIDTH(WIDTH))              u_as  (.a(s), .b(mul_y), .sub(1'b1), .y(as_y), .sat(as_sat));
  fx_div    #(.WIDTH(WIDTH), .FRAC(FRAC)) u_div (.clk, .rst_n, .start(state == S_DIV_GO),
                                                 .a(s), .b(r_data),
                                                 .busy(dv_busy), .done(dv_done), .y(dv_y));

  always_comb begin
    r_row = i;
    unique case (state)
      S_INIT:   r_col = CB'(N);             // c[i]
      S_DIV_GO: r_col = CB'(i);             // R[i][i]
      default:  r_col = j;                  // R[i][j]
    endcase
  end

  assign busy  = (state != S_IDLE);
  assign x_out = x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      j     <= '0;
      s     <= '0;
      done  <= 1'b0;
      ovf   <= 1'b0;
      for (int n = 0; n < N; n++) x[n] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i     <= RB'(N - 1);
          ovf   <= 1'b0;
          state <= S_INIT;
        end
        S_INIT: begin
          s     <= r_data;
          j     <= CB'(i) + 1'b1;
          state <= (CB'(i) + 1'b1 == CB'(N)) ? S_DIV_GO : S_MAC;
        end
        S_MAC: begin
          s <= as_y;
          if (mul_sat || as_sat) ovf <= 1'b1;
          if (j + 1'b1 == CB'(N)) state <= S_DIV_GO;
          else                    j     <= j + 1'b1;
        end
        S_DIV_GO: state <= S_DIV_WAIT;
        S_DIV_WAIT: if (dv_done) begin
          x[i] <= dv_y;
          if (i == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i     <= i - 1'b1;
            state <= S_INIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The divider is only started when it is free.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) (state == S_DIV_GO) |-> !dv_busy);
endmodule
