// fx_div: sequential signed fixed-point divider (restoring, one quotient bit
// per clock).
//
// Computes y = a / b for WIDTH-bit words with FRAC fractional bits, i.e. the
// integer quotient (|a| << FRAC) / |b| with the sign of a*b, truncated toward
// zero and clamped to the WIDTH-bit range. Division by zero returns the
// largest magnitude with the sign of a (every trial subtraction succeeds).
//
// Interface: pulse 'start' for one cycle while 'busy' is low; a and b are
// captured on that edge. 'busy' is high while the DW = WIDTH+FRAC iterations
// run; 'done' pulses for one cycle DW+1 cycles after 'start', and 'y' holds
// the quotient from then until the next start. A start while busy is ignored.
// The divider's internal algorithm, latency and handshake are this design's
// own choices; the decomposition algorithms only require that a divider exists.
module fx_div #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH,
  parameter int unsigned FRAC  = decomp_pkg::DEF_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic                    busy,
  output logic                    done,
  output logic signed [WIDTH-1:0] y
);
  localparam int unsigned DW = WIDTH + FRAC;           // dividend bits
  localparam int unsigned CW = $clog2(DW + 1);
  localparam logic signed [WIDTH-1:0] WMAX = {1'b0, {(WIDTH-1){1'b1}}};
  localparam logic signed [WIDTH-1:0] WMIN = {1'b1, {(WIDTH-1){1'b0}}};

  logic [DW-1:0]    q;      // dividend shifting out, quotient shifting in
  logic [WIDTH-1:0] rem;    // partial remainder (always below the divisor)
  logic [WIDTH-1:0] den;    // divisor magnitude
  logic             neg;    // sign of the result
  logic [CW-1:0]    cnt;

  logic [WIDTH-1:0] amag, bmag;
  logic [WIDTH:0]   rem_sh;
  logic [WIDTH+1:0] diff;
  logic             q_bit;

  assign amag = a[WIDTH-1] ? WIDTH'(-a) : WIDTH'(a);
  assign bmag = b[WIDTH-1] ? WIDTH'(-b) : WIDTH'(b);

  always_comb begin
    rem_sh = {rem, q[DW-1]};
    diff   = {1'b0, rem_sh} - {2'b00, den};
    q_bit  = ~diff[WIDTH+1];
  end

  // Sign and clamp of the final quotient magnitude (the value q will take
  // after the last iteration).
  function automatic logic signed [WIDTH-1:0] finish(input logic [DW-1:0] mag,
                                                     input logic sgn);
    logic [DW:0] m;
    m = {1'b0, mag};
    if (!sgn) finish = (m > (DW+1)'(WMAX)) ? WMAX : WIDTH'(mag);
    else      finish = (m > (DW+1)'({1'b1, {(WIDTH-1){1'b0}}})) ? WMIN
                                                                : WIDTH'(-mag);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
      q    <= '0;
      rem  <= '0;
      den  <= '0;
      neg  <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= DW'(amag) << FRAC;
          rem  <= '0;
          den  <= bmag;
          neg  <= a[WIDTH-1] ^ b[WIDTH-1];
          cnt  <= CW'(DW);
        end
      end else begin
        rem <= q_bit ? diff[WIDTH-1:0] : rem_sh[WIDTH-1:0];
        q   <= {q[DW-2:0], q_bit};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= finish({q[DW-2:0], q_bit}, neg);
        end
      end
    end
  end
endmodule
