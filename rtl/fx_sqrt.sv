// fx_sqrt: sequential fixed-point square root (digit-by-digit, one result
// bit per clock).
//
// Computes y = sqrt(a) for a WIDTH-bit word with FRAC fractional bits, as the
// integer square root floor(sqrt(a << FRAC)), which again has FRAC fractional
// bits. A negative input is treated as zero.
//
// Interface: pulse 'start' while 'busy' is low; 'a' is captured on that edge.
// The unit then runs RW/2 iterations (RW = WIDTH+FRAC rounded up to even),
// 'done' pulses RW/2+1 cycles after 'start' and 'y' holds the root until the
// next start. The square root is required by QR (column norms) and Cholesky
// (diagonal entries); the digit-by-digit method and its timing are this
// design's own choice. The final clamp only acts when FRAC >= WIDTH-1; at
// the default format the root always fits and the clamp is constant.
module fx_sqrt #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH,
  parameter int unsigned FRAC  = decomp_pkg::DEF_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [WIDTH-1:0] a,
  output logic                    busy,
  output logic                    done,
  output logic signed [WIDTH-1:0] y
);
  localparam int unsigned RW = ((WIDTH + FRAC + 1) / 2) * 2;   // radicand bits
  localparam int unsigned HW = RW / 2;                         // root bits
  localparam int unsigned CW = $clog2(HW + 1);
  localparam logic signed [WIDTH-1:0] WMAX = {1'b0, {(WIDTH-1){1'b1}}};

  logic [RW-1:0] rad;     // radicand, consumed two bits per step from the top
  logic [HW-1:0] rem;     // partial remainder (below 2^HW until the last step)
  logic [HW-1:0] root;    // partial root
  logic [CW-1:0] cnt;

  logic [HW+1:0] rem_sh, trial;
  logic [HW+2:0] diff;
  logic          r_bit;

  always_comb begin
    rem_sh = {rem, rad[RW-1:RW-2]};
    trial  = {root, 2'b01};
    diff   = {1'b0, rem_sh} - {1'b0, trial};
    r_bit  = ~diff[HW+2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rad  <= a[WIDTH-1] ? '0 : (RW'(a) << FRAC);
          rem  <= '0;
          root <= '0;
          cnt  <= CW'(HW);
        end
      end else begin
        rem  <= r_bit ? diff[HW-1:0] : rem_sh[HW-1:0];
        root <= {root[HW-2:0], r_bit};
        rad  <= rad << 2;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= ({1'b0, root[HW-2:0], r_bit} > (HW+1)'(WMAX)) ? WMAX
                                                                : WIDTH'({root[HW-2:0], r_bit});
        end
      end
    end
  end
endmodule
