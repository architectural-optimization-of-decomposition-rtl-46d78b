// fx_mul: signed fixed-point multiplier with rounding and saturation.
//
// Multiplies two WIDTH-bit words with FRAC fractional bits. The 2*WIDTH-bit
// product has 2*FRAC fractional bits; it is rounded to FRAC fractional bits
// (add half an LSB, then arithmetic shift right by FRAC, i.e. round half up)
// and clamped to the WIDTH-bit range, with 'sat' flagging the clamp.
// Purely combinational; on an FPGA this maps onto the embedded multipliers.
// The rounding mode and saturation are this design's own choices.
module fx_mul #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH,
  parameter int unsigned FRAC  = decomp_pkg::DEF_FRAC
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic signed [WIDTH-1:0] y,
  output logic                    sat
);
  localparam int unsigned PW = 2 * WIDTH + 1;
  localparam logic signed [WIDTH-1:0] WMAX = {1'b0, {(WIDTH-1){1'b1}}};
  localparam logic signed [WIDTH-1:0] WMIN = {1'b1, {(WIDTH-1){1'b0}}};
  localparam logic signed [PW-1:0] MAXV = PW'(WMAX);
  localparam logic signed [PW-1:0] MINV = PW'(WMIN);
  localparam logic signed [PW-1:0] HALF = (FRAC > 0) ? PW'(1) <<< (FRAC - 1) : '0;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rnd;

  always_comb begin
    prod = PW'(a) * PW'(b);
    rnd  = (prod + HALF) >>> FRAC;
    if (rnd > MAXV) begin
      y   = MAXV[WIDTH-1:0];
      sat = 1'b1;
    end else if (rnd < MINV) begin
      y   = MINV[WIDTH-1:0];
      sat = 1'b1;
    end else begin
      y   = rnd[WIDTH-1:0];
      sat = 1'b0;
    end
  end
endmodule
