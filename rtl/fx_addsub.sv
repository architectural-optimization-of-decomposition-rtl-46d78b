// fx_addsub: signed fixed-point adder/subtractor with saturation.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1) on WIDTH-bit two's
// complement words. The binary point position does not matter for addition.
// The exact WIDTH+1-bit result is clamped to the most positive / most negative
// representable word, and 'sat' flags that the clamp was applied.
// Purely combinational: the instantiating core registers the result in its
// own pipeline stage. Saturation (rather than wrap-around) is this design's
// own choice for the fixed-point arithmetic units.
module fx_addsub #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,
  output logic signed [WIDTH-1:0] y,
  output logic                    sat
);
  localparam logic signed [WIDTH-1:0] WMAX = {1'b0, {(WIDTH-1){1'b1}}};
  localparam logic signed [WIDTH-1:0] WMIN = {1'b1, {(WIDTH-1){1'b0}}};
  localparam logic signed [WIDTH:0]   MAXV = (WIDTH+1)'(WMAX);
  localparam logic signed [WIDTH:0]   MINV = (WIDTH+1)'(WMIN);

  logic signed [WIDTH:0] full;

  always_comb begin
    full = sub ? ($signed({a[WIDTH-1], a}) - $signed({b[WIDTH-1], b}))
               : ($signed({a[WIDTH-1], a}) + $signed({b[WIDTH-1], b}));
    if (full > MAXV) begin
      y   = MAXV[WIDTH-1:0];
      sat = 1'b1;
    end else if (full < MINV) begin
      y   = MINV[WIDTH-1:0];
      sat = 1'b1;
    end else begin
      y   = full[WIDTH-1:0];
      sat = 1'b0;
    end
  end
endmodule
