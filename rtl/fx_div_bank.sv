// fx_div_bank: NDIV fixed-point dividers (fx_div) behind one streaming
// issue port, for the column divisions of the decomposition engines (every
// entry of a column divided by the same diagonal value).
//
// Divisions are issued to the dividers in strict round-robin order, at most
// one per cycle: in_ready is high when the next divider in turn is free, and
// a division is accepted on a clock edge with in_valid && in_ready. Each
// division takes a fixed WIDTH+FRAC+1 cycles, so results come back in issue
// order and never two in the same cycle: out_valid pulses with out_y and the
// out_tag given at issue. With NDIV = 1 the bank is a single divider (one
// division every WIDTH+FRAC+1 cycles); with NDIV >= WIDTH+FRAC+1 it accepts a
// division every cycle.
// The number of dividers is the resource-allocation parameter; the issue
// scheme and its timing are this design's own choices.
module fx_div_bank #(
  parameter int unsigned WIDTH = decomp_pkg::DEF_WIDTH,
  parameter int unsigned FRAC  = decomp_pkg::DEF_FRAC,
  parameter int unsigned NDIV  = 1,
  parameter int unsigned TAGW  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic [TAGW-1:0]         in_tag,
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] out_y,
  output logic [TAGW-1:0]         out_tag
);
  localparam int unsigned PW = (NDIV > 1) ? $clog2(NDIV) : 1;

  logic [NDIV-1:0]         start, busy, done;
  logic signed [WIDTH-1:0] y   [NDIV];
  logic [TAGW-1:0]         tag [NDIV];
  logic [PW-1:0]           nxt;

  for (genvar d = 0; d < NDIV; d++) begin : g_div
    assign start[d] = in_valid && in_ready && (nxt == PW'(d));
    fx_div #(.WIDTH(WIDTH), .FRAC(FRAC)) u_div (
      .clk, .rst_n, .start(start[d]), .a, .b, .busy(busy[d]), .done(done[d]), .y(y[d])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        tag[d] <= '0;
      else if (start[d]) tag[d] <= in_tag;
    end
  end

  assign in_ready = !busy[nxt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nxt <= '0;
    else if (in_valid && in_ready) nxt <= (int'(nxt) == NDIV - 1) ? '0 : nxt + 1'b1;
  end

  always_comb begin
    out_valid = 1'b0;
    out_y     = '0;
    out_tag   = '0;
    for (int d = 0; d < NDIV; d++) begin
      if (done[d]) begin
        out_valid = 1'b1;
        out_y     = y[d];
        out_tag   = tag[d];
      end
    end
  end

  // Fixed latency and in-order issue mean at most one result per cycle.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(done));
endmodule
