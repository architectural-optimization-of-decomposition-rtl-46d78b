// tb_fx_div_bank: drives one random stream of divisions into three divider
// banks (1, 3 and 40 dividers) and checks, for each bank,
//  - in_ready against a model of the round-robin issue (the next divider in
//    turn is free WIDTH+FRAC+1 cycles after its last issue),
//  - every result against the golden fixed-point division, bit for bit,
//  - that results return in issue order with their tags, exactly
//    WIDTH+FRAC+1 cycles after issue, and that nothing is left over.
// The stream runs first with in_valid always high, then at random; operands
// include zero divisors and the extreme values of the format.
module tb_fx_div_bank;
  import fx_ref_pkg::*;
  localparam int W  = 20;
  localparam int F  = 12;
  localparam int DL = W + F + 1;
  localparam int NI = 3;
  localparam int ND [NI] = '{1, 3, 40};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] a = '0, b = '0;
  logic [7:0] tag = '0;
  int checks = 0, failures = 0, issued_total = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NI; g++) begin : g_bank
    logic in_ready, out_valid;
    logic signed [W-1:0] out_y;
    logic [7:0] out_tag;

    fx_div_bank #(.WIDTH(W), .FRAC(F), .NDIV(ND[g]), .TAGW(8)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .a, .b, .in_tag(tag),
      .out_valid, .out_y, .out_tag);

    longint qy[$];
    int     qt[$], qc[$];
    int     free_at[ND[g]];
    int     nxt = 0, cyc = 0;

    initial foreach (free_at[d]) free_at[d] = 0;

    always @(posedge clk) if (rst_n) begin
      checks++;
      if (in_ready !== (cyc >= free_at[nxt])) begin
        failures++;
        $display("FAIL NDIV=%0d cycle %0d: in_ready=%0b", ND[g], cyc, in_ready);
      end
      if (in_valid && in_ready) begin
        qy.push_back(div(a, b, W, F));
        qt.push_back(int'(tag));
        qc.push_back(cyc + DL);
        free_at[nxt] = cyc + DL;
        nxt = (nxt + 1) % ND[g];
        if (g == 0) issued_total++;
      end
      if (out_valid) begin
        checks++;
        if (qy.size() == 0) begin
          failures++;
          $display("FAIL NDIV=%0d cycle %0d: unexpected result", ND[g], cyc);
        end else begin
          if (longint'(out_y) != qy[0] || int'(out_tag) != qt[0] || cyc != qc[0]) begin
            failures++;
            $display("FAIL NDIV=%0d cycle %0d: y=%0d tag=%0d, expected %0d tag %0d at cycle %0d",
                     ND[g], cyc, out_y, out_tag, qy[0], qt[0], qc[0]);
          end
          void'(qy.pop_front()); void'(qt.pop_front()); void'(qc.pop_front());
        end
      end else if (qc.size() != 0 && qc[0] <= cyc) begin
        failures++;
        $display("FAIL NDIV=%0d cycle %0d: result due at %0d missing", ND[g], cyc, qc[0]);
        void'(qy.pop_front()); void'(qt.pop_front()); void'(qc.pop_front());
      end
      cyc++;
    end
  end

  function automatic logic signed [W-1:0] pick();
    case ($urandom_range(0, 7))
      0:       return '0;
      1:       return {1'b0, {(W-1){1'b1}}};
      2:       return {1'b1, {(W-1){1'b0}}};
      3:       return W'($urandom_range(0, 1 << F) - (1 << (F - 1)));
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      in_valid = (t < 300) ? 1'b1 : 1'($urandom_range(0, 1));
      a   = pick();
      b   = pick();
      tag = 8'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (DL + 5) @(negedge clk);
    for (int g = 0; g < NI; g++) checks++;
    if (g_bank[0].qy.size() != 0 || g_bank[1].qy.size() != 0 || g_bank[2].qy.size() != 0) begin
      failures++;
      $display("FAIL results left outstanding");
    end
    $display("divisions issued to the 1-divider bank: %0d", issued_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
