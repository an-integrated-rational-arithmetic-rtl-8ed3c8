// cs_to_twos: carry-look-ahead adder that turns a carry-save number into
// an ordinary two's complement word, y = c + p modulo 2^W.
//
// Bit generate and propagate signals are combined in a parallel-prefix
// (Kogge-Stone) tree of ceil(log2 W) levels, so every carry is known after a
// logarithmic number of gate levels. The design calls for a carry-look-ahead
// adder for this conversion when results leave the unit; the prefix-tree
// structure is this design's choice. Purely combinational.
module cs_to_twos #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] c,   // carry word
  input  logic [W-1:0] p,   // place word
  output logic [W-1:0] y    // c + p, two's complement
);

  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LV+1];
  logic [W-1:0] t [LV+1];

  assign g[0] = c & p;
  assign t[0] = c ^ p;

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_comb
        assign g[l+1][i] = g[l][i] | (t[l][i] & g[l][i-D]);
        assign t[l+1][i] = t[l][i] & t[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign t[l+1][i] = t[l][i];
      end
    end
  end

  // carry into bit i is the group generate of bits i-1..0
  logic [W-1:0] cin;
  assign cin = {g[LV][W-2:0], 1'b0};
  assign y   = (c ^ p) ^ cin;

endmodule
