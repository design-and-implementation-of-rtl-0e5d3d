// ks_adder: W-bit Kogge-Stone parallel-prefix adder (no carry in/out).
//
// Bitwise generate/propagate pairs are combined over ceil(log2 W) prefix
// levels, each level merging with the pair 2^l positions lower. The sum bit
// is the propagate bit XOR the carry into that position. Used as the final
// carry-propagate adder of the Booth multiplier. Combinational.
//
// The Kogge-Stone final adder is the published choice.
module ks_adder #(
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  localparam int unsigned L = $clog2(W);

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign s = p[0] ^ {g[L][W-2:0], 1'b0};
endmodule
