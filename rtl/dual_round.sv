// dual_round: dual-mode round-to-nearest-even of the quotient mantissa.
//
// Input j is the quotient after the right shifter: DP 1.63 in [63:0], or
// SP 1.31 in [63:32] (SP-2) and [31:0] (SP-1). The rounding position depends
// on the quotient MSB: when the MSB is 0 and the lane may still normalize
// (norm_* = 1, i.e. its exponent is above the minimum) the mantissa is taken
// one bit lower (a 1-bit left normalization) and low_* reports it. Guard,
// round and sticky bits below the kept mantissa, plus the sticky bit from the
// right shifter, give the ULP of each lane; this part is separate for DP,
// SP-1 and SP-2. The ULP addition is shared: two 32-bit incrementers, chained
// through the carry in DP mode and independent in SP mode.
// Output r: DP mantissa (53 bits plus carry-out) in [53:0], or SP-1 in
// [24:0] and SP-2 in [56:32], each with its carry-out as top bit.
// Combinational.
//
// The rounding-position choice, the separate ULP logic and the shared
// chained incrementers follow the published architecture; ties-to-even is
// this design's choice of tie rule.
module dual_round (
  input  logic [63:0] j,
  input  logic        dp_sp,
  input  logic        sticky_lo,   // DP or SP-1
  input  logic        sticky_hi,   // SP-2
  input  logic        norm_dp,
  input  logic        norm_sp1,
  input  logic        norm_sp2,
  output logic [63:0] r,
  output logic        low_dp,
  output logic        low_sp1,
  output logic        low_sp2,
  output logic        inexact_lo,
  output logic        inexact_hi
);
  logic [52:0] m_dp;
  logic [23:0] m_sp1, m_sp2;
  logic        g_dp, r_dp, s_dp, u_dp;
  logic        g1, r1, s1, u1, g2, r2, s2, u2;

  function automatic void sp_lane(input logic [31:0] x, input logic stk, input logic low,
                                  output logic [23:0] m, output logic g,
                                  output logic rb, output logic s);
    m  = low ? x[30:7] : x[31:8];
    g  = low ? x[6]    : x[7];
    rb = low ? x[5]    : x[6];
    s  = (low ? |x[4:0] : |x[5:0]) | stk;
  endfunction

  always_comb begin
    low_dp  = ~j[63] & norm_dp;
    low_sp1 = ~j[31] & norm_sp1;
    low_sp2 = ~j[63] & norm_sp2;

    m_dp = low_dp ? j[62:10] : j[63:11];
    g_dp = low_dp ? j[9]     : j[10];
    r_dp = low_dp ? j[8]     : j[9];
    s_dp = (low_dp ? |j[7:0] : |j[8:0]) | sticky_lo;
    u_dp = g_dp & (r_dp | s_dp | m_dp[0]);

    sp_lane(j[31:0],  sticky_lo, low_sp1, m_sp1, g1, r1, s1);
    sp_lane(j[63:32], sticky_hi, low_sp2, m_sp2, g2, r2, s2);
    u1 = g1 & (r1 | s1 | m_sp1[0]);
    u2 = g2 & (r2 | s2 | m_sp2[0]);

    inexact_lo = dp_sp ? (g_dp | r_dp | s_dp) : (g1 | r1 | s1);
    inexact_hi = g2 | r2 | s2;
  end

  // shared ULP addition: two chained 32-bit incrementers
  logic [63:0] pre;
  logic [32:0] inc_lo;
  logic [31:0] inc_hi;
  assign pre    = dp_sp ? {11'd0, m_dp} : {8'd0, m_sp2, 8'd0, m_sp1};
  assign inc_lo = {1'b0, pre[31:0]} + 33'(dp_sp ? u_dp : u1);
  assign inc_hi = pre[63:32] + 32'(dp_sp ? inc_lo[32] : u2);
  assign r      = {inc_hi, inc_lo[31:0]};
endmodule
