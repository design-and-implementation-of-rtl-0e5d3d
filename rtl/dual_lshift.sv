// dual_lshift: dual-mode 6-stage dynamic left (barrel) shifter.
//
// Stage 1 shifts by 32 and is used only in DP mode, driven by the MSB of the
// 6-bit DP amount. Stages 2..6 shift by 16, 8, 4, 2 and 1 and are dual-mode:
// each holds one mux per 32-bit half, shifting that half by its own amount
// bit (SP-1 for [31:0], SP-2 for [63:32]). A third mux per stage selects, for
// the upper half in DP mode, the version that takes in the bits crossing over
// from the lower half. In SP mode the unit thus behaves as two independent
// 32-bit shifters. Amount inputs not used in the current mode are ignored.
// Combinational. FIRST_STAGE and LAST_STAGE (1..6) select a run of the
// stages, so the shifter can be cut by a pipeline register: stages 1..4 and
// 5..6 in series equal the whole shifter (the default, 1..6).
//
// Stage structure as published; the stage-range parameters are this
// design's own, to place the six-stage version's register.
module dual_lshift #(
  parameter int unsigned FIRST_STAGE = 1,
  parameter int unsigned LAST_STAGE  = 6
) (
  input  logic [63:0] x,
  input  logic        dp_sp,
  input  logic [5:0]  sh_dp,
  input  logic [4:0]  sh_sp1,
  input  logic [4:0]  sh_sp2,
  output logic [63:0] y
);
  always_comb begin
    logic [63:0] v;
    logic [31:0] hi_sp, hi_dp, lo;
    logic        b_hi, b_lo;
    int unsigned s;
    v = x;
    // stage 1: DP only, shift by 32
    if (FIRST_STAGE <= 1 && LAST_STAGE >= 1 && dp_sp && sh_dp[5]) v = {v[31:0], 32'd0};
    // stages 2..6 (shift by 2^k, k = 6 - stage): dual mode
    for (int k = 4; k >= 0; k--) begin
      if (6 - k < FIRST_STAGE || 6 - k > LAST_STAGE) continue;
      s     = 1 << k;
      b_lo  = dp_sp ? sh_dp[k] : sh_sp1[k];
      b_hi  = dp_sp ? sh_dp[k] : sh_sp2[k];
      hi_sp = v[63:32] << s;
      hi_dp = 32'((v << s) >> 32);
      lo    = v[31:0] << s;
      if (b_hi) v[63:32] = dp_sp ? hi_dp : hi_sp;
      if (b_lo) v[31:0]  = lo;
    end
    y = v;
  end
endmodule
