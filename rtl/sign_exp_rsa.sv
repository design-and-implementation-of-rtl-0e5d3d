// sign_exp_rsa: sign, exponent and right-shift amount of the quotient.
//
// For DP and for both SP lanes in parallel:
//   sign = s1 ^ s2 (the SP-2 sign is also the DP sign)
//   e    = BIAS + (e1' - ls1) - (e2' - ls2)
// where e' is the biased exponent field, taken as 1 when the field is zero
// (subnormal operand), and ls is the normalizing left shift from the
// leading-one detector. e is the biased exponent of the quotient before its
// own normalization; it is returned as a signed value wide enough for every
// operand combination. When e < 1 the quotient is subnormal and must be
// shifted right by rs = 1 - e before rounding; rs is clamped to 63 (DP) or
// 31 (SP), beyond which every bit ends up in the sticky bit anyway.
// Combinational.
//
// The formulas follow the published architecture. Counting a subnormal's
// exponent field as 1 and the 1 - e shift amount (rather than -e) are
// this design's own and match its quotient range and rounding position.
module sign_exp_rsa
  import dpdsp_pkg::*;
(
  input  opnd_info_t         info1 [3],
  input  opnd_info_t         info2 [3],
  input  logic [5:0]         ls1_dp,  ls2_dp,
  input  logic [4:0]         ls1_sp1, ls2_sp1,
  input  logic [4:0]         ls1_sp2, ls2_sp2,
  output logic               sgn     [3],
  output logic signed [13:0] exp_dp,
  output logic signed [10:0] exp_sp1,
  output logic signed [10:0] exp_sp2,
  output logic [5:0]         rs_dp,
  output logic [4:0]         rs_sp1,
  output logic [4:0]         rs_sp2
);
  function automatic logic signed [13:0] eff_exp(opnd_info_t i);
    return i.sn ? 14'sd1 : $signed({3'd0, i.exp});
  endfunction

  always_comb begin
    logic signed [13:0] e, r;
    for (int l = 0; l < 3; l++) sgn[l] = info1[l].sgn ^ info2[l].sgn;

    e      = 14'(BIAS_DP) + (eff_exp(info1[LANE_DP]) - $signed({8'd0, ls1_dp}))
                          - (eff_exp(info2[LANE_DP]) - $signed({8'd0, ls2_dp}));
    exp_dp = e;
    r      = 14'sd1 - e;
    rs_dp  = (r <= 0) ? 6'd0 : (r > 63) ? 6'd63 : r[5:0];

    e       = 14'(BIAS_SP) + (eff_exp(info1[LANE_SP1]) - $signed({9'd0, ls1_sp1}))
                           - (eff_exp(info2[LANE_SP1]) - $signed({9'd0, ls2_sp1}));
    exp_sp1 = e[10:0];
    r       = 14'sd1 - e;
    rs_sp1  = (r <= 0) ? 5'd0 : (r > 31) ? 5'd31 : r[4:0];

    e       = 14'(BIAS_SP) + (eff_exp(info1[LANE_SP2]) - $signed({9'd0, ls1_sp2}))
                           - (eff_exp(info2[LANE_SP2]) - $signed({9'd0, ls2_sp2}));
    exp_sp2 = e[10:0];
    r       = 14'sd1 - e;
    rs_sp2  = (r <= 0) ? 5'd0 : (r > 31) ? 5'd31 : r[4:0];
  end
endmodule
