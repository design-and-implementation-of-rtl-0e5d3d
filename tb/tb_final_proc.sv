// tb_final_proc: checks final normalization and exception resolution.
// Computed results: a rounded mantissa M (possibly with carry-out) and a
// quotient exponent are turned into the expected encoding through real
// arithmetic, value = M * 2^(ex - bias - p + 1), which is exact and lets the
// simulator's own float format decide normal, subnormal or infinity.
// Exceptional operand classes are drawn at random and the expected result
// follows the IEEE-754 rules for division (NaN, signed zero, signed
// infinity); the status flags are checked against the same rules.
module tb_final_proc;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  logic               dp_sp;
  logic [63:0]        r, result;
  logic               low_dp, low_sp1, low_sp2, inexact_lo, inexact_hi;
  logic signed [13:0] exp_dp;
  logic signed [10:0] exp_sp1, exp_sp2;
  logic               sgn [3];
  opnd_info_t         info1 [3], info2 [3];
  lane_status_t       status [3];
  int checks = 0, failures = 0;
  int n_calc = 0, n_exc = 0;

  final_proc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic opnd_info_t rnd_class();
    opnd_info_t i;
    i = '0;
    case ($urandom_range(0, 9))
      0: i.nan  = 1'b1;
      1: i.inf  = 1'b1;
      2: i.zero = 1'b1;
      default: ;
    endcase
    return i;
  endfunction

  // expected result of one lane: 0 = computed, 1 = NaN, 2 = zero, 3 = inf
  function automatic int ieee_case(opnd_info_t a, opnd_info_t b);
    if (a.nan || b.nan) return 1;
    if (a.inf) return b.inf ? 1 : 3;
    if (a.zero) return b.zero ? 1 : 2;
    if (b.inf) return 2;
    if (b.zero) return 3;
    return 0;
  endfunction

  function automatic logic [63:0] exp_dp_lane(int c, logic s, logic [53:0] m, int e, logic low);
    int ex;
    real v;
    logic [63:0] b;
    if (c == 1) return DP_QNAN;
    if (c == 2) return {s, 63'd0};
    if (c == 3) return {s, 11'h7FF, 52'd0};
    ex = ((e < 1) ? 1 : e) - (low ? 1 : 0);
    v  = real'(m) * (2.0 ** (ex - 1075));
    b  = $realtobits(v);
    return {s, b[62:0]};
  endfunction

  function automatic logic [31:0] exp_sp_lane(int c, logic s, logic [24:0] m, int e, logic low);
    int ex;
    real v;
    logic [31:0] b;
    if (c == 1) return SP_QNAN;
    if (c == 2) return {s, 31'd0};
    if (c == 3) return {s, 8'hFF, 23'd0};
    ex = ((e < 1) ? 1 : e) - (low ? 1 : 0);
    v  = real'(m) * (2.0 ** (ex - 150));
    if (v >= 2.0 ** 128) return {s, 8'hFF, 23'd0};
    b = real_to_sp(v);
    return {s, b[30:0]};
  endfunction

  initial begin
    logic [63:0] e;
    int c0, c1, c2;
    logic [53:0] mdp;
    logic [24:0] m1, m2;
    for (int n = 0; n < 6000; n++) begin
      dp_sp = 1'($urandom);
      for (int l = 0; l < 3; l++) begin
        info1[l] = rnd_class();
        info2[l] = rnd_class();
        sgn[l]   = 1'($urandom);
      end
      // rounded mantissas: normal (hidden bit set), subnormal or carried out
      case ($urandom_range(0, 3))
        0: mdp = 54'd1 << 53;
        1: mdp = 54'($urandom_range(1, 1000000)) * 54'($urandom);
        default: mdp = {2'b01, 52'({$urandom, $urandom})};
      endcase
      mdp &= (54'd1 << 54) - 1;
      m1 = ($urandom_range(0, 3) == 0) ? 25'($urandom_range(0, 8388607)) :
           ($urandom_range(0, 5) == 0) ? 25'd1 << 24 : {2'b01, 23'($urandom)};
      m2 = ($urandom_range(0, 3) == 0) ? 25'($urandom_range(0, 8388607)) : {2'b01, 23'($urandom)};
      exp_dp  = 14'sd1023 + 14'($signed($urandom_range(0, 2400)) - 1200);
      exp_sp1 = 11'sd127 + 11'($signed($urandom_range(0, 300)) - 150);
      exp_sp2 = 11'sd127 + 11'($signed($urandom_range(0, 300)) - 150);
      // the rounder only takes the low position when the exponent allows it
      low_dp  = (exp_dp > 1) && 1'($urandom);
      low_sp1 = (exp_sp1 > 1) && 1'($urandom);
      low_sp2 = (exp_sp2 > 1) && 1'($urandom);
      // a subnormal mantissa only occurs at the minimum exponent
      if (!mdp[52] && !mdp[53]) exp_dp = $signed(14'($urandom_range(0, 1))) - 14'sd50 * 14'($urandom_range(0, 1));
      if (!m1[23] && !m1[24]) exp_sp1 = 11'sd1 - 11'sd20 * 11'($urandom_range(0, 1));
      if (!m2[23] && !m2[24]) exp_sp2 = 11'sd1 - 11'sd20 * 11'($urandom_range(0, 1));
      if (!mdp[52] && !mdp[53]) low_dp = 1'b0;
      if (!m1[23] && !m1[24]) low_sp1 = 1'b0;
      if (!m2[23] && !m2[24]) low_sp2 = 1'b0;
      r = dp_sp ? 64'(mdp) : {7'd0, m2, 7'd0, m1};
      inexact_lo = 1'b1;
      inexact_hi = 1'b1;
      #1;
      checks++;
      if (dp_sp) begin
        c0 = ieee_case(info1[LANE_DP], info2[LANE_DP]);
        e  = exp_dp_lane(c0, sgn[LANE_DP], mdp, int'(exp_dp), low_dp);
        if (c0 == 0) n_calc++; else n_exc++;
        if (status[LANE_DP].invalid != (c0 == 1) ||
            status[LANE_DP].div_zero != (c0 == 3 && info2[LANE_DP].zero && !info1[LANE_DP].inf))
          failures++;
      end else begin
        c1 = ieee_case(info1[LANE_SP1], info2[LANE_SP1]);
        c2 = ieee_case(info1[LANE_SP2], info2[LANE_SP2]);
        e  = {exp_sp_lane(c2, sgn[LANE_SP2], m2, int'(exp_sp2), low_sp2),
              exp_sp_lane(c1, sgn[LANE_SP1], m1, int'(exp_sp1), low_sp1)};
        if (c1 == 0) n_calc++; else n_exc++;
        if (status[LANE_SP1].invalid != (c1 == 1) || status[LANE_SP2].invalid != (c2 == 1))
          failures++;
      end
      if (result !== e) begin
        failures++;
        if (failures < 10)
          $display("mode=%0d r=%h e=%0d/%0d/%0d low=%b%b%b got=%h exp=%h", dp_sp, r, exp_dp,
                   exp_sp1, exp_sp2, low_dp, low_sp1, low_sp2, result, e);
      end
    end
    checks++;
    if (n_calc == 0 || n_exc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
