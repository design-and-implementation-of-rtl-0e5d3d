// final_proc: post-rounding normalization, exceptions and output mux.
//
// Separately for DP, SP-1 and SP-2: if rounding carried out of the mantissa
// it is shifted right by one and the exponent incremented; the exponent is
// the lane's quotient exponent (raised to 1 for subnormal results, lowered
// by one when the rounder normalized left). A rounded mantissa whose hidden
// bit is 0 is a subnormal result and gets a zero exponent field; an exponent
// at or above the all-ones code is an overflow and gives infinity. The
// exceptional cases are then resolved in this priority order:
//   NaN  : either operand NaN, inf/inf, 0/0          -> quiet NaN
//   zero : finite/inf, or zero dividend               -> signed zero
//   inf  : inf/finite, x/0 (divide by zero), overflow -> signed infinity
//   else : the computed (normal or subnormal) result.
// A 64-bit 2:1 mux finally selects the DP result or the pair of SP results.
// Combinational.
//
// The priority order follows the published exception table; the canonical
// quiet NaN and the four status flags are this design's own.
module final_proc
  import dpdsp_pkg::*;
(
  input  logic               dp_sp,
  input  logic [63:0]        r,        // rounded mantissas from dual_round
  input  logic               low_dp, low_sp1, low_sp2,
  input  logic               inexact_lo, inexact_hi,
  input  logic signed [13:0] exp_dp,
  input  logic signed [10:0] exp_sp1,
  input  logic signed [10:0] exp_sp2,
  input  logic               sgn   [3],
  input  opnd_info_t         info1 [3],
  input  opnd_info_t         info2 [3],
  output logic [63:0]        result,
  output lane_status_t       status [3]
);
  typedef enum logic [1:0] {OUT_CALC, OUT_NAN, OUT_ZERO, OUT_INF} out_sel_t;

  function automatic out_sel_t resolve(opnd_info_t a, opnd_info_t b, logic ovf);
    if (a.nan || b.nan || (a.inf && b.inf) || (a.zero && b.zero)) return OUT_NAN;
    if (b.inf || a.zero)                                            return OUT_ZERO;
    if (a.inf || b.zero || ovf)                                     return OUT_INF;
    return OUT_CALC;
  endfunction

  logic [63:0]  res_dp;
  logic [31:0]  res_sp1, res_sp2;
  lane_status_t st_dp, st_sp1, st_sp2;

  // DP lane
  always_comb begin
    logic signed [13:0] ex;
    logic [52:0]        m;
    logic               ovf;
    out_sel_t           sel;
    ex = (exp_dp < 14'sd1) ? 14'sd1 : exp_dp;
    ex = ex - 14'(low_dp);
    if (r[53]) begin
      m  = r[53:1];
      ex = ex + 14'sd1;
    end else begin
      m  = r[52:0];
    end
    ovf = m[52] && (ex >= 14'sd2047);
    sel = resolve(info1[LANE_DP], info2[LANE_DP], ovf);
    unique case (sel)
      OUT_NAN:  res_dp = DP_QNAN;
      OUT_ZERO: res_dp = {sgn[LANE_DP], 63'd0};
      OUT_INF:  res_dp = {sgn[LANE_DP], 11'h7FF, 52'd0};
      default:  res_dp = {sgn[LANE_DP], (m[52] ? ex[10:0] : 11'd0), m[51:0]};
    endcase
    st_dp.invalid   = (sel == OUT_NAN);
    st_dp.div_zero  = (sel == OUT_INF) && info2[LANE_DP].zero && !info1[LANE_DP].inf;
    st_dp.overflow  = (sel == OUT_INF) && ovf && !info2[LANE_DP].zero && !info1[LANE_DP].inf;
    st_dp.underflow = (sel == OUT_CALC) && !m[52] && inexact_lo;
  end

  // SP lanes
  function automatic void sp_final(input logic signed [10:0] e, input logic low,
                                   input logic [24:0] rr, input logic s,
                                   input opnd_info_t a, input opnd_info_t b,
                                   input logic inexact,
                                   output logic [31:0] res, output lane_status_t st);
    logic signed [10:0] ex;
    logic [23:0]        m;
    logic               ovf;
    out_sel_t           sel;
    ex = (e < 11'sd1) ? 11'sd1 : e;
    ex = ex - 11'(low);
    if (rr[24]) begin
      m  = rr[24:1];
      ex = ex + 11'sd1;
    end else begin
      m  = rr[23:0];
    end
    ovf = m[23] && (ex >= 11'sd255);
    sel = resolve(a, b, ovf);
    unique case (sel)
      OUT_NAN:  res = SP_QNAN;
      OUT_ZERO: res = {s, 31'd0};
      OUT_INF:  res = {s, 8'hFF, 23'd0};
      default:  res = {s, (m[23] ? ex[7:0] : 8'd0), m[22:0]};
    endcase
    st.invalid   = (sel == OUT_NAN);
    st.div_zero  = (sel == OUT_INF) && b.zero && !a.inf;
    st.overflow  = (sel == OUT_INF) && ovf && !b.zero && !a.inf;
    st.underflow = (sel == OUT_CALC) && !m[23] && inexact;
  endfunction

  always_comb begin
    sp_final(exp_sp1, low_sp1, r[24:0], sgn[LANE_SP1], info1[LANE_SP1], info2[LANE_SP1],
             inexact_lo, res_sp1, st_sp1);
    sp_final(exp_sp2, low_sp2, r[56:32], sgn[LANE_SP2], info1[LANE_SP2], info2[LANE_SP2],
             inexact_hi, res_sp2, st_sp2);
  end

  assign result           = dp_sp ? res_dp : {res_sp2, res_sp1};
  assign status[LANE_DP]  = dp_sp ? st_dp  : '0;
  assign status[LANE_SP1] = dp_sp ? '0 : st_sp1;
  assign status[LANE_SP2] = dp_sp ? '0 : st_sp2;
endmodule
