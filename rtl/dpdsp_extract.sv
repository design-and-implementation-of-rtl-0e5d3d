// dpdsp_extract: data extraction, subnormal and exceptional checks.
//
// Splits each 64-bit operand into sign, exponent and fraction for DP and for
// both SP lanes at once, and classifies each (subnormal, zero, infinity,
// NaN). Because the 8 MSBs of the DP exponent coincide with the SP-2
// exponent, the all-zeros and all-ones exponent tests of SP-2 are reused for
// DP and only the remaining 3 exponent bits are tested separately.
// It then forms the unified mantissas M1 and M2 with two 64-bit muxes:
//   DP mode : {hidden, frac[51:0], 11'b0}
//   SP mode : {hidden2, frac2[22:0], 8'b0, hidden1, frac1[22:0], 8'b0}
// i.e. each mantissa is left-aligned in its field, so that the leading-one
// detector count equals the normalizing left shift. The hidden bit is 0 for
// a zero exponent field. Combinational.
//
// The shared SP-2/DP exponent tests and the unified mantissas follow the
// published architecture. The NaN test here is the full IEEE one (exponent
// all ones, fraction non-zero), which also catches signalling NaNs.
module dpdsp_extract
  import dpdsp_pkg::*;
(
  input  logic [63:0] in1,     // dividend word
  input  logic [63:0] in2,     // divisor word
  input  logic        dp_sp,
  output opnd_info_t  info1 [3],  // dividend, lanes SP-1, SP-2, DP
  output opnd_info_t  info2 [3],  // divisor
  output logic [63:0] m1,
  output logic [63:0] m2
);
  function automatic void classify(input logic [63:0] x,
                                   output opnd_info_t sp1,
                                   output opnd_info_t sp2,
                                   output opnd_info_t dp);
    logic sp1_e0, sp1_e1, sp2_e0, sp2_e1, dp_e0, dp_e1;
    logic sp1_f0, sp2_f0, dp_f0;
    sp1_e0 = ~|x[30:23];
    sp1_e1 =  &x[30:23];
    sp2_e0 = ~|x[62:55];
    sp2_e1 =  &x[62:55];
    dp_e0  = sp2_e0 & ~|x[54:52];   // shared with SP-2
    dp_e1  = sp2_e1 &  &x[54:52];
    sp1_f0 = ~|x[22:0];
    sp2_f0 = ~|x[54:32];
    dp_f0  = ~|x[51:32] & ~|x[31:0];

    sp1 = '{sgn: x[31], exp: {3'd0, x[30:23]}, sn: sp1_e0, zero: sp1_e0 & sp1_f0,
            inf: sp1_e1 & sp1_f0, nan: sp1_e1 & ~sp1_f0};
    sp2 = '{sgn: x[63], exp: {3'd0, x[62:55]}, sn: sp2_e0, zero: sp2_e0 & sp2_f0,
            inf: sp2_e1 & sp2_f0, nan: sp2_e1 & ~sp2_f0};
    dp  = '{sgn: x[63], exp: x[62:52], sn: dp_e0, zero: dp_e0 & dp_f0,
            inf: dp_e1 & dp_f0, nan: dp_e1 & ~dp_f0};
  endfunction

  opnd_info_t a_sp1, a_sp2, a_dp, b_sp1, b_sp2, b_dp;

  always_comb begin
    classify(in1, a_sp1, a_sp2, a_dp);
    classify(in2, b_sp1, b_sp2, b_dp);
  end

  assign info1[LANE_SP1] = a_sp1;
  assign info1[LANE_SP2] = a_sp2;
  assign info1[LANE_DP]  = a_dp;
  assign info2[LANE_SP1] = b_sp1;
  assign info2[LANE_SP2] = b_sp2;
  assign info2[LANE_DP]  = b_dp;

  assign m1 = dp_sp ? {~a_dp.sn, in1[51:0], 11'd0}
                    : {~a_sp2.sn, in1[54:32], 8'd0, ~a_sp1.sn, in1[22:0], 8'd0};
  assign m2 = dp_sp ? {~b_dp.sn, in2[51:0], 11'd0}
                    : {~b_sp2.sn, in2[54:32], 8'd0, ~b_sp1.sn, in2[22:0], 8'd0};
endmodule
