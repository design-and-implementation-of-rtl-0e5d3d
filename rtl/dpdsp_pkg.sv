// dpdsp_pkg: types and constants shared by the dual-mode (DPdSP) divider.
//
// The divider works on 64-bit words that hold either one IEEE-754 double
// (binary64) or two IEEE-754 singles (binary32): SP-1 in bits [31:0] and
// SP-2 in bits [63:32]. The mode bit dp_sp is 1 for double precision and 0
// for dual single precision. Lane indices used throughout: 0 = SP-1,
// 1 = SP-2, 2 = DP.
package dpdsp_pkg;

  // Width of the a1 slice of the divisor mantissa (bits right of the point)
  // that addresses the reciprocal tables (the W of the series expansion).
  localparam int unsigned A1_BITS  = 8;
  localparam int unsigned LUT_SIZE = 1 << A1_BITS;

  localparam int unsigned DP_RECIP_W = 53;  // reciprocal word, DP / SP-2 table
  localparam int unsigned SP_RECIP_W = 24;  // reciprocal word, SP-1 table

  localparam int signed BIAS_DP = 1023;
  localparam int signed BIAS_SP = 127;

  localparam int unsigned LANE_SP1 = 0;
  localparam int unsigned LANE_SP2 = 1;
  localparam int unsigned LANE_DP  = 2;

  // Canonical quiet NaNs produced for invalid operations.
  localparam logic [63:0] DP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [31:0] SP_QNAN = 32'h7FC0_0000;

  // Classification of one operand in one lane, produced by the data
  // extraction stage. exp is the raw biased exponent field, zero-extended.
  typedef struct packed {
    logic        sgn;
    logic [10:0] exp;
    logic        sn;    // exponent field is zero (subnormal or zero)
    logic        zero;
    logic        inf;
    logic        nan;
  } opnd_info_t;

  // Per-lane status reported with every result.
  typedef struct packed {
    logic invalid;   // NaN produced (NaN operand, inf/inf or 0/0)
    logic div_zero;  // finite non-zero dividend divided by zero
    logic overflow;  // finite result too large, infinity returned
    logic underflow; // subnormal or zero result from a finite quotient
  } lane_status_t;

  // States of the iterative mantissa divider. S0..S8 are used with the
  // single-stage multiplier (Fig. 10); the two-stage multiplier adds the
  // wait states S1_T, S2_T, S3_T, S5_T and S6_T (Fig. 13).
  typedef enum logic [3:0] {
    ST_IDLE, ST_S0, ST_S1, ST_S1T, ST_S2, ST_S2T, ST_S3, ST_S3T, ST_S4, ST_S5,
    ST_S5T, ST_S6, ST_S6T, ST_S7, ST_S8
  } mdiv_state_t;

endpackage
