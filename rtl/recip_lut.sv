// recip_lut: initial reciprocal tables for the series-expansion divider.
//
// The normalized divisor mantissa m2 = 1.f is split into a1 = 1.xxxxxxxx
// (the hidden one and the first 8 fraction bits) and a2 (the rest). These
// tables return a1^-1 for the 256 possible a1 values:
//   - a shared 256 x 53 table, read as a 53-bit word for DP and, through its
//     top 24 bits, for SP-2;
//   - a 256 x 24 table used only by SP-1.
// Entries are round(2^53 * 256/(256+k)) and round(2^24 * 256/(256+k)), i.e.
// fractions with the binary point left of the MSB, so a1^-1 is in (0.5, 1];
// the entry for k = 0 (a1^-1 = 1) saturates to all ones. Both tables are
// computed at elaboration time from that formula. The SP-2 word is the
// shared entry rounded to 24 bits (top 24 bits plus bit 28, saturating).
// Reads are combinational: in the divider they sit in the first pipeline
// stage and are captured by its output register.
//
// The table sizes and the sharing follow the published architecture; the
// rounding of the entries, the k = 0 saturation and the rounded SP-2 slice
// are this design's own.
module recip_lut
  import dpdsp_pkg::*;
(
  input  logic [A1_BITS-1:0]    idx_hi,   // a1 bits of DP or of SP-2
  input  logic [A1_BITS-1:0]    idx_lo,   // a1 bits of SP-1
  output logic [DP_RECIP_W-1:0] recip_dp,
  output logic [SP_RECIP_W-1:0] recip_sp2,
  output logic [SP_RECIP_W-1:0] recip_sp1
);
  typedef logic [DP_RECIP_W-1:0] dp_tab_t [LUT_SIZE];
  typedef logic [SP_RECIP_W-1:0] sp_tab_t [LUT_SIZE];

  function automatic logic [63:0] recip_entry(int unsigned k, int unsigned bits);
    logic [63:0] num, den, r;
    num = 64'd1 << (bits + A1_BITS);
    den = 64'(LUT_SIZE + k);
    r   = (num + (den >> 1)) / den;
    if (r >= (64'd1 << bits)) r = (64'd1 << bits) - 64'd1;
    return r;
  endfunction

  function automatic dp_tab_t gen_dp_tab();
    dp_tab_t t;
    for (int unsigned k = 0; k < LUT_SIZE; k++)
      t[k] = DP_RECIP_W'(recip_entry(k, DP_RECIP_W));
    return t;
  endfunction

  function automatic sp_tab_t gen_sp_tab();
    sp_tab_t t;
    for (int unsigned k = 0; k < LUT_SIZE; k++)
      t[k] = SP_RECIP_W'(recip_entry(k, SP_RECIP_W));
    return t;
  endfunction

  localparam dp_tab_t DP_TAB = gen_dp_tab();
  localparam sp_tab_t SP_TAB = gen_sp_tab();

  localparam int unsigned CUT = DP_RECIP_W - SP_RECIP_W;  // 29

  logic [SP_RECIP_W:0] sp2_rnd;

  assign recip_dp  = DP_TAB[idx_hi];
  assign recip_sp1 = SP_TAB[idx_lo];
  assign sp2_rnd   = {1'b0, recip_dp[DP_RECIP_W-1:CUT]} + (SP_RECIP_W+1)'(recip_dp[CUT-1]);
  assign recip_sp2 = sp2_rnd[SP_RECIP_W] ? '1 : sp2_rnd[SP_RECIP_W-1:0];
endmodule
