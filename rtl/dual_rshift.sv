// dual_rshift: dual-mode 6-stage dynamic right shifter with sticky capture.
//
// Used on the quotient mantissa when the result is subnormal. Stage 1 shifts
// by 32 in DP mode only; stages 2..6 shift by 16, 8, 4, 2, 1 and hold one mux
// per 32-bit half plus a mux that, for the lower half in DP mode, takes in
// the bits crossing over from the upper half. In dual-SP mode the two halves
// are shifted independently (SP-1 in [31:0], SP-2 in [63:32]).
// Every bit shifted out below a lane is ORed into that lane's sticky output
// (sticky_lo serves DP and SP-1, sticky_hi serves SP-2), so that rounding
// after the shift still sees it. Combinational.
//
// Stage structure as published; the sticky outputs are this design's own.
module dual_rshift (
  input  logic [63:0] x,
  input  logic        dp_sp,
  input  logic [5:0]  sh_dp,
  input  logic [4:0]  sh_sp1,
  input  logic [4:0]  sh_sp2,
  output logic [63:0] y,
  output logic        sticky_lo,
  output logic        sticky_hi
);
  always_comb begin
    logic [63:0] v;
    logic [31:0] lo_sp, lo_dp, hi, lo_out, hi_out;
    logic        b_hi, b_lo;
    int unsigned s;
    v         = x;
    sticky_lo = 1'b0;
    sticky_hi = 1'b0;
    if (dp_sp && sh_dp[5]) begin
      sticky_lo = |v[31:0];
      v         = {32'd0, v[63:32]};
    end
    for (int k = 4; k >= 0; k--) begin
      s      = 1 << k;
      b_lo   = dp_sp ? sh_dp[k] : sh_sp1[k];
      b_hi   = dp_sp ? sh_dp[k] : sh_sp2[k];
      lo_sp  = v[31:0] >> s;
      lo_dp  = 32'(v >> s);
      hi     = v[63:32] >> s;
      lo_out = v[31:0];
      hi_out = v[63:32];
      if (b_lo) begin
        sticky_lo = sticky_lo | ((v[31:0] & ((32'd1 << s) - 32'd1)) != 32'd0);
        lo_out    = dp_sp ? lo_dp : lo_sp;
      end
      if (b_hi) begin
        if (!dp_sp) sticky_hi = sticky_hi | ((v[63:32] & ((32'd1 << s) - 32'd1)) != 32'd0);
        hi_out = hi;
      end
      v = {hi_out, lo_out};
    end
    y = v;
  end
endmodule
