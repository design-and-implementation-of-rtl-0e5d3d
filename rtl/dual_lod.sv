// dual_lod: dual-mode 64:6 leading-one detector.
//
// Two 32:5 detectors work on the two 32-bit halves of the unified mantissa.
// In dual-SP mode each one gives the leading-zero count of its own single
// precision mantissa (SP-1 in [31:0], SP-2 in [63:32]). In DP mode their
// outputs are combined into the 6-bit count of the whole word. No logic is
// added for the dual mode beyond zeroing the unused counts: in DP mode the
// SP counts are forced to zero, in SP mode the DP count is. Mantissas are
// expected left-aligned in their field, so the count is directly the left
// shift that normalizes them. Combinational.
//
// Structure as published (two 32:5 detectors combined for DP).
module dual_lod (
  input  logic [63:0] x,
  input  logic        dp_sp,   // 1: one DP mantissa, 0: two SP mantissas
  output logic [5:0]  lz_dp,
  output logic [4:0]  lz_sp1,
  output logic [4:0]  lz_sp2
);
  logic       v_hi, v_lo;
  logic [4:0] c_hi, c_lo;

  lod_tree #(.W(32)) u_hi (.x(x[63:32]), .valid(v_hi), .lz(c_hi));
  lod_tree #(.W(32)) u_lo (.x(x[31:0]),  .valid(v_lo), .lz(c_lo));

  logic [5:0] c_dp;
  assign c_dp = v_hi ? {1'b0, c_hi} : {1'b1, c_lo};

  assign lz_dp  = dp_sp ? c_dp : 6'd0;
  assign lz_sp1 = dp_sp ? 5'd0 : c_lo;
  assign lz_sp2 = dp_sp ? 5'd0 : c_hi;

  logic unused_v_lo;
  assign unused_v_lo = v_lo;
endmodule
