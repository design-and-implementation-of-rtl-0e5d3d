// dual_sub: dual-mode 64-bit subtractor, y = a - b.
//
// Built as two 32-bit subtractors. In DP mode the borrow of the lower half
// feeds the upper half, giving one 64-bit subtraction; in dual-SP mode the
// chain is cut and each half is an independent 32-bit subtraction (SP-1 in
// [31:0], SP-2 in [63:32]). Combinational.
//
// The published design states the widths of these subtractions; sharing
// one unit for E and I is this design's own.
module dual_sub (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        dp_sp,
  output logic [63:0] y
);
  logic [32:0] lo;
  logic [31:0] hi;
  assign lo = {1'b0, a[31:0]} + {1'b0, ~b[31:0]} + 33'd1;
  assign hi = a[63:32] + ~b[63:32] + (dp_sp ? 32'(lo[32]) : 32'd1);
  assign y  = {hi, lo[31:0]};
endmodule
