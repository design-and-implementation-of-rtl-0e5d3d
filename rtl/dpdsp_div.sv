// dpdsp_div: dual-mode double precision / dual single precision (DPdSP)
// floating-point divider, iterative, built around one shared dual-mode
// multiplier.
//
// One 64-bit operand pair holds either one IEEE-754 binary64 division
// (dp_sp = 1) or two independent binary32 divisions (dp_sp = 0; SP-1 in
// bits [31:0], SP-2 in bits [63:32]). Normal and subnormal operands and
// results are supported, as are infinities, NaNs, zeros and divide by zero.
// Rounding is round-to-nearest-even applied to a series-expansion quotient
// that is accurate to within one unit in the last place, so results are
// faithfully rounded (at most 1 ulp from the correctly rounded quotient in
// DP; see the mantissa divider for the dual-SP bound).
//
// Stage 1: data extraction and exceptional checks, unified mantissas,
//   dual-mode leading-one detection and left shift of subnormal mantissas,
//   reciprocal table look-up.
// Stage 2: the mantissa FSM; sign, exponent and right-shift amount are
//   registered in its first state.
// Stage 3: dual-mode right shift of subnormal quotients, dual-mode rounding,
//   final normalization, exception resolution and output multiplexing.
//
// MULT_STAGES = 1 (default) is the three-stage version with a single-stage
// multiplier: stages 1 and 3 take one cycle each and the FSM 9 (DP) or 7
// (dual SP) cycles. Latency 11 / 9 cycles, a new operation every 10 / 8.
// MULT_STAGES = 2 is the six-stage version: registers are added inside the
// left shifter (after its fourth stage), inside the multiplier (after the
// sixth carry-save level) and after rounding, and the FSM grows to 14 (DP) /
// 10 (dual SP) states. Latency 18 / 14 cycles, a new operation every 15 / 11:
// the extra stage-1 register lets the next operation enter while the FSM is
// in its last state.
//
// Handshake: an operation is accepted in a cycle with in_valid & in_ready.
// in_ready is high while the mantissa FSM is idle (and, in the six-stage
// version, also in its last state when no operation is between stage 1 and
// the FSM). out_valid is a one-cycle pulse with out, out_dp_sp and status.
// Asynchronous active-low reset. The reset also disables the assertion at
// the end (sampled on the clock), which is why lint reports rst_n as used
// both asynchronously and synchronously; the logic uses it only as an
// asynchronous reset.
//
// The stage split, the FSM-bound timing and the six-stage register places
// follow the published architecture; the handshake, the reset and the early
// in_ready of the six-stage version are this design's own.
module dpdsp_div
  import dpdsp_pkg::*;
#(
  parameter int unsigned MULT_STAGES = 1  // 1 or 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         dp_sp,
  input  logic [63:0]  in1,       // dividend(s)
  input  logic [63:0]  in2,       // divisor(s)
  output logic         out_valid,
  output logic         out_dp_sp,
  output logic [63:0]  out,       // quotient(s)
  output lane_status_t status [3]
);
  localparam bit PIPE = (MULT_STAGES == 2);
  // last left-shifter stage before the stage-1 pipeline register
  localparam int unsigned LSH_SPLIT = PIPE ? 4 : 6;

  // ---------------- stage 1 ----------------
  opnd_info_t x_info1 [3], x_info2 [3];
  logic [63:0] x_m1, x_m2, x_m1a, x_m2a;
  logic [5:0]  x_ls1_dp, x_ls2_dp;
  logic [4:0]  x_ls1_sp1, x_ls1_sp2, x_ls2_sp1, x_ls2_sp2;

  logic        in_fire;
  mdiv_state_t fsm_state;
  logic        fsm_busy, fsm_done;
  logic [63:0] fsm_q;

  dpdsp_extract u_ext (.in1(in1), .in2(in2), .dp_sp(dp_sp),
                       .info1(x_info1), .info2(x_info2), .m1(x_m1), .m2(x_m2));

  dual_lod u_lod1 (.x(x_m1), .dp_sp(dp_sp), .lz_dp(x_ls1_dp), .lz_sp1(x_ls1_sp1), .lz_sp2(x_ls1_sp2));
  dual_lod u_lod2 (.x(x_m2), .dp_sp(dp_sp), .lz_dp(x_ls2_dp), .lz_sp1(x_ls2_sp1), .lz_sp2(x_ls2_sp2));

  dual_lshift #(.FIRST_STAGE(1), .LAST_STAGE(LSH_SPLIT)) u_lsh1 (
    .x(x_m1), .dp_sp(dp_sp), .sh_dp(x_ls1_dp), .sh_sp1(x_ls1_sp1), .sh_sp2(x_ls1_sp2), .y(x_m1a));
  dual_lshift #(.FIRST_STAGE(1), .LAST_STAGE(LSH_SPLIT)) u_lsh2 (
    .x(x_m2), .dp_sp(dp_sp), .sh_dp(x_ls2_dp), .sh_sp1(x_ls2_sp1), .sh_sp2(x_ls2_sp2), .y(x_m2a));

  // v_*: stage-1 values after the optional pipeline register; v_fire marks
  // the cycle in which they belong to a new operation
  logic        v_fire, v_mode;
  opnd_info_t  v_info1 [3], v_info2 [3];
  logic [63:0] v_m1n, v_m2n;
  logic [5:0]  v_ls1_dp, v_ls2_dp;
  logic [4:0]  v_ls1_sp1, v_ls1_sp2, v_ls2_sp1, v_ls2_sp2;

  if (PIPE) begin : g_p1
    logic [63:0] v_m1a, v_m2a;  // after shifter stages 1..4
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_fire    <= 1'b0;
        v_mode    <= 1'b1;
        v_info1   <= '{default: '0};
        v_info2   <= '{default: '0};
        v_m1a     <= '0;
        v_m2a     <= '0;
        v_ls1_dp  <= '0;
        v_ls2_dp  <= '0;
        v_ls1_sp1 <= '0;
        v_ls1_sp2 <= '0;
        v_ls2_sp1 <= '0;
        v_ls2_sp2 <= '0;
      end else begin
        v_fire <= in_fire;
        if (in_fire) begin
          v_mode    <= dp_sp;
          v_info1   <= x_info1;
          v_info2   <= x_info2;
          v_m1a     <= x_m1a;
          v_m2a     <= x_m2a;
          v_ls1_dp  <= x_ls1_dp;
          v_ls2_dp  <= x_ls2_dp;
          v_ls1_sp1 <= x_ls1_sp1;
          v_ls1_sp2 <= x_ls1_sp2;
          v_ls2_sp1 <= x_ls2_sp1;
          v_ls2_sp2 <= x_ls2_sp2;
        end
      end
    end
    // shifter stages 5 and 6
    dual_lshift #(.FIRST_STAGE(5), .LAST_STAGE(6)) u_lsh1b (
      .x(v_m1a), .dp_sp(v_mode), .sh_dp(v_ls1_dp), .sh_sp1(v_ls1_sp1), .sh_sp2(v_ls1_sp2), .y(v_m1n));
    dual_lshift #(.FIRST_STAGE(5), .LAST_STAGE(6)) u_lsh2b (
      .x(v_m2a), .dp_sp(v_mode), .sh_dp(v_ls2_dp), .sh_sp1(v_ls2_sp1), .sh_sp2(v_ls2_sp2), .y(v_m2n));
  end else begin : g_no_p1
    assign v_fire    = in_fire;
    assign v_mode    = dp_sp;
    assign v_info1   = x_info1;
    assign v_info2   = x_info2;
    assign v_m1n     = x_m1a;
    assign v_m2n     = x_m2a;
    assign v_ls1_dp  = x_ls1_dp;
    assign v_ls2_dp  = x_ls2_dp;
    assign v_ls1_sp1 = x_ls1_sp1;
    assign v_ls1_sp2 = x_ls1_sp2;
    assign v_ls2_sp1 = x_ls2_sp1;
    assign v_ls2_sp2 = x_ls2_sp2;
  end

  // a1 = 8 bits right of the point of the normalized divisor mantissa(s)
  logic [DP_RECIP_W-1:0] v_rdp;
  logic [SP_RECIP_W-1:0] v_rsp1, v_rsp2;
  recip_lut u_lut (.idx_hi(v_m2n[62:55]), .idx_lo(v_m2n[30:23]),
                   .recip_dp(v_rdp), .recip_sp2(v_rsp2), .recip_sp1(v_rsp1));

  logic        s1_mode;
  opnd_info_t  s1_info1 [3], s1_info2 [3];
  logic [63:0] s1_m1, s1_m2;
  logic [5:0]  s1_ls1_dp, s1_ls2_dp;
  logic [4:0]  s1_ls1_sp1, s1_ls1_sp2, s1_ls2_sp1, s1_ls2_sp2;
  logic [DP_RECIP_W-1:0] s1_rdp;
  logic [SP_RECIP_W-1:0] s1_rsp1, s1_rsp2;

  if (PIPE) begin : g_rdy2
    assign in_ready = !v_fire && (fsm_state == ST_IDLE || fsm_state == ST_S8);
  end else begin : g_rdy1
    assign in_ready = (fsm_state == ST_IDLE);
  end
  assign in_fire = in_valid & in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_mode    <= 1'b1;
      s1_info1   <= '{default: '0};
      s1_info2   <= '{default: '0};
      s1_m1      <= '0;
      s1_m2      <= '0;
      s1_ls1_dp  <= '0;
      s1_ls2_dp  <= '0;
      s1_ls1_sp1 <= '0;
      s1_ls1_sp2 <= '0;
      s1_ls2_sp1 <= '0;
      s1_ls2_sp2 <= '0;
      s1_rdp     <= '0;
      s1_rsp1    <= '0;
      s1_rsp2    <= '0;
    end else if (v_fire) begin
      s1_mode    <= v_mode;
      s1_info1   <= v_info1;
      s1_info2   <= v_info2;
      s1_m1      <= v_m1n;
      s1_m2      <= v_m2n;
      s1_ls1_dp  <= v_ls1_dp;
      s1_ls2_dp  <= v_ls2_dp;
      s1_ls1_sp1 <= v_ls1_sp1;
      s1_ls1_sp2 <= v_ls1_sp2;
      s1_ls2_sp1 <= v_ls2_sp1;
      s1_ls2_sp2 <= v_ls2_sp2;
      s1_rdp     <= v_rdp;
      s1_rsp1    <= v_rsp1;
      s1_rsp2    <= v_rsp2;
    end
  end

  // ---------------- stage 2 ----------------
  logic               y_sgn [3];
  logic signed [13:0] y_exp_dp;
  logic signed [10:0] y_exp_sp1, y_exp_sp2;
  logic [5:0]         y_rs_dp;
  logic [4:0]         y_rs_sp1, y_rs_sp2;

  sign_exp_rsa u_ser (.info1(s1_info1), .info2(s1_info2),
                      .ls1_dp(s1_ls1_dp), .ls2_dp(s1_ls2_dp),
                      .ls1_sp1(s1_ls1_sp1), .ls2_sp1(s1_ls2_sp1),
                      .ls1_sp2(s1_ls1_sp2), .ls2_sp2(s1_ls2_sp2),
                      .sgn(y_sgn), .exp_dp(y_exp_dp), .exp_sp1(y_exp_sp1),
                      .exp_sp2(y_exp_sp2), .rs_dp(y_rs_dp), .rs_sp1(y_rs_sp1),
                      .rs_sp2(y_rs_sp2));

  logic               s2_sgn [3];
  logic signed [13:0] s2_exp_dp;
  logic signed [10:0] s2_exp_sp1, s2_exp_sp2;
  logic [5:0]         s2_rs_dp;
  logic [4:0]         s2_rs_sp1, s2_rs_sp2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_sgn     <= '{default: 1'b0};
      s2_exp_dp  <= '0;
      s2_exp_sp1 <= '0;
      s2_exp_sp2 <= '0;
      s2_rs_dp   <= '0;
      s2_rs_sp1  <= '0;
      s2_rs_sp2  <= '0;
    end else if (fsm_state == ST_S0) begin
      s2_sgn     <= y_sgn;
      s2_exp_dp  <= y_exp_dp;
      s2_exp_sp1 <= y_exp_sp1;
      s2_exp_sp2 <= y_exp_sp2;
      s2_rs_dp   <= y_rs_dp;
      s2_rs_sp1  <= y_rs_sp1;
      s2_rs_sp2  <= y_rs_sp2;
    end
  end

  mant_div_fsm #(.MULT_STAGES(MULT_STAGES)) u_mdiv (
    .clk(clk), .rst_n(rst_n), .start(v_fire), .dp_sp(v_mode),
    .m1(s1_m1), .m2(s1_m2), .recip_dp(s1_rdp), .recip_sp1(s1_rsp1), .recip_sp2(s1_rsp2),
    .busy(fsm_busy), .done(fsm_done), .state(fsm_state), .q(fsm_q));

  // ---------------- stage 3 ----------------
  logic [63:0] z_j, z_r;
  logic        z_stk_lo, z_stk_hi;
  logic        z_low_dp, z_low_sp1, z_low_sp2, z_inx_lo, z_inx_hi;

  dual_rshift u_rsh (.x(fsm_q), .dp_sp(s1_mode), .sh_dp(s2_rs_dp), .sh_sp1(s2_rs_sp1),
                     .sh_sp2(s2_rs_sp2), .y(z_j), .sticky_lo(z_stk_lo), .sticky_hi(z_stk_hi));

  dual_round u_rnd (.j(z_j), .dp_sp(s1_mode), .sticky_lo(z_stk_lo), .sticky_hi(z_stk_hi),
                    .norm_dp(s2_exp_dp > 14'sd1), .norm_sp1(s2_exp_sp1 > 11'sd1),
                    .norm_sp2(s2_exp_sp2 > 11'sd1), .r(z_r),
                    .low_dp(z_low_dp), .low_sp1(z_low_sp1), .low_sp2(z_low_sp2),
                    .inexact_lo(z_inx_lo), .inexact_hi(z_inx_hi));

  // w_*: rounding results after the optional post-rounding register, with
  // everything final processing needs from earlier stages
  logic               w_done, w_mode;
  logic [63:0]        w_r;
  logic               w_low_dp, w_low_sp1, w_low_sp2, w_inx_lo, w_inx_hi;
  logic signed [13:0] w_exp_dp;
  logic signed [10:0] w_exp_sp1, w_exp_sp2;
  logic               w_sgn [3];
  opnd_info_t         w_info1 [3], w_info2 [3];

  if (PIPE) begin : g_p3
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w_done    <= 1'b0;
        w_mode    <= 1'b1;
        w_r       <= '0;
        w_low_dp  <= 1'b0;
        w_low_sp1 <= 1'b0;
        w_low_sp2 <= 1'b0;
        w_inx_lo  <= 1'b0;
        w_inx_hi  <= 1'b0;
        w_exp_dp  <= '0;
        w_exp_sp1 <= '0;
        w_exp_sp2 <= '0;
        w_sgn     <= '{default: 1'b0};
        w_info1   <= '{default: '0};
        w_info2   <= '{default: '0};
      end else begin
        w_done <= fsm_done;
        if (fsm_done) begin
          w_mode    <= s1_mode;
          w_r       <= z_r;
          w_low_dp  <= z_low_dp;
          w_low_sp1 <= z_low_sp1;
          w_low_sp2 <= z_low_sp2;
          w_inx_lo  <= z_inx_lo;
          w_inx_hi  <= z_inx_hi;
          w_exp_dp  <= s2_exp_dp;
          w_exp_sp1 <= s2_exp_sp1;
          w_exp_sp2 <= s2_exp_sp2;
          w_sgn     <= s2_sgn;
          w_info1   <= s1_info1;
          w_info2   <= s1_info2;
        end
      end
    end
  end else begin : g_no_p3
    assign w_done    = fsm_done;
    assign w_mode    = s1_mode;
    assign w_r       = z_r;
    assign w_low_dp  = z_low_dp;
    assign w_low_sp1 = z_low_sp1;
    assign w_low_sp2 = z_low_sp2;
    assign w_inx_lo  = z_inx_lo;
    assign w_inx_hi  = z_inx_hi;
    assign w_exp_dp  = s2_exp_dp;
    assign w_exp_sp1 = s2_exp_sp1;
    assign w_exp_sp2 = s2_exp_sp2;
    assign w_sgn     = s2_sgn;
    assign w_info1   = s1_info1;
    assign w_info2   = s1_info2;
  end

  logic [63:0]  w_out;
  lane_status_t w_status [3];

  final_proc u_fin (.dp_sp(w_mode), .r(w_r), .low_dp(w_low_dp), .low_sp1(w_low_sp1),
                    .low_sp2(w_low_sp2), .inexact_lo(w_inx_lo), .inexact_hi(w_inx_hi),
                    .exp_dp(w_exp_dp), .exp_sp1(w_exp_sp1), .exp_sp2(w_exp_sp2),
                    .sgn(w_sgn), .info1(w_info1), .info2(w_info2),
                    .result(w_out), .status(w_status));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dp_sp <= 1'b1;
      out       <= '0;
      status    <= '{default: '0};
    end else begin
      out_valid <= w_done;
      if (w_done) begin
        out_dp_sp <= w_mode;
        out       <= w_out;
        status    <= w_status;
      end
    end
  end

  // the FSM is only ever started from its idle state
  assert property (@(posedge clk) disable iff (!rst_n) v_fire |-> fsm_state == ST_IDLE);

  logic unused_busy;
  assign unused_busy = fsm_busy;
endmodule
