// mant_div_fsm: dual-mode iterative mantissa divider (series expansion).
//
// Computes q = m1 / m2 with m2 = a1 + a2 (a1 = 1 plus 8 fraction bits,
// a1^-1 from the reciprocal tables) as
//   q = A - A*E*F  (DP)     q = A - A*E  (dual SP)
//   A = m1*a1^-1, B = a1^-1*a2, C = B^2, D = C^2, E = B - C, F = 1 + C + D
// which is the Taylor series of (a1+a2)^-1 up to a1^-7*a2^6 for DP and up
// to a1^-3*a2^2 for SP. One dual-mode Booth multiplier is used once per
// state; the operands chosen in a state are registered and the product is
// read in the following state:
//   S0  apply m1 x a1^-1                    S1  A <- prod; apply a2 x a1^-1
//   S2  B <- prod; apply B x B              S3  C <- prod, E <- B - C;
//                                               apply C x C (DP)
//   S4  F <- 1 + C + D (DP)                 S5  apply E x F (DP)
//   S6  G = prod (DP); apply G x A (DP) or E x A (SP)
//   S7  H <- prod                           S8  I <- A - H, done
// Dual SP goes S3 -> S6, skipping S4 and S5: 9 cycles for DP, 7 for SP.
//
// MULT_STAGES = 2 selects the two-stage (pipelined) multiplier, whose
// product appears two states after its operands. Wait states with all
// multiplier inputs at zero are then inserted where a state needs the
// product of the state just before it: S2_T, S3_T, S5_T and S6_T. A is
// picked up in the added state S1_T, while S1 already applies a2, which does
// not depend on a product. DP runs through all 14 states
//   S0 S1 S1_T S2 S2_T S3 S3_T S4 S5 S5_T S6 S6_T S7 S8
// and dual SP skips S3_T, S4, S5 and S5_T (10 states).
//
// Fixed-point formats (DP word / each SP half-word):
//   m1, m2 inputs : unified normalized mantissas, DP 1.52 in [63:11],
//                   SP 1.23 in [63:40] (SP-2) and [31:8] (SP-1)
//   A, I          : DP 1.63, SP 1.31         H : same scale as A
//   B, C, E       : DP lsb 2^-72, SP lsb 2^-40 (values below 2^-8)
//   F             : DP 1.53
// Products are 54x54 in DP and 24x24 in SP; subtractions are 64-bit (DP)
// or 32-bit per lane (SP), sharing one dual-mode subtractor for E and I.
//
// Interface: start is sampled in IDLE; operands m1, m2 and the reciprocals
// must stay stable until done. done is a one-cycle pulse in the cycle after
// S8, when q holds the quotient (DP 1.63 in [63:0] or SP 1.31 per half,
// value in (0.5, 2)). busy is high from S0 to S8.
//
// The terms, the state sequence and the operand routing follow the
// published architecture; the fixed-point formats and the bit slices were
// derived for this design from the value ranges of the terms.
module mant_div_fsm
  import dpdsp_pkg::*;
#(
  parameter int unsigned MULT_STAGES = 1  // 1 or 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  dp_sp,
  input  logic [63:0]           m1,
  input  logic [63:0]           m2,
  input  logic [DP_RECIP_W-1:0] recip_dp,
  input  logic [SP_RECIP_W-1:0] recip_sp1,
  input  logic [SP_RECIP_W-1:0] recip_sp2,
  output logic                  busy,
  output logic                  done,
  output mdiv_state_t           state,
  output logic [63:0]           q
);
  mdiv_state_t state_n;
  logic        mode;              // dp_sp latched at start
  logic [53:0] op_t1, op_t2, op_m; // registered multiplier operands
  logic [53:0] nx_t1, nx_t2, nx_m;
  logic [107:0] prod;
  logic [63:0] a_q, b_q, c_q, e_q, h_q, i_q;
  logic [53:0] f_q;
  logic [63:0] sub_a, sub_b, sub_y;
  logic [63:0] c_next;

  localparam bit PIPE = (MULT_STAGES == 2);
  // state in which A (the product of the S0 operands) is available
  localparam mdiv_state_t ST_A = PIPE ? ST_S1T : ST_S1;

  dual_booth_mult #(.STAGES(MULT_STAGES)) u_mult (
    .clk(clk), .rst_n(rst_n), .in1_t1(op_t1), .in1_t2(op_t2), .in2(op_m), .p(prod));
  dual_sub        u_sub  (.a(sub_a), .b(sub_b), .dp_sp(mode), .y(sub_y));

  // operand slices
  logic [52:0] m1_dp;
  logic [23:0] m1_sp1, m1_sp2;
  logic [43:0] a2_dp;
  logic [14:0] a2_sp1, a2_sp2;
  logic [53:0] recip_in2;
  assign m1_dp  = m1[63:11];
  assign m1_sp1 = m1[31:8];
  assign m1_sp2 = m1[63:40];
  assign a2_dp  = m2[54:11];
  assign a2_sp1 = m2[22:8];
  assign a2_sp2 = m2[54:40];
  assign recip_in2 = mode ? {1'b0, recip_dp} : {recip_sp2, 6'd0, recip_sp1};

  // C as produced by the multiplier in S3
  assign c_next = mode ? {8'd0, prod[107:52]}
                       : {8'd0, prod[107:84], 8'd0, prod[47:24]};

  // shared subtractor: E = B - C in S3, I = A - H in S8
  assign sub_a = (state == ST_S8) ? a_q : b_q;
  assign sub_b = (state == ST_S8) ? h_q : c_next;

  always_comb begin
    state_n = state;
    nx_t1   = '0;
    nx_t2   = '0;
    nx_m    = '0;
    unique case (state)
      ST_IDLE: if (start) state_n = ST_S0;
      ST_S0: begin
        nx_t1   = mode ? {1'b0, m1_dp} : {30'd0, m1_sp1};
        nx_t2   = mode ? {1'b0, m1_dp} : {m1_sp2, 30'd0};
        nx_m    = recip_in2;
        state_n = ST_S1;
      end
      ST_S1: begin
        nx_t1   = mode ? {10'd0, a2_dp} : {39'd0, a2_sp1};
        nx_t2   = mode ? {10'd0, a2_dp} : {9'd0, a2_sp2, 30'd0};
        nx_m    = recip_in2;
        state_n = PIPE ? ST_S1T : ST_S2;
      end
      ST_S2: begin
        nx_t1   = mode ? prod[96:43] : {30'd0, prod[38:15]};
        nx_t2   = mode ? prod[96:43] : {prod[98:75], 30'd0};
        nx_m    = mode ? prod[96:43] : {prod[98:75], 6'd0, prod[38:15]};
        state_n = PIPE ? ST_S2T : ST_S3;
      end
      ST_S1T: state_n = ST_S2;
      ST_S2T: state_n = ST_S3;
      ST_S3: begin
        if (mode) begin
          nx_t1 = prod[107:54];
          nx_t2 = prod[107:54];
          nx_m  = prod[107:54];
        end
        state_n = !mode ? ST_S6 : (PIPE ? ST_S3T : ST_S4);
      end
      ST_S3T: state_n = ST_S4;
      ST_S4: state_n = ST_S5;
      ST_S5: begin
        nx_t1   = e_q[63:10];
        nx_t2   = e_q[63:10];
        nx_m    = f_q;
        state_n = PIPE ? ST_S5T : ST_S6;
      end
      ST_S5T: state_n = ST_S6;
      ST_S6: begin
        nx_t1   = mode ? prod[106:53] : {30'd0, e_q[31:8]};
        nx_t2   = mode ? prod[106:53] : {e_q[63:40], 30'd0};
        nx_m    = mode ? a_q[63:10]   : {a_q[63:40], 6'd0, a_q[31:8]};
        state_n = PIPE ? ST_S6T : ST_S7;
      end
      ST_S6T: state_n = ST_S7;
      ST_S7: state_n = ST_S8;
      ST_S8: state_n = ST_IDLE;
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      mode  <= 1'b1;
      op_t1 <= '0;
      op_t2 <= '0;
      op_m  <= '0;
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      e_q   <= '0;
      f_q   <= '0;
      h_q   <= '0;
      i_q   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      op_t1 <= nx_t1;
      op_t2 <= nx_t2;
      op_m  <= nx_m;
      done  <= (state == ST_S8);
      if (state == ST_IDLE && start) mode <= dp_sp;
      if (state == ST_A) a_q <= mode ? prod[105:42] : {prod[107:76], prod[47:16]};
      unique case (state)
        ST_S2: b_q <= mode ? prod[96:33]  : {prod[98:67], prod[38:7]};
        ST_S3: begin
          c_q <= c_next;
          e_q <= sub_y;
        end
        ST_S4: f_q <= {1'b1, 53'd0} + 54'(c_q[63:19]) + 54'(prod[107:87]);
        ST_S7: h_q <= mode ? {8'd0, prod[107:52]}
                           : {8'd0, prod[107:84], 8'd0, prod[47:24]};
        ST_S8: i_q <= sub_y;
        default: ;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign q    = i_q;
endmodule
