// tb_mant_div_fsm: checks the iterative series-expansion mantissa divider.
// Random normalized mantissas are applied in DP and dual-SP mode with
// reciprocal words computed here from round(2^B*256/(256+k)). The quotient
// is compared with the exact quotient m1/m2 (computed with wide integers)
// within the bound of the method:
//   DP : 2^-52 (reciprocal error, at most 2^-53 for the saturated a1 = 1
//        entry, times m1 < 2) plus truncation slack
//   SP : 2^-23 (omitted series term a1^-4*a2^3 times A) plus 2^-24
//        (reciprocal rounding) plus truncation slack
// Two instances run side by side on the same operands: the single-stage
// multiplier version (MULT_STAGES = 1) and the two-stage one (MULT_STAGES = 2);
// both quotients are checked. It also checks the cycle counts: done rises
// 10 cycles after start in DP (states S0..S8) and 8 in dual SP (S4 and S5
// skipped) for the first, and 15 / 11 for the second (14 states, of which
// dual SP skips S3_T, S4, S5 and S5_T). The DP-only states must never be
// visited in SP mode.
module tb_mant_div_fsm;
  import dpdsp_pkg::*;

  localparam longint TOL_DP = 2048 + 64;   // in units of 2^-63
  localparam longint TOL_SP = 384 + 32;    // in units of 2^-31

  logic        clk = 1'b0, rst_n, start, dp_sp, busy, done, busy2, done2;
  logic [63:0] m1, m2, q, q2;
  logic [52:0] recip_dp;
  logic [23:0] recip_sp1, recip_sp2;
  mdiv_state_t state, state2;

  mant_div_fsm dut (.*);
  mant_div_fsm #(.MULT_STAGES(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start), .dp_sp(dp_sp), .m1(m1), .m2(m2),
    .recip_dp(recip_dp), .recip_sp1(recip_sp1), .recip_sp2(recip_sp2),
    .busy(busy2), .done(done2), .state(state2), .q(q2));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint max_dp = 0, max_sp = 0;
  int seen_s4_sp = 0;

  always @(posedge clk) begin
    if (!dp_sp && (state == ST_S4 || state == ST_S5)) seen_s4_sp++;
    if (!dp_sp && (state2 inside {ST_S3T, ST_S4, ST_S5, ST_S5T})) seen_s4_sp++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rcp(logic [7:0] k, int b);
    logic [127:0] num, den, r;
    num = 128'd1 << (b + 8);
    den = 128'(256 + int'(k));
    r   = (num + den / 2) / den;
    if (r >= (128'd1 << b)) r = (128'd1 << b) - 1;
    return 64'(r);
  endfunction

  // |q - m1/m2| in units of 2^-frac, q and m given as integers
  function automatic longint qerr(logic [63:0] qq, logic [52:0] a, logic [52:0] b, int frac, int mfrac);
    logic [127:0] lhs, rhs, d;
    // q*b vs a*2^frac (both scaled by 2^-(frac+mfrac)); error = |q*b - a*2^frac| / b
    lhs = 128'(qq) * 128'(b);
    rhs = 128'(a) << frac;
    d   = (lhs > rhs) ? lhs - rhs : rhs - lhs;
    return longint'(d / 128'(b));
  endfunction

  task automatic run_one(bit mode);
    logic [52:0] a, b;
    logic [23:0] a1, b1, a2, b2;
    int cyc, cyc1, cyc2;
    logic [63:0] qs [2];
    longint e1, e2;
    a  = {1'b1, 52'({$urandom, $urandom})};
    b  = {1'b1, 52'({$urandom, $urandom})};
    a1 = {1'b1, 23'($urandom)};
    b1 = {1'b1, 23'($urandom)};
    a2 = {1'b1, 23'($urandom)};
    b2 = {1'b1, 23'($urandom)};
    if ($urandom_range(0, 9) == 0) begin b = {1'b1, 52'd0}; b1 = {1'b1, 23'd0}; end
    if ($urandom_range(0, 9) == 0) begin b = '1; b2 = '1; a = '1; a1 = '1; end
    dp_sp <= mode;
    if (mode) begin
      m1 <= {a, 11'd0};
      m2 <= {b, 11'd0};
    end else begin
      m1 <= {a2, 8'd0, a1, 8'd0};
      m2 <= {b2, 8'd0, b1, 8'd0};
    end
    recip_dp  <= 53'(rcp(mode ? b[51:44] : b2[22:15], 53));
    recip_sp1 <= 24'(rcp(b1[22:15], 24));
    // SP-2 reads the top of the shared DP word, rounded to 24 bits
    recip_sp2 <= 24'(rcp(b2[22:15], 24));
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    cyc1 = 0;
    cyc2 = 0;
    do begin
      @(posedge clk);
      cyc++;
      if (done)  begin cyc1 = cyc; qs[0] = q;  end
      if (done2) begin cyc2 = cyc; qs[1] = q2; end
    end while ((cyc1 == 0 || cyc2 == 0) && cyc < 50);
    checks += 2;
    if (cyc1 != (mode ? 10 : 8) || cyc2 != (mode ? 15 : 11)) begin
      failures++;
      $display("cycle counts %0d / %0d in mode %0d", cyc1, cyc2, mode);
    end
    for (int v = 0; v < 2; v++) check_q(mode, qs[v], a, b, a1, b1, a2, b2);
  endtask

  task automatic check_q(bit mode, logic [63:0] q, logic [52:0] a, logic [52:0] b,
                         logic [23:0] a1, logic [23:0] b1, logic [23:0] a2, logic [23:0] b2);
    longint e1, e2;
    checks++;
    if (mode) begin
      e1 = qerr(q, a, b, 63, 52);
      if (e1 > max_dp) max_dp = e1;
      if (e1 > TOL_DP) begin
        failures++;
        $display("DP a=%h b=%h q=%h err=%0d", a, b, q, e1);
      end
    end else begin
      e1 = qerr({32'd0, q[31:0]},  53'(a1), 53'(b1), 31, 23);
      e2 = qerr({32'd0, q[63:32]}, 53'(a2), 53'(b2), 31, 23);
      if (e1 > max_sp) max_sp = e1;
      if (e2 > max_sp) max_sp = e2;
      if (e1 > TOL_SP || e2 > TOL_SP) begin
        failures++;
        $display("SP a=%h/%h b=%h/%h q=%h err=%0d/%0d", a1, a2, b1, b2, q, e1, e2);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dp_sp = 1'b1;
    m1 = '0; m2 = '0; recip_dp = '0; recip_sp1 = '0; recip_sp2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) run_one(1'($urandom));
    checks++;
    if (seen_s4_sp != 0) begin
      failures++;
      $display("DP-only states visited in SP mode");
    end
    $display("max error: DP %0d / 2^-63, SP %0d / 2^-31", max_dp, max_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
