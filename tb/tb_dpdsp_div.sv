// tb_dpdsp_div: end-to-end test of the DPdSP divider at its default size.
//
// Issues a stream of random divisions, mixing DP and dual-SP operations
// with operands biased towards subnormals, zeros, infinities, NaNs and
// extreme exponents, plus directed cases for overflow, underflow and
// rounding carry. Each result is compared with a reference quotient from
// fp_ref_pkg (at most 1 ulp away, the divider's accuracy bound; exceptional
// results exactly). The test also checks the latency (11 cycles DP, 9 SP),
// the initiation interval when in_valid is held (10 DP, 8 SP) and counts
// how often each mechanism of the design was exercised, failing on any that
// never happened.
module tb_dpdsp_div;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;
  // accuracy bounds: DP is faithful (series to a1^-7*a2^6); the dual-SP
  // series stops at a1^-3*a2^2, whose omitted term (< 2^-24 relative) adds
  // to the 24-bit reciprocal error, so SP results may be 2 ulps away
  localparam int TOL_DP   = 1;
  localparam int TOL_SP   = 2;
  // latency and initiation interval, DP and dual SP
  localparam int LAT_DP = 11;
  localparam int LAT_SP = 9;
  localparam int II_DP  = 10;
  localparam int II_SP  = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready, dp_sp, out_valid, out_dp_sp;
  logic [63:0]  in1, in2, out;
  lane_status_t status [3];

  dpdsp_div dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in issue order
  typedef struct {
    logic        mode;
    logic [63:0] a, b, e;
    longint      t_issue;
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_dp, n_sp, n_switch, n_sub_in, n_sub_out, n_rnd_carry, n_lowpos;
  int n_nan, n_inf, n_zero, n_dbz, n_ovf, n_b2b_dp, n_b2b_sp;
  int n_exact_dp, n_one_dp, n_exact_sp, n_one_sp, n_two_sp;
  logic last_mode = 1'b1;
  bit   first = 1'b1;

  function automatic logic [63:0] expect_of(logic mode, logic [63:0] a, logic [63:0] b);
    if (mode) return ref_div_dp(a, b);
    return {ref_div_sp(a[63:32], b[63:32]), ref_div_sp(a[31:0], b[31:0])};
  endfunction

  task automatic issue(logic mode, logic [63:0] a, logic [63:0] b);
    exp_t x;
    in_valid <= 1'b1;
    dp_sp    <= mode;
    in1      <= a;
    in2      <= b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    x.mode = mode; x.a = a; x.b = b; x.e = expect_of(mode, a, b);
    x.t_issue = cycle;
    q.push_back(x);
    if (!first && mode != last_mode) n_switch++;
    first = 1'b0;
    last_mode = mode;
    if (mode) n_dp++; else n_sp++;
  endtask

  // issue-interval check: in_ready must return exactly II_DP / II_SP cycles
  // after an accepted operation
  longint t_last_fire = -1;
  logic   mode_last_fire;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (t_last_fire >= 0 && (cycle - t_last_fire) == (mode_last_fire ? II_DP : II_SP)) begin
        if (mode_last_fire) n_b2b_dp++; else n_b2b_sp++;
      end
      if (t_last_fire >= 0 && (cycle - t_last_fire) < (mode_last_fire ? II_DP : II_SP)) begin
        failures++;
        $display("issue interval too short: %0d", cycle - t_last_fire);
      end
      t_last_fire    <= cycle;
      mode_last_fire <= dp_sp;
    end
  end

  // internal mechanism observation
  always @(posedge clk) if (rst_n) begin
    if (dut.in_fire && dut.dp_sp && (dut.x_ls1_dp != 0 || dut.x_ls2_dp != 0)) n_sub_in++;
    if (dut.in_fire && !dut.dp_sp && (dut.x_ls1_sp1 != 0 || dut.x_ls2_sp1 != 0 ||
                                      dut.x_ls1_sp2 != 0 || dut.x_ls2_sp2 != 0)) n_sub_in++;
    if (dut.fsm_done && (dut.s1_mode ? dut.s2_rs_dp != 0
                                     : (dut.s2_rs_sp1 != 0 || dut.s2_rs_sp2 != 0))) n_sub_out++;
    if (dut.fsm_done && (dut.s1_mode ? dut.z_r[53] : (dut.z_r[24] | dut.z_r[56]))) n_rnd_carry++;
    if (dut.fsm_done && (dut.z_low_dp | dut.z_low_sp1 | dut.z_low_sp2)) n_lowpos++;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    bit ok;
    longint lat;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      x = q.pop_front();
      checks++;
      if (out_dp_sp != x.mode) begin
        failures++;
        $display("mode mismatch");
      end
      if (x.mode) begin
        ok = close_dp(out, x.e, TOL_DP);
        if (out == x.e) n_exact_dp++; else if (close_dp(out, x.e, 1)) n_one_dp++;
      end else begin
        ok = close_sp(out[63:32], x.e[63:32], TOL_SP) && close_sp(out[31:0], x.e[31:0], TOL_SP);
        for (int h = 0; h < 2; h++) begin
          if (out[32*h +: 32] == x.e[32*h +: 32]) n_exact_sp++;
          else if (close_sp(out[32*h +: 32], x.e[32*h +: 32], 1)) n_one_sp++;
          else n_two_sp++;
        end
      end
      if (!ok) begin
        failures++;
        if (failures < 20)
          $display("MISMATCH mode=%0d a=%h b=%h got=%h exp=%h", x.mode, x.a, x.b, out, x.e);
      end
      // latency in cycles from the accepting clock edge to the edge that
      // loads the output register
      lat = cycle - x.t_issue;
      checks++;
      if (lat != (x.mode ? LAT_DP : LAT_SP)) begin
        failures++;
        if (failures < 20) $display("latency %0d for mode %0d", lat, x.mode);
      end
      for (int l = 0; l < 3; l++) begin
        if (status[l].invalid)  n_nan++;
        if (status[l].div_zero) n_dbz++;
        if (status[l].overflow) n_ovf++;
      end
      if (x.mode) begin
        if (out[62:0] == {11'h7FF, 52'd0}) n_inf++;
        if (out[62:0] == 63'd0) n_zero++;
      end else begin
        if (out[30:0] == {8'hFF, 23'd0} || out[62:32] == {8'hFF, 23'd0}) n_inf++;
        if (out[30:0] == 0 || out[62:32] == 0) n_zero++;
      end
    end
  end

  task automatic need(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end else $display("  %-28s %0d", name, n);
  endtask

  initial begin
    logic mode;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    dp_sp    = 1'b1;
    in1      = '0;
    in2      = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // directed cases
    issue(1'b1, $realtobits(1.0), $realtobits(3.0));
    issue(1'b1, 64'h7FE0_0000_0000_0000, 64'h3FE0_0000_0000_0000);   // overflow
    issue(1'b1, 64'h0000_0000_0000_0003, 64'h4000_0000_0000_0000);   // subnormal / 2
    issue(1'b1, 64'h0010_0000_0000_0000, 64'h3FF0_0000_0000_0001);   // just below min normal
    issue(1'b1, 64'h3FFF_FFFF_FFFF_FFFF, 64'h3FF0_0000_0000_0000);   // all-ones mantissa
    issue(1'b0, {32'h3F80_0000, 32'h4049_0FDB}, {32'h4040_0000, 32'h402D_F854});
    issue(1'b0, {32'h7F00_0000, 32'h0000_0001}, {32'h3E80_0000, 32'h3F80_0000});
    issue(1'b0, {32'h0000_0000, 32'h7F80_0000}, {32'h0000_0000, 32'h7F80_0000});
    issue(1'b0, {32'h3F80_0000, 32'h0080_0000}, {32'h0000_0000, 32'h4000_0000});

    // random stream, in_valid held: back-to-back issue
    for (int i = 0; i < N_RANDOM; i++) begin
      mode = ($urandom_range(0, 2) != 0) ? (i % 7 < 4) : 1'b1;
      if (mode) issue(1'b1, rand_dp(), rand_dp());
      else      issue(1'b0, {rand_sp(), rand_sp()}, {rand_sp(), rand_sp()});
    end
    in_valid <= 1'b0;
    while (q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);

    $display("DP results: %0d exact, %0d at 1 ulp", n_exact_dp, n_one_dp);
    $display("SP results: %0d exact, %0d at 1 ulp, %0d at 2 ulps", n_exact_sp, n_one_sp, n_two_sp);
    $display("mechanisms exercised:");
    need("DP divisions", n_dp);
    need("dual-SP divisions", n_sp);
    need("mode switches", n_switch);
    need("subnormal input (LOD/lshift)", n_sub_in);
    need("subnormal output (rshift)", n_sub_out);
    need("rounding carry-out", n_rnd_carry);
    need("lower rounding position", n_lowpos);
    need("NaN results", n_nan);
    need("infinity results", n_inf);
    need("zero results", n_zero);
    need("divide by zero", n_dbz);
    need("overflow", n_ovf);
    need("back-to-back DP issue", n_b2b_dp);
    need("back-to-back SP issue", n_b2b_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
