// tb_dpdsp_div_verif: operand-class sweep of the DPdSP divider, in the
// manner of its functional verification: random divisions for each of the
// four combinations of normal (N) and subnormal (S) dividend and divisor,
// NN, NS, SN and SS, in DP mode and in dual-SP mode (both SP lanes of an
// operation get the same combination). Normal operands draw their exponent
// half the time from the whole range and half the time from near the bias,
// so that results cover overflow, normal, subnormal and zero outcomes;
// subnormal operands get a random number of leading zeros.
// Every result is compared with the reference quotient from fp_ref_pkg, and
// the distance in ulps is tallied per mode and class. DP must be within 1
// ulp and SP within 2 ulps of the correctly rounded quotient (see
// tb_dpdsp_div). The number of cases per mode and class is N_PER, far below
// a full-scale random verification run, to keep the simulation short.
module tb_dpdsp_div_verif;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_PER  = 25000;
  localparam int TOL_DP = 1;
  localparam int TOL_SP = 2;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready, dp_sp, out_valid, out_dp_sp;
  logic [63:0]  in1, in2, out;
  lane_status_t status [3];

  dpdsp_div dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic        mode;
    int          cls;
    logic [63:0] a, b, e;
  } exp_t;
  exp_t q[$];

  // tallies [mode][class][0: exact, 1: 1 ulp, 2: 2 ulps, 3: more]
  int tally [2][4][4];
  string cls_name [4] = '{"NN", "NS", "SN", "SS"};

  function automatic logic [63:0] gen_dp(bit sub);
    logic [63:0] v;
    logic [51:0] f;
    int unsigned e;
    f = 52'({$urandom, $urandom});
    if (sub) begin
      f = f >> $urandom_range(0, 51);
      if (f == 0) f = 52'd1;
      return {1'($urandom), 11'd0, f};
    end
    if ($urandom_range(0, 1) == 0) e = $urandom_range(1, 2046);
    else                           e = $urandom_range(1023 - 60, 1023 + 60);
    v = {1'($urandom), 11'(e), f};
    return v;
  endfunction

  function automatic logic [31:0] gen_sp(bit sub);
    logic [22:0] f;
    int unsigned e;
    f = 23'($urandom);
    if (sub) begin
      f = f >> $urandom_range(0, 22);
      if (f == 0) f = 23'd1;
      return {1'($urandom), 8'd0, f};
    end
    if ($urandom_range(0, 1) == 0) e = $urandom_range(1, 254);
    else                           e = $urandom_range(127 - 20, 127 + 20);
    return {1'($urandom), 8'(e), f};
  endfunction

  // ulp distance of two results, saturated at 3 (different signs count as 3)
  function automatic int ulp_dist(logic [63:0] g, logic [63:0] e, bit dp);
    longint d;
    if (dp) begin
      if (g[63] != e[63]) return 3;
      d = longint'({1'b0, g[62:0]}) - longint'({1'b0, e[62:0]});
    end else begin
      if (g[31] != e[31]) return 3;
      d = longint'(g[30:0]) - longint'(e[30:0]);
    end
    if (d < 0) d = -d;
    return (d > 3) ? 3 : int'(d);
  endfunction

  task automatic issue(logic mode, int cls);
    exp_t x;
    bit sa, sb;
    sa = (cls >= 2);        // dividend subnormal
    sb = (cls % 2 == 1);    // divisor subnormal
    x.mode = mode;
    x.cls  = cls;
    if (mode) begin
      x.a = gen_dp(sa);
      x.b = gen_dp(sb);
      x.e = ref_div_dp(x.a, x.b);
    end else begin
      x.a = {gen_sp(sa), gen_sp(sa)};
      x.b = {gen_sp(sb), gen_sp(sb)};
      x.e = {ref_div_sp(x.a[63:32], x.b[63:32]), ref_div_sp(x.a[31:0], x.b[31:0])};
    end
    in_valid <= 1'b1;
    dp_sp    <= mode;
    in1      <= x.a;
    in2      <= x.b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    q.push_back(x);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    int d0, d1;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      x = q.pop_front();
      checks++;
      if (x.mode) begin
        d0 = ulp_dist(out, x.e, 1'b1);
        tally[1][x.cls][d0]++;
        if (d0 > TOL_DP || out_dp_sp != 1'b1) begin
          failures++;
          if (failures < 20) $display("DP %s a=%h b=%h got=%h exp=%h", cls_name[x.cls], x.a, x.b, out, x.e);
        end
      end else begin
        d0 = ulp_dist({32'd0, out[31:0]}, {32'd0, x.e[31:0]}, 1'b0);
        d1 = ulp_dist({32'd0, out[63:32]}, {32'd0, x.e[63:32]}, 1'b0);
        tally[0][x.cls][d0]++;
        tally[0][x.cls][d1]++;
        if (d0 > TOL_SP || d1 > TOL_SP || out_dp_sp != 1'b0) begin
          failures++;
          if (failures < 20) $display("SP %s a=%h b=%h got=%h exp=%h", cls_name[x.cls], x.a, x.b, out, x.e);
        end
      end
    end
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    dp_sp    = 1'b1;
    in1      = '0;
    in2      = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int m = 1; m >= 0; m--)
      for (int c = 0; c < 4; c++)
        for (int n = 0; n < N_PER; n++) issue(1'(m), c);
    in_valid <= 1'b0;
    while (q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);

    $display("ulp distance from the correctly rounded quotient (results per lane):");
    $display("  mode class    exact    1 ulp   2 ulps    more");
    for (int m = 1; m >= 0; m--)
      for (int c = 0; c < 4; c++)
        $display("  %s   %s   %7d  %7d  %7d  %6d", m ? "DP" : "SP", cls_name[c],
                 tally[m][c][0], tally[m][c][1], tally[m][c][2], tally[m][c][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
