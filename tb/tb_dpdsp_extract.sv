// tb_dpdsp_extract: checks data extraction and operand classification.
// Random operands, biased towards special encodings, are classified here
// from their values (NaN, infinity, zero, subnormal) and the unified
// mantissa of each lane is checked by value: for a finite operand x,
// |x| must equal M * 2^(e - bias - p + 1) with e the exponent field (1 for
// subnormals) and M the lane's mantissa field of the unified word.
module tb_dpdsp_extract;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  logic [63:0] in1, in2, m1, m2;
  logic        dp_sp;
  opnd_info_t  info1 [3], info2 [3];
  int checks = 0, failures = 0;

  dpdsp_extract dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_dp(logic [63:0] x, opnd_info_t i, logic [52:0] m, bit chk_m);
    real v, mv;
    int  e;
    bit  nan, inf, zero, sub;
    v    = $bitstoreal(x);
    e    = int'(x[62:52]);
    nan  = is_nan_dp(x);
    inf  = (x[62:0] == {11'h7FF, 52'd0});
    zero = (x[62:0] == 63'd0);
    sub  = (e == 0);
    checks++;
    if (i.nan != nan || i.inf != inf || i.zero != zero || i.sn != sub || i.sgn != x[63] ||
        i.exp != x[62:52]) begin
      failures++;
      $display("DP class x=%h", x);
    end
    if (chk_m && !nan && !inf) begin
      mv = real'(m) * (2.0 ** ((sub ? 1 : e) - 1075));
      if (x[63]) mv = -mv;
      checks++;
      if (mv != v) begin
        failures++;
        $display("DP mantissa x=%h m=%h", x, m);
      end
    end
  endtask

  task automatic check_sp(logic [31:0] x, opnd_info_t i, logic [23:0] m, bit chk_m);
    real v, mv;
    int  e;
    bit  nan, inf, zero, sub;
    v    = sp_to_real(x);
    e    = int'(x[30:23]);
    nan  = is_nan_sp(x);
    inf  = (x[30:0] == {8'hFF, 23'd0});
    zero = (x[30:0] == 31'd0);
    sub  = (e == 0);
    checks++;
    if (i.nan != nan || i.inf != inf || i.zero != zero || i.sn != sub || i.sgn != x[31] ||
        i.exp != {3'd0, x[30:23]}) begin
      failures++;
      $display("SP class x=%h", x);
    end
    if (chk_m && !nan && !inf) begin
      mv = real'(m) * (2.0 ** ((sub ? 1 : e) - 150));
      if (x[31]) mv = -mv;
      checks++;
      if (mv != v) begin
        failures++;
        $display("SP mantissa x=%h m=%h", x, m);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      dp_sp = n[0];
      if (dp_sp) begin
        in1 = rand_dp();
        in2 = rand_dp();
      end else begin
        in1 = {rand_sp(), rand_sp()};
        in2 = {rand_sp(), rand_sp()};
      end
      #1;
      // classification is produced for all lanes in both modes
      check_dp(in1, info1[LANE_DP], 53'(0), 1'b0);
      check_sp(in1[31:0],  info1[LANE_SP1], 24'(0), 1'b0);
      check_sp(in2[63:32], info2[LANE_SP2], 24'(0), 1'b0);
      if (dp_sp) begin
        if (m1[10:0] != 0 || m2[10:0] != 0) failures++;
        check_dp(in1, info1[LANE_DP], m1[63:11], 1'b1);
        check_dp(in2, info2[LANE_DP], m2[63:11], 1'b1);
      end else begin
        if (m1[39:32] != 0 || m1[7:0] != 0) failures++;
        check_sp(in1[31:0],  info1[LANE_SP1], m1[31:8], 1'b1);
        check_sp(in1[63:32], info1[LANE_SP2], m1[63:40], 1'b1);
        check_sp(in2[31:0],  info2[LANE_SP1], m2[31:8], 1'b1);
        check_sp(in2[63:32], info2[LANE_SP2], m2[63:40], 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
