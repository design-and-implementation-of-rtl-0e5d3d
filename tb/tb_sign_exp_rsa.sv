// tb_sign_exp_rsa: checks sign, exponent and right-shift amount against
// integer arithmetic on random exponent fields (zero fields meaning
// subnormal, effective exponent 1) and random normalizing shifts:
// e = bias + (e1 - ls1) - (e2 - ls2), rs = clamp(1 - e, 0, 63 or 31).
module tb_sign_exp_rsa;
  import dpdsp_pkg::*;

  opnd_info_t         info1 [3], info2 [3];
  logic [5:0]         ls1_dp, ls2_dp;
  logic [4:0]         ls1_sp1, ls2_sp1, ls1_sp2, ls2_sp2;
  logic               sgn [3];
  logic signed [13:0] exp_dp;
  logic signed [10:0] exp_sp1, exp_sp2;
  logic [5:0]         rs_dp;
  logic [4:0]         rs_sp1, rs_sp2;
  int checks = 0, failures = 0;

  sign_exp_rsa dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic opnd_info_t rnd_info(int maxexp);
    opnd_info_t i;
    i = '0;
    i.sgn = 1'($urandom);
    case ($urandom_range(0, 3))
      0:       i.exp = 11'd0;
      1:       i.exp = 11'(maxexp - 1);
      2:       i.exp = 11'd1;
      default: i.exp = 11'($urandom_range(1, maxexp - 1));
    endcase
    i.sn = (i.exp == 0);
    return i;
  endfunction

  function automatic int ee(opnd_info_t i);
    return i.sn ? 1 : int'(i.exp);
  endfunction

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  initial begin
    int e, e1, e2;
    for (int n = 0; n < 5000; n++) begin
      info1[LANE_DP] = rnd_info(2047);  info2[LANE_DP] = rnd_info(2047);
      info1[LANE_SP1] = rnd_info(255);  info2[LANE_SP1] = rnd_info(255);
      info1[LANE_SP2] = rnd_info(255);  info2[LANE_SP2] = rnd_info(255);
      ls1_dp  = info1[LANE_DP].sn  ? 6'($urandom_range(12, 63)) : 6'd0;
      ls2_dp  = info2[LANE_DP].sn  ? 6'($urandom_range(12, 63)) : 6'd0;
      ls1_sp1 = info1[LANE_SP1].sn ? 5'($urandom_range(1, 23)) : 5'd0;
      ls2_sp1 = info2[LANE_SP1].sn ? 5'($urandom_range(1, 23)) : 5'd0;
      ls1_sp2 = info1[LANE_SP2].sn ? 5'($urandom_range(1, 23)) : 5'd0;
      ls2_sp2 = info2[LANE_SP2].sn ? 5'($urandom_range(1, 23)) : 5'd0;
      #1;
      checks++;
      for (int l = 0; l < 3; l++)
        if (sgn[l] != (info1[l].sgn != info2[l].sgn)) begin
          failures++;
          $display("sign lane %0d", l);
        end
      e = 1023 + (ee(info1[LANE_DP]) - int'(ls1_dp)) - (ee(info2[LANE_DP]) - int'(ls2_dp));
      if (int'(exp_dp) != e || int'(rs_dp) != clampi(1 - e, 63)) begin
        failures++;
        $display("DP e=%0d got %0d rs %0d", e, exp_dp, rs_dp);
      end
      e1 = 127 + (ee(info1[LANE_SP1]) - int'(ls1_sp1)) - (ee(info2[LANE_SP1]) - int'(ls2_sp1));
      e2 = 127 + (ee(info1[LANE_SP2]) - int'(ls1_sp2)) - (ee(info2[LANE_SP2]) - int'(ls2_sp2));
      if (int'(exp_sp1) != e1 || int'(rs_sp1) != clampi(1 - e1, 31) ||
          int'(exp_sp2) != e2 || int'(rs_sp2) != clampi(1 - e2, 31)) begin
        failures++;
        $display("SP e=%0d/%0d got %0d/%0d", e1, e2, exp_sp1, exp_sp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
