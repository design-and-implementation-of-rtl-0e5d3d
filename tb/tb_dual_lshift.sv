// tb_dual_lshift: checks the dual-mode left shifter. DP mode is compared
// with a 64-bit shift, dual-SP mode with two independent 32-bit shifts;
// random data and random amounts, unused-mode amounts randomized too. A
// second pair of instances splits the shifter into stages 1..4 and 5..6, as
// the pipelined divider does, and must give the same result.
module tb_dual_lshift;
  logic [63:0] x, y, y_a, y_b;
  logic        dp_sp;
  logic [5:0]  sh_dp;
  logic [4:0]  sh_sp1, sh_sp2;
  int checks = 0, failures = 0;

  dual_lshift dut (.*);
  dual_lshift #(.FIRST_STAGE(1), .LAST_STAGE(4)) dut_a (
    .x(x), .dp_sp(dp_sp), .sh_dp(sh_dp), .sh_sp1(sh_sp1), .sh_sp2(sh_sp2), .y(y_a));
  dual_lshift #(.FIRST_STAGE(5), .LAST_STAGE(6)) dut_b (
    .x(y_a), .dp_sp(dp_sp), .sh_dp(sh_dp), .sh_sp1(sh_sp1), .sh_sp2(sh_sp2), .y(y_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int n = 0; n < 4000; n++) begin
      x      = {$urandom, $urandom};
      dp_sp  = 1'($urandom);
      sh_dp  = 6'($urandom);
      sh_sp1 = 5'($urandom);
      sh_sp2 = 5'($urandom);
      #1;
      e = dp_sp ? (x << sh_dp) : {x[63:32] << sh_sp2, x[31:0] << sh_sp1};
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("x=%h mode=%0d got=%h exp=%h", x, dp_sp, y, e);
      end
      checks++;
      if (y_b !== e) begin
        failures++;
        if (failures < 10) $display("split x=%h mode=%0d got=%h exp=%h", x, dp_sp, y_b, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
