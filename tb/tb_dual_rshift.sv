// tb_dual_rshift: checks the dual-mode right shifter and its sticky bits.
// DP mode is compared with a 64-bit shift whose lost bits are ORed into
// sticky_lo; dual-SP mode with two independent 32-bit shifts, each with its
// own sticky bit.
module tb_dual_rshift;
  logic [63:0] x, y;
  logic        dp_sp, sticky_lo, sticky_hi;
  logic [5:0]  sh_dp;
  logic [4:0]  sh_sp1, sh_sp2;
  int checks = 0, failures = 0;

  dual_rshift dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    logic        es_lo, es_hi;
    for (int n = 0; n < 4000; n++) begin
      x      = {$urandom, $urandom};
      if (n % 3 == 0) x = x & ~((64'd1 << $urandom_range(0, 40)) - 1);
      dp_sp  = 1'($urandom);
      sh_dp  = 6'($urandom);
      sh_sp1 = 5'($urandom);
      sh_sp2 = 5'($urandom);
      #1;
      if (dp_sp) begin
        e     = x >> sh_dp;
        es_lo = (x & ((64'd1 << sh_dp) - 1)) != 0;
        es_hi = 1'b0;
      end else begin
        e     = {x[63:32] >> sh_sp2, x[31:0] >> sh_sp1};
        es_lo = (x[31:0]  & ((32'd1 << sh_sp1) - 1)) != 0;
        es_hi = (x[63:32] & ((32'd1 << sh_sp2) - 1)) != 0;
      end
      checks++;
      if (y !== e || sticky_lo !== es_lo || sticky_hi !== es_hi) begin
        failures++;
        if (failures < 10)
          $display("x=%h mode=%0d got=%h/%b%b exp=%h/%b%b", x, dp_sp, y, sticky_hi, sticky_lo,
                   e, es_hi, es_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
