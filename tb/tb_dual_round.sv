// tb_dual_round: checks the dual-mode rounder against integer
// round-to-nearest-even: for each lane the kept field is j >> s with
// s = 11 (DP) or 8 (SP), or one less when the MSB is 0 and the lane may
// normalize; the remainder is compared with half an ulp, the shifter's
// sticky bit breaking ties upwards. Carry-out into the extra top bit,
// the low-position flags and the inexact flags are checked too.
module tb_dual_round;
  logic [63:0] j, r;
  logic dp_sp, sticky_lo, sticky_hi, norm_dp, norm_sp1, norm_sp2;
  logic low_dp, low_sp1, low_sp2, inexact_lo, inexact_hi;
  int checks = 0, failures = 0;

  dual_round dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns {inexact, low, rounded value}
  function automatic logic [65:0] rne(logic [63:0] v, int w, int keep, logic stk, logic norm);
    int          s;
    logic        low;
    logic [63:0] fl, rem, half;
    logic        up;
    low  = !v[w-1] && norm;
    s    = w - keep - (low ? 1 : 0);
    fl   = v >> s;
    rem  = v & ((64'd1 << s) - 1);
    half = 64'd1 << (s - 1);
    up   = (rem > half) || (rem == half && (stk || fl[0]));
    return {(rem != 0) || stk, low, fl + 64'(up)};
  endfunction

  initial begin
    logic [65:0] e0, e1, e2;
    for (int n = 0; n < 6000; n++) begin
      j = {$urandom, $urandom};
      if (n % 4 == 0) j = j | 64'h0000_07FF_0000_00FF;    // force carries
      if (n % 3 == 0) j[63] = 1'b0;
      if (n % 5 == 0) j[31] = 1'b0;
      if (n % 7 == 0) j = j & ~64'h0000_03FF_0000_007F;   // exact ties / zero
      dp_sp     = 1'($urandom);
      sticky_lo = ($urandom_range(0, 3) == 0);
      sticky_hi = ($urandom_range(0, 3) == 0);
      norm_dp   = 1'($urandom);
      norm_sp1  = 1'($urandom);
      norm_sp2  = 1'($urandom);
      #1;
      checks++;
      if (dp_sp) begin
        e0 = rne(j, 64, 53, sticky_lo, norm_dp);
        if (r[53:0] !== e0[53:0] || low_dp !== e0[64] || inexact_lo !== e0[65]) begin
          failures++;
          if (failures < 10) $display("DP j=%h got %h exp %h", j, r, e0[63:0]);
        end
      end else begin
        e1 = rne({32'd0, j[31:0]},  32, 24, sticky_lo, norm_sp1);
        e2 = rne({32'd0, j[63:32]}, 32, 24, sticky_hi, norm_sp2);
        if (r[24:0] !== e1[24:0] || r[56:32] !== e2[24:0] || low_sp1 !== e1[64] ||
            low_sp2 !== e2[64] || inexact_lo !== e1[65] || inexact_hi !== e2[65]) begin
          failures++;
          if (failures < 10) $display("SP j=%h got %h exp %h %h", j, r, e2[24:0], e1[24:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
