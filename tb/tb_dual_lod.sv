// tb_dual_lod: checks the dual-mode leading-one detector against a
// bit-by-bit leading-zero count, for random words with a random number of
// leading zeros in each half, in both modes, including the zeroing of the
// counts of the unused mode. The count of an all-zero field is unspecified
// and such fields are skipped.
module tb_dual_lod;
  logic [63:0] x;
  logic        dp_sp;
  logic [5:0]  lz_dp;
  logic [4:0]  lz_sp1, lz_sp2;
  int checks = 0, failures = 0;

  dual_lod dut (.*);

  function automatic int clz(logic [63:0] v, int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return w - 1 - i;
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] h, l;
      h = ($urandom | 32'h8000_0000) >> $urandom_range(0, 31);
      l = ($urandom | 32'h8000_0000) >> $urandom_range(0, 31);
      if (n % 5 == 0) h = '0;
      x     = {h, l};
      dp_sp = n[0];
      #1;
      if (dp_sp) begin
        checks++;
        if (lz_dp != 6'(clz(x, 64)) || lz_sp1 != 0 || lz_sp2 != 0) begin
          failures++;
          $display("DP x=%h lz=%0d", x, lz_dp);
        end
      end else if (h != 0) begin
        checks++;
        if (lz_sp1 != 5'(clz({32'd0, l}, 32)) || lz_sp2 != 5'(clz({32'd0, h}, 32)) || lz_dp != 0) begin
          failures++;
          $display("SP x=%h lz1=%0d lz2=%0d", x, lz_sp1, lz_sp2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
