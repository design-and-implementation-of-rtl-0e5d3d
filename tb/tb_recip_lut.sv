// tb_recip_lut: checks every entry of the reciprocal tables. An entry r for
// a1 = 1 + k/256 must be the nearest integer to 2^B * 256/(256+k), i.e.
// |r*(256+k) - 2^(B+8)| <= (256+k)/2, with B = 53 for the DP table and 24
// for the SP-1 table; the k = 0 entry must be all ones. The SP-2 word,
// derived from the shared table, must be within 1 of the exact value.
module tb_recip_lut;
  logic [7:0]  idx_hi, idx_lo;
  logic [52:0] recip_dp;
  logic [23:0] recip_sp2, recip_sp1;
  int checks = 0, failures = 0;

  recip_lut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(logic [127:0] r, int k, int b, int slack2);
    // |r*(256+k) - 2^(b+8)| * 2 <= slack2 * (256+k)
    logic [127:0] d, one;
    one = 128'd1 << (b + 8);
    d   = r * (256 + k);
    d   = (d > one) ? d - one : one - d;
    return (d * 2) <= 128'(slack2 * (256 + k));
  endfunction

  initial begin
    for (int k = 0; k < 256; k++) begin
      idx_hi = 8'(k);
      idx_lo = 8'(255 - k);
      #1;
      checks += 3;
      if (k == 0) begin
        if (recip_dp != '1 || recip_sp2 != '1) begin
          failures++;
          $display("k=0 entry not saturated");
        end
      end else begin
        if (!near(128'(recip_dp), k, 53, 1)) begin
          failures++;
          $display("DP k=%0d r=%h", k, recip_dp);
        end
        if (!near(128'(recip_sp2), k, 24, 2)) begin
          failures++;
          $display("SP2 k=%0d r=%h", k, recip_sp2);
        end
      end
      if (255 - k == 0) begin
        if (recip_sp1 != '1) failures++;
      end else if (!near(128'(recip_sp1), 255 - k, 24, 1)) begin
        failures++;
        $display("SP1 k=%0d r=%h", 255 - k, recip_sp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
