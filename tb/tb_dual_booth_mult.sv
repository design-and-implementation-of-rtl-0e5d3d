// tb_dual_booth_mult: checks the dual-mode Booth multiplier in both of its
// versions: the combinational one (STAGES = 1) right after the operands
// change, and the two-stage one (STAGES = 2) one clock later. DP mode: random
// and extreme 54-bit operands against the exact 108-bit product. Dual-SP
// mode: operands packed as the mantissa divider packs them, and the two
// 48-bit products read from p[47:0] and p[107:60] against exact products.
module tb_dual_booth_mult;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [53:0]  in1_t1, in1_t2, in2;
  logic [107:0] p, p2;
  int checks = 0, failures = 0;

  dual_booth_mult dut (.clk(clk), .rst_n(rst_n), .in1_t1(in1_t1), .in1_t2(in1_t2),
                       .in2(in2), .p(p));
  dual_booth_mult #(.STAGES(2)) dut2 (.clk(clk), .rst_n(rst_n), .in1_t1(in1_t1),
                                      .in1_t2(in1_t2), .in2(in2), .p(p2));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [53:0] r54(int n);
    logic [53:0] v;
    v = 54'({$urandom, $urandom});
    case (n % 6)
      0: v = '1;
      1: v = 54'd1 << $urandom_range(0, 53);
      2: v = v >> $urandom_range(0, 53);
      default: ;
    endcase
    return v;
  endfunction

  // both versions must show the expected product: the combinational one
  // now, the registered one after the next clock edge
  task automatic check(input logic [107:0] exp_p, input logic sp, input string what);
    #1;
    checks++;
    if (sp ? (p[47:0] !== exp_p[47:0] || p[107:60] !== exp_p[107:60]) : p !== exp_p) begin
      failures++;
      if (failures < 10) $display("%s 1-stage in1=%h in2=%h p=%h exp=%h", what, in1_t1, in2, p, exp_p);
    end
    @(posedge clk);
    #1;
    checks++;
    if (sp ? (p2[47:0] !== exp_p[47:0] || p2[107:60] !== exp_p[107:60]) : p2 !== exp_p) begin
      failures++;
      if (failures < 10) $display("%s 2-stage in1=%h in2=%h p=%h exp=%h", what, in1_t1, in2, p2, exp_p);
    end
  endtask

  initial begin
    logic [23:0] a1, a2, b1, b2;
    in1_t1 = '0; in1_t2 = '0; in2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [53:0] a, b;
      @(negedge clk);
      a = r54(n);
      b = r54(n / 6);
      in1_t1 = a; in1_t2 = a; in2 = b;
      check(108'(a) * 108'(b), 1'b0, "DP");
      @(negedge clk);
      a1 = (n % 7 == 0) ? '1 : 24'($urandom);
      a2 = (n % 5 == 0) ? '1 : 24'($urandom);
      b1 = (n % 3 == 0) ? '1 : 24'($urandom);
      b2 = 24'($urandom);
      in1_t1 = {30'd0, a1};
      in1_t2 = {a2, 30'd0};
      in2    = {b2, 6'd0, b1};
      check({48'(a2) * 48'(b2), 12'd0, 48'(a1) * 48'(b1)}, 1'b1, "SP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
