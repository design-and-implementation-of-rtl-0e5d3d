// dual_booth_mult: dual-mode radix-4 modified Booth multiplier.
//
// A 54 x 54 unsigned multiplier that can also compute two independent
// 24 x 24 products. It takes two multiplicands, in1_t1 and in1_t2, and one
// multiplier in2. in2 is recoded into 28 radix-4 Booth digits in {-2..2}
// (digit i looks at in2 bits 2i+1, 2i, 2i-1). Partial products 0..13 (PP1)
// multiply in1_t1 and partial products 14..27 (PP2) multiply in1_t2.
//   DP mode:   in1_t1 = in1_t2 = multiplicand, all 28 rows form the product.
//   dual SP:   in1_t1 = {30'b0, a1}, in1_t2 = {a2, 30'b0},
//              in2    = {b2, 6'b0, b1}
//              digits 0..12 see only b1 and digits 15..27 only b2; digits 13
//              and 14 see the 6 zero bits and are null. The SP-1 product
//              lands in p[47:0] and the SP-2 product in p[107:60]; the two
//              groups of rows sum to values that do not overlap, so one
//              ordinary reduction gives both results.
// The only dual-mode cost is the operand multiplexing done by the caller.
// Rows are sign-extended two's complement values; they are reduced with
// levels of 3:2 carry-save adders (28 -> 19 -> 13 -> 9 -> 6 -> 4 -> 3 -> 2)
// and the two remaining rows are added by a Kogge-Stone adder. The product
// is modulo 2^108, which is exact since operands are unsigned and < 2^54.
// STAGES = 1 (default): combinational, the single-stage multiplier.
// STAGES = 2: a pipeline register holds the three rows left after the sixth
// carry-save level, so p follows the operands by one clock; clk and rst_n
// are unused when STAGES = 1.
//
// The operand packing and the split of the partial products follow the
// published architecture. The reduction uses 3:2 carry-save levels where
// the published design uses a Dadda tree of 8 levels.
module dual_booth_mult #(
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [53:0]  in1_t1,
  input  logic [53:0]  in1_t2,
  input  logic [53:0]  in2,
  output logic [107:0] p
);
  localparam int unsigned PW = 108;
  localparam int unsigned NPP = 28;

  // number of rows after l carry-save levels
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n;
    n = NPP;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NL = num_levels();
  // carry-save level after which the two-stage version is registered
  localparam int unsigned PIPE_LVL = 6;

  // Booth recoding and partial product generation
  logic [PW-1:0] pp [NPP];
  logic [55:0]   in2x;
  assign in2x = {1'b0, 1'b0, in2};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [2:0]    trip;
    logic [53:0]   mcand;
    logic [PW-1:0] mag;
    if (i == 0) begin : g_first
      assign trip = {in2x[1], in2x[0], 1'b0};
    end else begin : g_rest
      assign trip = in2x[2*i+1 : 2*i-1];
    end
    assign mcand = (i < NPP / 2) ? in1_t1 : in1_t2;
    always_comb begin
      unique case (trip)
        3'b001, 3'b010: mag = PW'(mcand);
        3'b101, 3'b110: mag = -PW'(mcand);
        3'b011:         mag = PW'(mcand) << 1;
        3'b100:         mag = -(PW'(mcand) << 1);
        default:        mag = '0;
      endcase
    end
    assign pp[i] = mag << (2 * i);
  end

  // carry-save reduction tree, one row array per level; outr is what the
  // next level sees (the rows themselves, or their pipeline register)
  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int unsigned N = rows_at(l);
    logic [PW-1:0] rows [N];
    logic [PW-1:0] outr [N];
    if (STAGES == 2 && l == PIPE_LVL) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) outr <= '{default: '0};
        else        outr <= rows;
      end
    end else begin : g_wire
      assign outr = rows;
    end
    if (l == 0) begin : g_init
      assign rows = pp;
    end else begin : g_red
      localparam int unsigned NP = rows_at(l - 1);
      localparam int unsigned NG = NP / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        logic [PW-1:0] a, b, c;
        assign a = g_lvl[l-1].outr[3*g];
        assign b = g_lvl[l-1].outr[3*g+1];
        assign c = g_lvl[l-1].outr[3*g+2];
        assign rows[2*g]   = a ^ b ^ c;
        assign rows[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar r = 3 * NG; r < NP; r++) begin : g_pass
        assign rows[2*NG + r - 3*NG] = g_lvl[l-1].outr[r];
      end
    end
  end

  ks_adder #(.W(PW)) u_cpa (.a(g_lvl[NL].outr[0]), .b(g_lvl[NL].outr[1]), .s(p));
endmodule
