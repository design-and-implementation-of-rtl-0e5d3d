// lod_tree: leading-one detector built as a tree of 2:1 LOD cells.
//
// A 2:1 cell on bits {a,b} gives valid = a|b and position = ~a (one OR and
// one NOT). Each further level merges two neighbouring detectors with one
// AND-OR mux: if the upper one holds a one its count is used with a leading
// 0, otherwise the lower one's count with a leading 1. log2(W) levels give
// the full count. Output lz is the number of leading zeros; it is
// meaningless when valid is 0. Purely combinational. W must be a power of 2
// and at least 2.
//
// Built from the 2:1 LOD cell of the published architecture.
module lod_tree #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         x,
  output logic                 valid,
  output logic [$clog2(W)-1:0] lz
);
  localparam int unsigned L = $clog2(W);

  // level k (1..L) has W >> k detectors, each with a k-bit count
  for (genvar k = 1; k <= L; k++) begin : g_lvl
    localparam int unsigned N = W >> k;
    logic         v  [N];
    logic [k-1:0] c  [N];
    for (genvar i = 0; i < N; i++) begin : g_cell
      if (k == 1) begin : g_leaf
        assign v[i] = x[2*i+1] | x[2*i];
        assign c[i] = ~x[2*i+1];
      end else begin : g_node
        logic         v_hi, v_lo;
        logic [k-2:0] c_hi, c_lo;
        assign v_hi = g_lvl[k-1].v[2*i+1];
        assign v_lo = g_lvl[k-1].v[2*i];
        assign c_hi = g_lvl[k-1].c[2*i+1];
        assign c_lo = g_lvl[k-1].c[2*i];
        assign v[i] = v_hi | v_lo;
        assign c[i] = v_hi ? {1'b0, c_hi} : {1'b1, c_lo};
      end
    end
  end

  assign valid = g_lvl[L].v[0];
  assign lz    = g_lvl[L].c[0];
endmodule
