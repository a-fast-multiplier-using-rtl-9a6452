// rb_tree: binary tree of redundant binary adders.
//
// Sums K redundant binary partial products of W digits. Each level adds
// neighbours in pairs (0+1, 2+3, ...) with one rba each; an odd last input
// is passed to the next level unchanged. With K = 6 this gives three RBAs,
// then one RBA plus a pass-through, then the final RBA: the arrangement of
// the multiplier's block diagram. Depth is ceil(log2 K) RBAs, and the result
// is the sum modulo 2^W. Purely combinational.
// The K = 6 shape is the published one; the generic pairing rule that
// produces it for any K is this design's.
module rb_tree
  import mr4_pkg::*;
#(
  parameter int W = 32,  // digit count
  parameter int K = 6    // number of inputs, >= 1
) (
  input  rb_digit_t [W-1:0] in  [K],
  output rb_digit_t [W-1:0] sum
);

  localparam int LEVELS = $clog2(K);

  // number of operands at tree level l (level 0 = the inputs)
  function automatic int count_at(int l);
    int n = K;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    rb_digit_t [W-1:0] node [K];
    for (genvar k = 0; k < K; k++) begin : g_node
      if (l == 0) begin : g_in
        assign node[k] = in[k];
      end else if (k < count_at(l) && 2*k+1 < count_at(l-1)) begin : g_add
        rba #(.W(W)) u_rba (
          .a (g_lvl[l-1].node[2*k]),
          .b (g_lvl[l-1].node[2*k+1]),
          .s (node[k])
        );
      end else if (k < count_at(l)) begin : g_pass
        assign node[k] = g_lvl[l-1].node[2*k];
      end else begin : g_unused
        assign node[k] = '0;
      end
    end
  end

  assign sum = g_lvl[LEVELS].node[0];

endmodule
