// mr4_rba_multiplier: N x N unsigned multiplier built from a modified
// radix-4 Booth partial product array and a redundant binary adder tree.
//
// Data path (N = 16):
//   mr4_pp_array  9 partial products, shortened sign extension
//   rbpp_gen x5   rows (1,2) (3,4) (5,6) (7,8) and (9, 0) become 5 RBPPs
//   constant      a sixth RBPP equal to -5 cancels the +1 each conversion
//                 leaves behind
//   rb_tree       6 RBPPs -> 3 -> 2 -> 1 with five RBAs
//   rb2nb         redundant binary sum -> 2N-bit product
// The operands are unsigned: the two zeros appended above the multiplier
// make the top group non-negative. p = x * y exactly (it fits in 2N bits).
//
// Purely combinational, no clock or reset: p is valid one propagation delay
// after x and y change.
// The Booth array, the pairing into RBPPs, the six-operand RBA tree and the
// 16-bit width follow the published design. Reading the sixth RBPP as the
// -5 correction, the final converter and the parameterisation in N are this
// design's own.
module mr4_rba_multiplier
  import mr4_pkg::*;
#(
  parameter int N = 16  // operand width, even
) (
  input  logic [N-1:0]   x,  // multiplicand
  input  logic [N-1:0]   y,  // multiplier
  output logic [2*N-1:0] p   // product
);

  localparam int W      = 2*N;
  localparam int ROWS   = N/2 + 1;
  localparam int NPAIRS = (ROWS + 1) / 2;
  localparam int K      = NPAIRS + 1;

  logic [W-1:0]      rows  [ROWS];
  logic [W-1:0]      rows0 [2*NPAIRS];  // rows, padded with a zero row
  rb_digit_t [W-1:0] rbpp  [K];
  rb_digit_t [W-1:0] rb_sum;

  mr4_pp_array #(.N(N)) u_pp (
    .x    (x),
    .y    (y),
    .rows (rows)
  );

  for (genvar r = 0; r < 2*NPAIRS; r++) begin : g_pad
    if (r < ROWS) begin : g_row
      assign rows0[r] = rows[r];
    end else begin : g_zero
      assign rows0[r] = '0;
    end
  end

  for (genvar k = 0; k < NPAIRS; k++) begin : g_rbpp
    rbpp_gen #(.W(W)) u_rbpp (
      .a (rows0[2*k]),
      .b (rows0[2*k+1]),
      .z (rbpp[k])
    );
  end

  // Correction RBPP: the value -NPAIRS, all negative digits.
  always_comb begin
    logic [W-1:0] corr;
    corr = W'(NPAIRS);
    for (int i = 0; i < W; i++) begin
      rbpp[K-1][i].pos = 1'b0;
      rbpp[K-1][i].neg = corr[i];
    end
  end

  rb_tree #(.W(W), .K(K)) u_tree (
    .in  (rbpp),
    .sum (rb_sum)
  );

  rb2nb #(.W(W)) u_out (
    .z (rb_sum),
    .p (p)
  );

endmodule
