// rb2nb: redundant binary to normal binary converter.
//
// A redundant binary number with digits (pos, neg) has the value
// POS - NEG, where POS and NEG are the W-bit words made of the pos bits and
// of the neg bits. This block forms that difference modulo 2^W with one
// carry-propagate subtraction, the only carry chain of the multiplier.
// Purely combinational. The published block diagram ends at the last RB
// adder; this plain subtraction is this design's choice of converter.
module rb2nb
  import mr4_pkg::*;
#(
  parameter int W = 32  // digit count / output width
) (
  input  rb_digit_t [W-1:0] z,
  output logic [W-1:0]      p
);

  logic [W-1:0] pos_w, neg_w;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      pos_w[i] = z[i].pos;
      neg_w[i] = z[i].neg;
    end
    p = pos_w - neg_w;
  end

endmodule
