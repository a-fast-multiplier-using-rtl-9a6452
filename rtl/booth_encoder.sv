// booth_encoder: radix-4 Booth encoder for one multiplier group.
//
// The group is three overlapping multiplier bits {y(2j+1), y(2j), y(2j-1)}.
// The encoded digit is d = -2*y(2j+1) + y(2j) + y(2j-1), one of 0, +1, -1,
// +2, -2, and it is delivered as three select lines: "one" (M) when |d| = 1,
// "two" (2M) when |d| = 2, and "neg" (s) which is the group's most
// significant bit. Group 000 gives all three low and group 001 gives M = 1,
// 2M = 0, as in the encoder description. Taking s straight from the top bit
// (so 111 gives a negative zero) is this design's choice; the partial
// product generator turns a negative zero back into 0.
//
// Purely combinational, no clock.
module booth_encoder
  import mr4_pkg::*;
(
  input  logic [2:0]  grp,  // {y(2j+1), y(2j), y(2j-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2];
  end

endmodule
