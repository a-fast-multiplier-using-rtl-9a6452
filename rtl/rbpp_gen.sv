// rbpp_gen: normal binary to redundant binary partial product converter.
//
// Two W-bit normal binary partial products A and B become one redundant
// binary partial product (RBPP). Since A + B = A - ~B - 1 (mod 2^W), the
// RBPP is the digit string (A, ~B): digit i is a(i) - ~b(i). The pair
// (1, 1) is written as (0, 0), so the digits are
//   pos(i) =  a(i) &  b(i)      neg(i) = ~a(i) & ~b(i).
// The value of z is therefore A + B + 1 modulo 2^W; the "-1" that the
// conversion owes (a (0,1) digit at the lowest position) is not added here
// but collected, for all RBPPs together, in one constant RBPP by the
// multiplier top. Purely combinational, one gate level.
// The conversion (A, ~B) and the (1,1) -> (0,0) rule follow the published
// design; moving the correction digit into a shared constant is this
// design's choice.
module rbpp_gen
  import mr4_pkg::*;
#(
  parameter int W = 32  // digit count (product width)
) (
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  output rb_digit_t [W-1:0] z
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      z[i].pos = a[i] & b[i];
      z[i].neg = ~a[i] & ~b[i];
    end
  end

endmodule
