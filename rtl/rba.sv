// rba: W-digit redundant binary adder.
//
// A row of W rba_cell digit slices. Each slice takes the "both digits
// non-negative" flag and the intermediate carry from the slice below it;
// slice 0 sees a flag of 1 and a carry of 0. The intermediate carry out of
// the top slice is dropped, so s = a + b modulo 2^W. Because each slice
// looks only one position down, the delay does not grow with W.
// Purely combinational. The slice-by-slice structure follows the published
// adder; the handling of the bottom and top digits is this design's choice.
module rba
  import mr4_pkg::*;
#(
  parameter int W = 32  // digit count
) (
  input  rb_digit_t [W-1:0] a,
  input  rb_digit_t [W-1:0] b,
  output rb_digit_t [W-1:0] s
);

  logic      h [W+1];
  rb_digit_t c [W+1];

  assign h[0] = 1'b1;
  assign c[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_digit
    rba_cell u_cell (
      .a     (a[i]),
      .b     (b[i]),
      .h_in  (h[i]),
      .c_in  (c[i]),
      .h_out (h[i+1]),
      .c_out (c[i+1]),
      .s     (s[i])
    );
  end

endmodule
