// pp_generator: one radix-4 Booth partial product row.
//
// From the N-bit unsigned multiplicand x and the encoder's select lines it
// forms the N+1 bit magnitude M*x or 2M*x (2x is x shifted left by one) and,
// when the row is negative, inverts every bit. The "+1" that completes the
// two's complement is not added here: it is returned as neg_lsb and the
// partial product array places it in a free position of the next row, the
// usual way of adding a 1 at the row's least significant bit. sign is the
// row's sign bit, used by the array for the shortened sign extension.
//
// Row value (as an N+2 bit two's complement number) = {sign, pp} + neg_lsb
//           = d * x, d in {0, +1, -1, +2, -2}.
// Purely combinational. Selecting x or 2x and complementing for negative
// multiples follow the published design; handing the +1 to the array is
// this design's choice.
module pp_generator
  import mr4_pkg::*;
#(
  parameter int N = 16  // operand width
) (
  input  logic [N-1:0] x,
  input  booth_sel_t   sel,
  output logic [N:0]   pp,
  output logic         sign,
  output logic         neg_lsb
);

  logic [N:0] mag;

  always_comb begin
    mag     = ({(N+1){sel.one}} & {1'b0, x}) | ({(N+1){sel.two}} & {x, 1'b0});
    pp      = mag ^ {(N+1){sel.neg}};
    sign    = sel.neg;
    neg_lsb = sel.neg;
  end

endmodule
