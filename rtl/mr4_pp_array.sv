// mr4_pp_array: modified radix-4 Booth partial product array.
//
// The unsigned N-bit multiplier y gets one 0 appended below its LSB and two
// 0s above its MSB, and is cut into N/2+1 overlapping three-bit groups:
// group j = {y(2j+1), y(2j), y(2j-1)}, the first being {y1, y0, 0} and the
// last {0, 0, y(N-1)}. For N = 16 that is 9 groups and 9 partial products.
// Each group drives a booth_encoder and a pp_generator; row j is weighted by
// 4^j, i.e. shifted left by 2j.
//
// Sign extension is not carried to the product width. Row 0 gets the three
// bits {~s, s, s} at positions N+3..N+1 (for N = 16 this reaches bit 19, the
// 20th position), every later row gets {1, ~s} just above its sign
// position. These constants add up to the two's complement of the sum of all
// sign-extension ones, so the rows add up to x*y modulo 2^(2N). The "+1" of
// a negative row j is placed at bit 2j of row j+1, which is free there
// because row j+1 starts at bit 2j+2. The last row is never negative.
//
// The padding, grouping, nine rows and sign extension ending at bit 19
// follow the published design; the exact constant-bit pattern and the
// placement of the +1 bits are this design's.
//
// Output: N/2+1 rows of 2N bits (bits above 2N-1 are dropped); the product
// is the sum of the rows modulo 2^(2N). Purely combinational.
// Each row is assembled in a temporary four bits wider than the product so
// that the sign-extension bits of the top rows can be written without range
// checks; those top four bits lie above the product and are dropped on
// purpose, which is why a linter reports them as unused.
module mr4_pp_array
  import mr4_pkg::*;
#(
  parameter int N = 16  // operand width, even
) (
  input  logic [N-1:0]   x,               // multiplicand
  input  logic [N-1:0]   y,               // multiplier
  output logic [2*N-1:0] rows [N/2+1]
);

  localparam int ROWS = N/2 + 1;

  logic [N+2:0] yz;          // {0, 0, y, 0}
  logic [N:0]   pp      [ROWS];
  logic         sign    [ROWS];
  logic         neg_lsb [ROWS];

  assign yz = {2'b00, y, 1'b0};

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    booth_sel_t sel;
    booth_encoder u_enc (
      .grp (yz[2*j +: 3]),
      .sel (sel)
    );
    pp_generator #(.N(N)) u_ppg (
      .x       (x),
      .sel     (sel),
      .pp      (pp[j]),
      .sign    (sign[j]),
      .neg_lsb (neg_lsb[j])
    );
  end

  always_comb begin
    logic [2*N+3:0] t;
    for (int j = 0; j < ROWS; j++) begin
      t = '0;
      t[2*j +: N+1] = pp[j];
      if (j == 0) begin
        t[N+1] = sign[0];
        t[N+2] = sign[0];
        t[N+3] = ~sign[0];
      end else begin
        t[N+1+2*j] = ~sign[j];
        t[N+2+2*j] = 1'b1;
        t[2*j-2]   = neg_lsb[j-1];
      end
      rows[j] = t[2*N-1:0];
    end
  end

endmodule
