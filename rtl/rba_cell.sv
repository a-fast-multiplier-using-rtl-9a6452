// rba_cell: one digit position of the redundant binary adder (RBA).
//
// Adds digits a and b (each -1, 0 or +1). Their sum t is split into an
// intermediate carry c_out (to position i+1) and an intermediate sum w, so
// that t = 2*c_out + w, choosing by h_in, which says whether both digits one
// position lower are non-negative:
//   t = +2           -> c = +1, w =  0
//   t = +1, h_in = 1 -> c = +1, w = -1     t = +1, h_in = 0 -> c =  0, w = +1
//   t =  0           -> c =  0, w =  0
//   t = -1, h_in = 1 -> c =  0, w = -1     t = -1, h_in = 0 -> c = -1, w = +1
//   t = -2           -> c = -1, w =  0
// The final digit is s = w + c_in, where c_in is the intermediate carry of
// position i-1. The choice guarantees that w and c_in are never both +1 or
// both -1, so s is again a single digit and no carry ripples further than
// one position. h_out tells position i+1 whether a and b are both
// non-negative. Purely combinational; the path is independent of the word
// length.
// The rule is the published computation rule for redundant binary addition;
// this slice is written from that rule, not from a gate-level schematic.
// The split for t = +1 with non-negative lower digits (carry +1, sum -1) is
// the only one consistent with the rest of the rule.
module rba_cell
  import mr4_pkg::*;
(
  input  rb_digit_t a,
  input  rb_digit_t b,
  input  logic      h_in,   // both digits at position i-1 are >= 0
  input  rb_digit_t c_in,   // intermediate carry from position i-1
  output logic      h_out,  // both digits at this position are >= 0
  output rb_digit_t c_out,  // intermediate carry to position i+1
  output rb_digit_t s       // sum digit
);

  logic signed [2:0] av, bv, t, cv, wv, sv;

  function automatic logic signed [2:0] dval(rb_digit_t d);
    return $signed({2'b00, d.pos}) - $signed({2'b00, d.neg});
  endfunction

  always_comb begin
    av = dval(a);
    bv = dval(b);
    t  = av + bv;
    cv = '0;
    wv = '0;
    case (t)
      3'sd2:  begin cv = 3'sd1;  wv = 3'sd0;  end
      3'sd1:  begin
        if (h_in) begin cv = 3'sd1; wv = -3'sd1; end
        else      begin cv = 3'sd0; wv = 3'sd1;  end
      end
      -3'sd1: begin
        if (h_in) begin cv = 3'sd0;  wv = -3'sd1; end
        else      begin cv = -3'sd1; wv = 3'sd1;  end
      end
      -3'sd2: begin cv = -3'sd1; wv = 3'sd0;  end
      default: begin cv = 3'sd0; wv = 3'sd0;  end
    endcase
    sv        = wv + dval(c_in);
    h_out     = (av >= 0) && (bv >= 0);
    c_out.pos = (cv == 3'sd1);
    c_out.neg = (cv == -3'sd1);
    s.pos     = (sv == 3'sd1);
    s.neg     = (sv == -3'sd1);
  end

endmodule
