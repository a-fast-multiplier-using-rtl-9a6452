// mr4_pkg: types shared by the modified radix-4 Booth / redundant binary
// multiplier.
//
// booth_sel_t is the output of one Booth encoder: the three select lines
// "M" (pick 1x the multiplicand), "2M" (pick 2x) and "s" (the row is
// negative). rb_digit_t is one redundant binary digit in positive/negative
// bit form; its value is pos - neg, so (0,0)=0, (1,0)=+1, (0,1)=-1. The
// blocks of this design never produce the pair (1,1).
package mr4_pkg;

  typedef struct packed {
    logic one;  // M  : select 1x multiplicand
    logic two;  // 2M : select 2x multiplicand
    logic neg;  // s  : negate the selected multiple
  } booth_sel_t;

  typedef struct packed {
    logic pos;
    logic neg;
  } rb_digit_t;

endpackage
