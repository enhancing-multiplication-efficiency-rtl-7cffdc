// Shared types and the radix-4 Booth recoding rule of the signed multiplier.
//
// The multiplier operand is scanned in overlapping three-bit groups
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0). Each group selects one partial
// product: 0, +A, +2A, -A or -2A. The selection is carried as three control
// bits: `one` picks A, `two` picks A shifted left by one bit, and `neg` asks
// for the one's complement of the picked value, with the missing +1 of the
// two's complement added later as a separate correction bit.
//
// Group codes and their meaning are the standard radix-4 Booth table; the
// codes 100, 101 and 110 are the subtracting ones.
package booth_pkg;

  typedef struct packed {
    logic neg;  // partial product is subtracted (one's complement + 1)
    logic two;  // magnitude is 2*A
    logic one;  // magnitude is A
  } booth_sel_t;

  // Decode one three-bit group {b[2i+1], b[2i], b[2i-1]}.
  function automatic booth_sel_t booth_decode(input logic [2:0] grp);
    booth_sel_t s;
    s.one = grp[1] ^ grp[0];
    s.two = (grp == 3'b011) || (grp == 3'b100);
    // 111 is "minus zero": no subtraction is needed, so neg stays 0.
    s.neg = grp[2] && !(grp[1] && grp[0]);
    return s;
  endfunction

endpackage
