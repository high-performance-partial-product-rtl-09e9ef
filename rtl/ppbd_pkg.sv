// Shared types and constants of the PPBD (partial product binary-to-decimal)
// BCD multiplier.
//
// A BCD digit is a 4-bit binary number in 0..9. The multiplier is built for
// N-digit operands; the helpers below give the widths that follow from N:
// a column of the partial product matrix holds at most 2N-1 digits, so its
// binary sum is at most 9*(2N-1), and it must stay below 100 so that the
// column converter can produce exactly two BCD digits (N <= 6).
package ppbd_pkg;

  typedef logic [3:0] bcd_digit_t;

  // Largest sum of one partial product column for N-digit operands.
  function automatic int col_max(input int n);
    return 9 * (2 * n - 1);
  endfunction

  // Bits needed to hold col_max(n) in binary.
  function automatic int col_width(input int n);
    return $clog2(col_max(n) + 1);
  endfunction

endpackage
