// bcd_pkg: types and constants shared by the binary-to-BCD converters.
//
// A BCD (binary-coded decimal) number keeps each decimal digit in its own
// 4-bit field, least significant digit in bits [3:0]. A 32-bit unsigned
// binary number needs at most ten decimal digits (2^32-1 = 4 294 967 295),
// so the converters default to a 32-bit input and a 40-bit output, as in
// the exercise the design follows.
//
// out_mode_e selects how the sequential converter (bin_to_bcd) holds its
// result while it waits for the consumer's acknowledge. Both schemes are
// the two alternatives of the original exercise:
//   OUT_REG   - the finished digits are copied into an output register and
//               the digit chain is free to run on (variant "a");
//   OUT_STALL - the digit chain itself is frozen by a clock enable until the
//               result is taken (variant "b").
package bcd_pkg;

  // Default sizes of the exercise: 32-bit binary in, ten BCD digits out.
  localparam int unsigned DEF_BIN_W  = 32;
  localparam int unsigned DEF_DIGITS = 10;

  typedef logic [3:0] bcd_digit_t;

  typedef enum logic {
    OUT_REG   = 1'b0,
    OUT_STALL = 1'b1
  } out_mode_e;

  // Smallest number of decimal digits that holds every BIN_W-bit unsigned
  // value: floor(w * log10(2)) + 1, with log10(2) taken as 0.30103. The
  // approximation is exact for every width up to several thousand bits.
  function automatic int unsigned min_digits(int unsigned w);
    return (w * 30103) / 100000 + 1;
  endfunction

endpackage
