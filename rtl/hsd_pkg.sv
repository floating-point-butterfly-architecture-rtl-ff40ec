// Shared definitions for the hybrid signed-digit (HSD) floating-point butterfly.
//
// Signed-digit numbers are carried as two bit vectors of equal width, a
// "plus" vector p and a "minus" vector n: digit i has the value p[i] - n[i]
// and the whole number is P - N. A binary signed-digit (BSD/RBSD) number may
// have any digit in {-1,0,1}. A hybrid signed-digit number allows {-1,0,1}
// only at its signed positions and {0,1} (n[i] = 0) everywhere else.
//
// The placement of the signed positions is fixed by one function, so that
// every HSD operand in the design agrees on it: a digit is signed when it is
// the top digit of a group of SPACING digits, and the most significant digit
// is always signed. Carries therefore ripple through at most SPACING digits.
//
// The package also holds the IEEE-754 field helpers and a leading-zero
// counter used by the floating-point units. Single precision (8-bit exponent,
// 23-bit fraction) is the default format throughout the design; half
// precision is obtained with EXP_W = 5, FRAC_W = 10.
package hsd_pkg;

  // Default signed-digit spacing: a signed digit every fourth position.
  localparam int unsigned SD_SPACING_DEF = 4;

  // Default floating-point format: IEEE-754 single precision.
  localparam int unsigned EXP_W_DEF  = 8;
  localparam int unsigned FRAC_W_DEF = 23;

  // True when digit position pos of a width-digit HSD word is signed.
  function automatic bit sd_signed(int unsigned pos, int unsigned width, int unsigned spacing);
    return (pos == width - 1) || ((pos % spacing) == spacing - 1);
  endfunction

  // Number of leading zeros of a 64-bit value, looking only at its low
  // width bits; returns width for zero.
  function automatic int unsigned lzc(logic [63:0] v, int unsigned width);
    int unsigned z;
    bit          found;
    z = width;
    found = 1'b0;
    for (int i = 63; i >= 0; i--) begin
      if (!found && (i < int'(width)) && v[i]) begin
        z = width - 1 - i;
        found = 1'b1;
      end
    end
    return z;
  endfunction

endpackage
