// abs_unit: magnitude of the derivative by two's complement.
//
// A negative D is inverted and incremented; a non-negative D passes as is.
// Since D is the difference of two 11-bit unsigned samples, |D| <= 2047 and
// the result fits 11 bits. Purely combinational.
module abs_unit
  import ecg_pkg::*;
(
  input  diff_t d,
  output mag_t  mag
);

  diff_t neg;
  assign neg = ~d + 1'b1;
  assign mag = d[D_W-1] ? mag_t'(neg) : mag_t'(d);

endmodule
