// cond_shifter: Golomb-Rice split of D(n) into quotient Q and remainder R.
//
// The left-shift module turns the constant 2 into the divisor: 2<<2 = 8,
// 2<<3 = 16, 2<<4 = 32 for codes 01, 10, 11. Sub 1 takes one off to form the
// mask divisor-1, and the AND of D with that mask is the remainder R. The
// conditional shifter shifts D right by k = 3, 4 or 5 to give Q. Code 00 shifts
// nothing: Q = D, R = 0.
//
// The shift is arithmetic, so Q = floor(D / 2^k) and D = Q*2^k + R exactly for
// negative D as well (the design does not say how the sign is handled; this
// choice keeps the split lossless). Purely combinational.
module cond_shifter
  import ecg_pkg::*;
(
  input  diff_t                d,
  input  div_code_e            code,
  output logic signed [D_W-1:0] q,
  output logic [R_W-1:0]       r,
  output logic [2:0]           k,
  output logic [R_W:0]         divisor
);

  logic [R_W:0] mask;

  assign k       = code_to_k(code);
  assign divisor = (code == DIV_NONE) ? (R_W+1)'(1) : (R_W+1)'(2) << (k - 3'd1);
  assign mask    = divisor - 1'b1;                    // Sub 1
  assign r       = R_W'(D_W'(d) & D_W'(mask));         // AND
  assign q       = d >>> k;                           // conditional shifter

endmodule
