// threshold_comp: picks the divisor code from the packet mean (Comp).
//
// Tests M < th1, then M < th2, then M < th3, as in the flowchart, and encodes
// the outcome on {C1,C0}:
//   M < th1         -> 01 (divide by 8)
//   th1 <= M < th2  -> 10 (divide by 16)
//   th2 <= M < th3  -> 11 (divide by 32)
//   M >= th3        -> 00 (no shift)
// The thresholds are inputs, as in the architecture drawing, and are expected
// to satisfy th1 < th2 < th3. The bit assignment is this design's own choice.
// Purely combinational.
module threshold_comp
  import ecg_pkg::*;
(
  input  mag_t      mean,
  input  mag_t      th1,
  input  mag_t      th2,
  input  mag_t      th3,
  output logic      c0,
  output logic      c1,
  output div_code_e code
);

  always_comb begin
    if      (mean < th1) code = DIV_8;
    else if (mean < th2) code = DIV_16;
    else if (mean < th3) code = DIV_32;
    else                 code = DIV_NONE;
  end

  assign c0 = code[0];
  assign c1 = code[1];

endmodule
