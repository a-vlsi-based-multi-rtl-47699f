// ecg_pkg: widths, types and codeword helpers shared by the ECG compressor.
//
// Samples are 11-bit unsigned ADC codes, as the design specifies. The first
// derivative D(n) = x(n) - x(n-1) therefore needs 12 bits signed. A packet is
// 8 samples, so the packet mean is the 14-bit sum of |D(n)| shifted right by 3.
//
// The divisor code {C1,C0} picks the Golomb-Rice parameter k: the three codes
// 01/10/11 select divisors 8/16/32 (k = 3/4/5), following the order of the
// three threshold tests. Code 00 means "no shift" (k = 0), used when the mean
// reaches the top threshold. Which code stands for which divisor is this
// design's own choice; the design only fixes that 00 means no shift.
//
// The Golomb-Rice codeword, the escape for long quotients and the run-length
// field are this design's own format (see rle_golomb_packager).
package ecg_pkg;

  localparam int unsigned SAMPLE_W = 11;            // bits per ECG sample
  localparam int unsigned D_W      = SAMPLE_W + 1;  // signed derivative
  localparam int unsigned PKT      = 8;             // samples per packet
  localparam int unsigned PKT_LG   = $clog2(PKT);
  localparam int unsigned ACC_W    = SAMPLE_W + PKT_LG; // sum of 8 |D|
  localparam int unsigned R_W      = 5;             // widest remainder (k = 5)
  localparam int unsigned ULIM     = 16;            // unary length that triggers escape
  localparam int unsigned RUN_W    = 3;             // run-length field, holds L-2 (0..6)

  typedef logic [SAMPLE_W-1:0]     sample_t;
  typedef logic signed [D_W-1:0]   diff_t;
  typedef logic [SAMPLE_W-1:0]     mag_t;    // |D| fits 11 bits: |x - y| <= 2047
  typedef logic [ACC_W-1:0]        acc_t;

  typedef enum logic [1:0] {
    DIV_NONE = 2'b00,   // k = 0, no shift
    DIV_8    = 2'b01,   // k = 3
    DIV_16   = 2'b10,   // k = 4
    DIV_32   = 2'b11    // k = 5
  } div_code_e;

  // One entry of ping-pong buffer 2: quotient, remainder and the packet's code.
  typedef struct packed {
    div_code_e          code;
    logic signed [D_W-1:0] q;
    logic [R_W-1:0]     r;
  } qr_t;


  // k for a divisor code.
  function automatic logic [2:0] code_to_k(div_code_e c);
    case (c)
      DIV_8:   return 3'd3;
      DIV_16:  return 3'd4;
      DIV_32:  return 3'd5;
      default: return 3'd0;
    endcase
  endfunction

  // Signed quotient to unsigned index: 0,-1,1,-2,2,... -> 0,1,2,3,4,...
  function automatic logic [D_W-1:0] zigzag(logic signed [D_W-1:0] q);
    return (D_W'(q) << 1) ^ {D_W{q[D_W-1]}};
  endfunction

  // Longest codeword: ULIM ones then the raw D (escape).
  localparam int unsigned CW_MAX = ULIM + D_W;

endpackage
