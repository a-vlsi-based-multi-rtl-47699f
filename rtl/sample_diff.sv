// sample_diff: first-order derivative D(n) = x(n) - x(n-1).
//
// SR1 is a one-word register holding the previous sample; the subtractor
// forms D(n) combinationally from the current input and SR1. On shift_en SR1
// takes the current input, so a stream of samples yields one D per cycle.
// load_en overwrites SR1 with load_val instead; the packet sequencer uses it to
// replay a packet a second time from the same starting sample. After reset
// SR1 holds 0, so the first D of a stream is the first sample itself and the
// stream stays losslessly recoverable.
//
// The register and subtractor are the design's; the load port and the reset
// value are this design's own choices.
module sample_diff
  import ecg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  input  logic    shift_en,
  input  logic    load_en,
  input  sample_t load_val,
  output sample_t sr1,      // previous sample
  output diff_t   d
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr1 <= '0;
    else if (load_en)  sr1 <= load_val;
    else if (shift_en) sr1 <= x;
  end

  assign d = diff_t'({1'b0, x}) - diff_t'({1'b0, sr1});

endmodule
