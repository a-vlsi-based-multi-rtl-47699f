// packet_mean: mean of |D(n)| over one packet (ACC, TC, Reg 1, Shifter 1).
//
// Each cycle with en high adds mag into the accumulator ACC, whose feedback
// register is Reg 1. The terminal counter TC counts the additions; on the
// PKT-th one the complete sum is shifted right by log2(PKT) (Shifter 1) into
// the mean register, mean_valid pulses for one cycle in the cycle after, and
// ACC restarts from zero for the next packet. clr restarts a partial packet.
//
// Structure and the shift-by-3 mean follow the design; the clear input and
// the registered mean output are this design's choices.
module packet_mean
  import ecg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  en,
  input  mag_t  mag,
  output mag_t  mean,
  output logic  mean_valid,
  output acc_t  acc          // Reg 1 contents, for observation
);

  logic [PKT_LG-1:0] tc;
  acc_t              sum;

  assign sum = acc + acc_t'(mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      tc         <= '0;
      mean       <= '0;
      mean_valid <= 1'b0;
    end else begin
      mean_valid <= 1'b0;
      if (clr) begin
        acc <= '0;
        tc  <= '0;
      end else if (en) begin
        if (tc == PKT_LG'(PKT - 1)) begin
          mean       <= mag_t'(sum >> PKT_LG);
          mean_valid <= 1'b1;
          acc        <= '0;
          tc         <= '0;
        end else begin
          acc <= sum;
          tc  <= tc + 1'b1;
        end
      end
    end
  end

endmodule
