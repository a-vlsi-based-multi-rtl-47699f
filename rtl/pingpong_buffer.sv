// pingpong_buffer: two-bank packet buffer (ping-pong).
//
// Two banks of DEPTH words of WIDTH bits. The writer fills one bank word by
// word (wr_en); when the DEPTH-th word is written that bank becomes "full" and
// the writer moves to the other bank. The reader sees the oldest full bank:
// rd_valid says one is there, rd_addr selects a word and rd_data returns it in
// the same cycle (register file, combinational read). The reader may read the
// bank any number of times and in any order; a one-cycle rd_done pulse frees
// it, and the reader moves on to the other bank.
//
// wr_ready is low while the bank to be written is still full (both banks full).
// A write attempted then is dropped and flagged by a one-cycle overflow pulse,
// because a sampling ADC cannot be held off.
//
// The design specifies two such buffers of 11x8 with write and read enables;
// the full/free handshake, the random-access read and the overflow flag are
// this design's own choices. Reset empties both banks; contents are not reset.
module pingpong_buffer #(
  parameter int unsigned WIDTH = 11,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write side
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_ready,
  output logic                     overflow,
  // read side
  output logic                     rd_valid,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     rd_done,
  output logic                     rd_bank    // bank being read, for observation
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [2][DEPTH];
  logic [1:0]       full;
  logic             wbank, rbank;
  logic [AW-1:0]    waddr;

  assign wr_ready = !full[wbank];
  assign rd_valid = full[rbank];
  assign rd_data  = mem[rbank][rd_addr];
  assign rd_bank  = rbank;

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) mem[wbank][waddr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      wbank    <= 1'b0;
      rbank    <= 1'b0;
      waddr    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && !wr_ready;
      if (wr_en && wr_ready) begin
        if (waddr == AW'(DEPTH - 1)) begin
          waddr       <= '0;
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
      if (rd_done && full[rbank]) begin
        full[rbank] <= 1'b0;
        rbank       <= ~rbank;
      end
    end
  end

  // A release is only meaningful while a bank is held.
  assert property (@(posedge clk) disable iff (!rst_n) rd_done |-> rd_valid);

endmodule
