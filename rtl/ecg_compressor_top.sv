// ecg_compressor_top: multi-level lossless ECG compressor.
//
// Chain, one stage per level:
//   sample in -> ping-pong buffer 1 (11x8) -> packet_processor (derivative,
//   mean of |D| per 8-sample packet, threshold compare, divide by 8/16/32)
//   -> ping-pong buffer 2 (Q,R,code x8) -> rle_golomb_packager (Golomb-Rice
//   codewords with run-length coding, one bit per cycle) -> bitmask_dict
//   (dictionary/bitmask coding of 8-bit words, or bypass when dic_en = 0)
//   -> compressed serial bitstream.
// Samples are written with sample_valid; sample_ready is low only when both
// banks of buffer 1 are full, and a sample offered then is lost and flagged on
// overflow. The output is a valid/ready bit stream. Thresholds th1 < th2 < th3
// are inputs. The stage order and sizes follow the design; the handshakes and
// the bit formats are this design's own (see the stage modules).
module ecg_compressor_top
  import ecg_pkg::*;
#(
  parameter int unsigned DICT_W = 8,
  parameter int unsigned NDICT  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  sample_t                  sample,
  input  logic                     sample_valid,
  output logic                     sample_ready,
  output logic                     overflow,
  input  mag_t                     th1,
  input  mag_t                     th2,
  input  mag_t                     th3,
  input  logic                     dic_en,
  input  logic                     flush,
  input  logic                     dict_we,
  input  logic [$clog2(NDICT)-1:0] dict_addr,
  input  logic [DICT_W-1:0]        dict_data,
  output logic                     out_bit,
  output logic                     out_valid,
  input  logic                     out_ready,
  // observation
  output div_code_e                code,
  output mag_t                     mean,
  output logic                     stall,
  output logic                     pp1_bank,
  output logic                     pp2_bank,
  output logic                     run_evt,
  output logic                     esc_evt,
  output logic                     hit_evt,
  output logic                     mask_evt,
  output logic                     miss_evt,
  output logic                     dic_mode
);

  // buffer 1 <-> processor
  logic              p1_valid, p1_done;
  logic [PKT_LG-1:0] p1_addr;
  sample_t           p1_data;
  // processor <-> buffer 2
  logic              p2_wen, p2_wready, p2_ovf;
  qr_t               p2_wdata;
  // buffer 2 <-> packager
  logic              p2_valid, p2_done;
  logic [PKT_LG-1:0] p2_addr;
  qr_t               p2_data;
  // packager <-> dictionary
  logic              g_bit, g_valid, g_ready;

  pingpong_buffer #(.WIDTH(SAMPLE_W), .DEPTH(PKT)) u_pp1 (
    .clk, .rst_n,
    .wr_en(sample_valid), .wr_data(sample), .wr_ready(sample_ready), .overflow,
    .rd_valid(p1_valid), .rd_addr(p1_addr), .rd_data(p1_data), .rd_done(p1_done),
    .rd_bank(pp1_bank)
  );

  packet_processor u_proc (
    .clk, .rst_n, .th1, .th2, .th3,
    .in_valid(p1_valid), .in_addr(p1_addr), .in_data(p1_data), .in_done(p1_done),
    .out_en(p2_wen), .out_data(p2_wdata), .out_ready(p2_wready),
    .code, .mean, .stall
  );

  pingpong_buffer #(.WIDTH($bits(qr_t)), .DEPTH(PKT)) u_pp2 (
    .clk, .rst_n,
    .wr_en(p2_wen), .wr_data(p2_wdata), .wr_ready(p2_wready), .overflow(p2_ovf),
    .rd_valid(p2_valid), .rd_addr(p2_addr), .rd_data(p2_data), .rd_done(p2_done),
    .rd_bank(pp2_bank)
  );

  rle_golomb_packager u_pack (
    .clk, .rst_n,
    .in_valid(p2_valid), .in_addr(p2_addr), .in_data(p2_data), .in_done(p2_done),
    .bit_out(g_bit), .bit_valid(g_valid), .bit_ready(g_ready),
    .run_evt, .esc_evt
  );

  bitmask_dict #(.W(DICT_W), .NDICT(NDICT)) u_dict (
    .clk, .rst_n, .dic_en, .flush, .dict_we, .dict_addr, .dict_data,
    .in_bit(g_bit), .in_valid(g_valid), .in_ready(g_ready),
    .out_bit, .out_valid, .out_ready,
    .hit_evt, .mask_evt, .miss_evt, .dic_mode
  );

  // The processor only writes buffer 2 when it has room.
  assert property (@(posedge clk) disable iff (!rst_n) !p2_ovf);

endmodule
