// bitmask_dict: second compression level, dictionary matching with bitmasks.
//
// The serial bitstream of the first level is cut into W-bit words (W = 8),
// first bit received = word MSB. Each word is compared with the NDICT = 4
// dictionary entries and replaced, MSB first, by
//   exact match with entry i:            0 0 i                 (2+2 = 4 bits)
//   match after flipping bits inside one  0 1 p m i             (2+2+2+2 = 8 bits)
//     aligned 2-bit field p with mask m:  word = entry[i] ^ (m << 2p)
//   no match:                             1 word                (1+8 = 9 bits)
// An exact match is preferred to a bitmask match, and the lowest index wins.
// The design calls for dictionary selection with bitmasks but gives no word,
// dictionary or mask size nor a code format; all of these are this design's.
// Choosing the entries (by how often words and their bitmask neighbours occur)
// is left to whoever loads the dictionary through dict_we/dict_addr/dict_data;
// after reset it holds DICT_INIT.
//
// dic_en = 0 bypasses the stage (in and out connected, ready passed back). The
// mode is sampled only between words, so a switch never splits a word. flush
// pads a partly received word with zeros and codes it.
//
// Timing: W accepted input cycles to take a word, 1 cycle to code it, then one
// output bit per accepted cycle; input is held off (in_ready low) meanwhile.
module bitmask_dict #(
  parameter int unsigned W     = 8,
  parameter int unsigned NDICT = 4,
  parameter logic [NDICT*W-1:0] DICT_INIT = {8'hFF, 8'h80, 8'h08, 8'h00}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dic_en,
  input  logic                     flush,
  // dictionary load port
  input  logic                     dict_we,
  input  logic [$clog2(NDICT)-1:0] dict_addr,
  input  logic [W-1:0]             dict_data,
  // serial input
  input  logic                     in_bit,
  input  logic                     in_valid,
  output logic                     in_ready,
  // serial output
  output logic                     out_bit,
  output logic                     out_valid,
  input  logic                     out_ready,
  // observation: one-cycle pulses per coded word, and the mode in force
  output logic                     hit_evt,
  output logic                     mask_evt,
  output logic                     miss_evt,
  output logic                     dic_mode
);

  localparam int unsigned IW    = $clog2(NDICT);
  localparam int unsigned NF    = W / 2;            // 2-bit fields per word
  localparam int unsigned PW    = $clog2(NF);
  localparam int unsigned CODE_W = 1 + W;           // longest code
  localparam int unsigned CW    = $clog2(W + 1);
  localparam int unsigned LW    = $clog2(CODE_W + 1);

  typedef enum logic [1:0] {D_COLLECT, D_ENCODE, D_EMIT} dstate_e;

  dstate_e           state;
  logic [W-1:0]      dict [NDICT];
  logic [W-1:0]      word;
  logic [CW-1:0]     cnt;
  logic [CODE_W-1:0] sh;
  logic [LW-1:0]     rem;
  logic              mode;

  assign dic_mode = mode;

  // ---- matching ----
  logic              hit, mhit;
  logic [IW-1:0]     hit_i, mhit_i;
  logic [PW-1:0]     mhit_p;
  logic [1:0]        mhit_m;
  logic [CODE_W-1:0] code_val;
  logic [LW-1:0]     code_len;

  always_comb begin
    hit    = 1'b0;
    hit_i  = '0;
    mhit   = 1'b0;
    mhit_i = '0;
    mhit_p = '0;
    mhit_m = '0;
    for (int i = NDICT - 1; i >= 0; i--) begin
      logic [W-1:0] x;
      x = word ^ dict[i];
      if (x == '0) begin
        hit   = 1'b1;
        hit_i = IW'(i);
      end
      for (int p = NF - 1; p >= 0; p--) begin
        if (x != '0 && (x & ~(W'(2'b11) << (2 * p))) == '0) begin
          mhit   = 1'b1;
          mhit_i = IW'(i);
          mhit_p = PW'(p);
          mhit_m = 2'(x >> (2 * p));
        end
      end
    end
    if (hit) begin
      code_val = CODE_W'({2'b00, hit_i});
      code_len = LW'(2 + IW);
    end else if (mhit) begin
      code_val = CODE_W'({2'b01, mhit_p, mhit_m, mhit_i});
      code_len = LW'(2 + PW + 2 + IW);
    end else begin
      code_val = CODE_W'({1'b1, word});
      code_len = LW'(1 + W);
    end
  end

  // ---- handshakes ----
  logic in_fire, out_fire, do_flush;
  assign in_ready  = mode ? (state == D_COLLECT) : out_ready;
  assign out_valid = mode ? (state == D_EMIT)    : in_valid;
  assign out_bit   = mode ? sh[rem - 1'b1]       : in_bit;
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;
  assign do_flush  = flush && (cnt != 0) && !in_valid;

  assign hit_evt  = mode && (state == D_ENCODE) && hit;
  assign mask_evt = mode && (state == D_ENCODE) && !hit && mhit;
  assign miss_evt = mode && (state == D_ENCODE) && !hit && !mhit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NDICT; i++) dict[i] <= DICT_INIT[i*W +: W];
    end else if (dict_we) begin
      dict[dict_addr] <= dict_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_COLLECT;
      word  <= '0;
      cnt   <= '0;
      sh    <= '0;
      rem   <= '0;
      mode  <= 1'b0;
    end else begin
      if (!mode) begin
        if (!in_valid) mode <= dic_en;     // bypass: switch between bits
      end else begin
        unique case (state)
          D_COLLECT: begin
            if (in_fire) begin
              word <= {word[W-2:0], in_bit};
              if (cnt == CW'(W - 1)) begin
                cnt   <= '0;
                state <= D_ENCODE;
              end else begin
                cnt <= cnt + 1'b1;
              end
            end else if (do_flush) begin
              word  <= word << (W - 32'(cnt));
              cnt   <= '0;
              state <= D_ENCODE;
            end else if (cnt == 0) begin
              mode <= dic_en;
            end
          end
          D_ENCODE: begin
            sh    <= code_val;
            rem   <= code_len;
            state <= D_EMIT;
          end
          D_EMIT: if (out_fire) begin
            rem <= rem - 1'b1;
            if (rem == 1) state <= D_COLLECT;
          end
          default: state <= D_COLLECT;
        endcase
      end
    end
  end

  // A word is taken whole: the mode never changes in the middle of one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (mode && cnt != 0) |=> mode);

endmodule
