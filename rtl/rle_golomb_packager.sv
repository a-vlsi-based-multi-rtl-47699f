// rle_golomb_packager: packs packets of (Q,R) into one serial bitstream.
//
// Reads each full bank of ping-pong buffer 2 (8 entries, all with the same
// divisor code) and sends, MSB first, one bit per accepted cycle
// (bit_valid && bit_ready):
//   header   2 bits: the divisor code {C1,C0}, which tells a decoder k;
//   then for every maximal run of L equal symbols (Q,R) in the packet:
//     L = 1:  CW
//     L >= 2: CW CW n   with n = L-2 in RUN_W = 3 bits
// A symbol repeated once marks a run, the run-length form in which the
// repeated character itself is the escape ("WW12"). Runs stop at the packet
// end because the next packet may use another k.
// CW is the Golomb-Rice codeword of the symbol: u = zigzag(Q) ones, a 0, then
// R in k bits. If u >= ULIM (16) the codeword is instead ULIM ones followed by
// D = Q*2^k + R as 12-bit two's complement (escape), which bounds a codeword to
// 28 bits when k = 0. Zigzag mapping, the escape and the field widths are this
// design's choices; the design names Golomb-Rice coding, run-length encoding
// and packaging but does not fix a bit format.
//
// Timing: 1 cycle to start a packet, then one bit per accepted cycle, plus one
// cycle per entry scanned and one per run; bit_ready low holds the stream.
module rle_golomb_packager
  import ecg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ping-pong buffer 2, read side
  input  logic              in_valid,
  output logic [PKT_LG-1:0] in_addr,
  input  qr_t               in_data,
  output logic              in_done,
  // serial compressed bitstream
  output logic              bit_out,
  output logic              bit_valid,
  input  logic              bit_ready,
  // observation: one-cycle pulses when a run / an escape codeword is emitted
  output logic              run_evt,
  output logic              esc_evt
);

  localparam int unsigned EMIT_W = 2 * CW_MAX + RUN_W;   // 59
  localparam int unsigned LEN_W  = $clog2(EMIT_W + 1);

  typedef enum logic [2:0] {P_IDLE, P_HDR, P_SCAN, P_EMIT, P_DONE} pstate_e;

  pstate_e           state;
  logic [PKT_LG:0]   idx;        // 0..PKT
  qr_t               cur;
  logic [PKT_LG:0]   run;        // 1..PKT
  logic              last;
  logic [EMIT_W-1:0] sh;         // right-aligned bits still to send
  logic [LEN_W-1:0]  rem;        // how many

  // Golomb-Rice codeword of the current symbol, right-aligned.
  logic [CW_MAX-1:0]   cw_val;
  logic [LEN_W-1:0]    cw_len;
  logic                cw_esc;
  logic [2:0]          k;
  logic [D_W-1:0]      u;
  logic signed [D_W-1:0] dval;

  always_comb begin
    k      = code_to_k(cur.code);
    u      = zigzag(cur.q);
    dval   = (cur.q <<< k) | D_W'(cur.r);
    cw_esc = (u >= D_W'(ULIM));
    if (cw_esc) begin
      cw_val = (((CW_MAX)'(1) << ULIM) - 1'b1) << D_W | CW_MAX'(D_W'(dval));
      cw_len = LEN_W'(CW_MAX);
    end else begin
      cw_val = ((((CW_MAX)'(1) << u) - 1'b1) << (k + 3'd1)) |
               (CW_MAX'(cur.r) & (((CW_MAX)'(1) << k) - 1'b1));
      cw_len = LEN_W'(u) + LEN_W'(k) + 1'b1;
    end
  end

  // Emission of the run just ended.
  logic [EMIT_W-1:0] run_val;
  logic [LEN_W-1:0]  run_len;
  always_comb begin
    if (run == 1) begin
      run_val = EMIT_W'(cw_val);
      run_len = cw_len;
    end else begin
      run_val = (EMIT_W'(cw_val) << (cw_len + LEN_W'(RUN_W))) |
                (EMIT_W'(cw_val) << RUN_W) | EMIT_W'(run - 2);
      run_len = (cw_len << 1) + LEN_W'(RUN_W);
    end
  end

  logic same, at_end, fire;
  assign at_end    = (idx == (PKT_LG+1)'(PKT));
  assign same      = (in_data.q == cur.q) && (in_data.r == cur.r);
  assign in_addr   = idx[PKT_LG-1:0];
  assign in_done   = (state == P_DONE);
  assign bit_valid = (state == P_HDR) || (state == P_EMIT);
  assign bit_out   = sh[rem - 1'b1];
  assign fire      = bit_valid && bit_ready;
  assign run_evt   = (state == P_SCAN) && (at_end || !same) && (run > 1);
  assign esc_evt   = (state == P_SCAN) && (at_end || !same) && cw_esc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      idx   <= '0;
      cur   <= '0;
      run   <= '0;
      last  <= 1'b0;
      sh    <= '0;
      rem   <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (in_valid) begin
          // in_addr is 0 here: entry 0 opens the first run
          cur   <= in_data;
          run   <= 1;
          idx   <= 1;
          sh    <= EMIT_W'(in_data.code);
          rem   <= LEN_W'(2);
          state <= P_HDR;
        end
        P_HDR: if (fire) begin
          rem <= rem - 1'b1;
          if (rem == 1) state <= P_SCAN;
        end
        P_SCAN: begin
          if (!at_end && same) begin
            run <= run + 1'b1;
            idx <= idx + 1'b1;
          end else begin
            sh    <= run_val;
            rem   <= run_len;
            last  <= at_end;
            state <= P_EMIT;
          end
        end
        P_EMIT: if (fire) begin
          rem <= rem - 1'b1;
          if (rem == 1) begin
            if (last) begin
              state <= P_DONE;
            end else begin
              cur   <= in_data;
              run   <= 1;
              idx   <= idx + 1'b1;
              state <= P_SCAN;
            end
          end
        end
        P_DONE: begin
          idx   <= '0;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == P_EMIT) |-> (rem != 0));

endmodule
