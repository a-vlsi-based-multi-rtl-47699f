// packet_processor: derivative, packet mean, divisor choice and division.
//
// Reads each full packet of 8 samples from ping-pong buffer 1 twice:
//   pass 1 (MEAN): D(n) = x(n) - x(n-1) via SR1/Sub, |D| via Abs, summed by
//                  ACC under TC; Shifter 1 gives the packet mean M;
//   compare (CMP): Comp turns M and th1..th3 into the code {C1,C0};
//   pass 2 (DIV):  D(n) is formed again and split by the conditional shifter
//                  into Q and R, which go with the code into ping-pong buffer 2.
// The packet is then released (DONE). Two passes are needed because the
// divisor of a packet depends on the mean of that same packet; the design
// buffers packets for this but does not give the sequencing, which is this
// design's own. SR1 is reloaded before each pass with the last sample of the
// previous packet, so D is continuous across packets (0 before the first).
//
// Timing: IDLE 1 + MEAN 8 + CMP 1 + DIV 8 + DONE 1 = 19 cycles per packet when
// buffer 2 has room; DIV waits (stall) while buffer 2 has no free bank.
module packet_processor
  import ecg_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  mag_t                th1,
  input  mag_t                th2,
  input  mag_t                th3,
  // ping-pong buffer 1, read side
  input  logic                in_valid,
  output logic [PKT_LG-1:0]   in_addr,
  input  sample_t             in_data,
  output logic                in_done,
  // ping-pong buffer 2, write side
  output logic                out_en,
  output qr_t                 out_data,
  input  logic                out_ready,
  // observation
  output div_code_e           code,
  output mag_t                mean,
  output logic                stall
);

  typedef enum logic [2:0] {S_IDLE, S_MEAN, S_CMP, S_DIV, S_DONE} state_e;

  state_e            state;
  logic [PKT_LG-1:0] idx;
  sample_t           prev_last;   // last sample of the previous packet
  div_code_e         code_cmp;

  sample_t           sr1;
  diff_t             d;
  mag_t              mag;
  logic              mean_valid;
  acc_t              acc;
  logic signed [D_W-1:0] q;
  logic [R_W-1:0]    r;
  logic [2:0]        k;
  logic [R_W:0]      divisor;
  logic              c0, c1;

  logic shift_en, load_en, mean_en, div_go;

  assign div_go   = (state == S_DIV) && out_ready;
  assign shift_en = (state == S_MEAN) || div_go;
  assign load_en  = (state == S_IDLE) || (state == S_CMP);
  assign mean_en  = (state == S_MEAN);

  assign in_addr  = idx;
  assign in_done  = (state == S_DONE);
  assign out_en   = div_go;
  assign out_data = '{code: code, q: q, r: r};
  assign stall    = (state == S_DIV) && !out_ready;

  sample_diff u_diff (
    .clk, .rst_n, .x(in_data), .shift_en, .load_en, .load_val(prev_last),
    .sr1, .d
  );

  abs_unit u_abs (.d, .mag);

  packet_mean u_mean (
    .clk, .rst_n, .clr(1'b0), .en(mean_en), .mag, .mean, .mean_valid, .acc
  );

  threshold_comp u_comp (.mean, .th1, .th2, .th3, .c0, .c1, .code(code_cmp));

  cond_shifter u_cshift (.d, .code, .q, .r, .k, .divisor);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      prev_last <= '0;
      code      <= DIV_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          state <= S_MEAN;
          idx   <= '0;
        end
        S_MEAN: begin
          idx <= idx + 1'b1;
          if (idx == PKT_LG'(PKT - 1)) state <= S_CMP;
        end
        S_CMP: begin
          code  <= div_code_e'({c1, c0});   // Comp's control lines
          state <= S_DIV;
        end
        S_DIV: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == PKT_LG'(PKT - 1)) begin
            prev_last <= in_data;
            state     <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The mean is ready exactly when the comparison is made.
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_CMP) |-> mean_valid);

endmodule
