// tb_ecg_compressor_top: end-to-end test of the whole compressor.
//
// A synthetic ECG is pushed in (held while sample_ready is low) and the serial
// output is collected while out_ready is randomly withheld, with long pauses
// that fill both ping-pong buffers. Two runs, with a reset in between:
//   run A, dic_en = 0: the output must equal the reference level-1 stream;
//   run B, dic_en = 1, dictionary loaded with the four most frequent 8-bit
//   words of the level-1 stream: the output must equal the reference level-2
//   stream, and decoding both levels must give back every sample.
// Each mechanism (bank swaps, all four divisor codes, processor stall, runs,
// escapes, exact/bitmask/no dictionary match, bypass and mode switch, output
// back-pressure) is counted and must occur at least once.
module tb_ecg_compressor_top;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int NSAMP = 720;          // 2 s at 360 Hz, 90 packets
  localparam int TH1 = 2, TH2 = 5, TH3 = 100;

  logic clk = 0, rst_n = 0;
  sample_t sample = '0;
  logic sample_valid = 0, sample_ready, overflow;
  logic dic_en = 0, flush = 0, dict_we = 0;
  logic [1:0] dict_addr = '0;
  logic [7:0] dict_data = '0;
  logic out_bit, out_valid, out_ready = 0;
  div_code_e code;
  mag_t mean;
  logic stall, pp1_bank, pp2_bank, run_evt, esc_evt, hit_evt, mask_evt, miss_evt, dic_mode;

  ecg_compressor_top dut (
    .clk, .rst_n, .sample, .sample_valid, .sample_ready, .overflow,
    .th1(mag_t'(TH1)), .th2(mag_t'(TH2)), .th3(mag_t'(TH3)),
    .dic_en, .flush, .dict_we, .dict_addr, .dict_data,
    .out_bit, .out_valid, .out_ready,
    .code, .mean, .stall, .pp1_bank, .pp2_bank,
    .run_evt, .esc_evt, .hit_evt, .mask_evt, .miss_evt, .dic_mode
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  bitq_t got;
  bit pause = 0;

  // mechanism counters
  int n_pp1_swap, n_pp2_swap, n_code[4], n_stall, n_run, n_esc, n_hit, n_mask, n_miss;
  int n_bypass_bits, n_dict_bits, n_mode_sw, n_backpressure, n_overflow;
  logic pp1_q, pp2_q, mode_q, in_cmp;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (pp1_bank != pp1_q) n_pp1_swap++;
      if (pp2_bank != pp2_q) n_pp2_swap++;
      if (dic_mode != mode_q) n_mode_sw++;
      if (stall) n_stall++;
      if (run_evt) n_run++;
      if (esc_evt) n_esc++;
      if (hit_evt) n_hit++;
      if (mask_evt) n_mask++;
      if (miss_evt) n_miss++;
      if (overflow) n_overflow++;
      if (out_valid && !out_ready) n_backpressure++;
      if (out_valid && out_ready) begin
        got.push_back(out_bit);
        if (dic_mode) n_dict_bits++; else n_bypass_bits++;
      end
      if (dut.u_proc.state == dut.u_proc.S_CMP) in_cmp <= 1'b1;
      else if (in_cmp) begin
        n_code[int'(code)]++;
        in_cmp <= 1'b0;
      end
    end
    pp1_q  <= pp1_bank;
    pp2_q  <= pp2_bank;
    mode_q <= dic_mode;
  end

  // output back-pressure: random, plus long pauses
  always @(negedge clk) begin
    out_ready <= !pause && ($urandom_range(0, 3) != 0);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic push_samples(intq_t x);
    foreach (x[i]) begin
      while (!sample_ready) @(posedge clk);
      sample       <= sample_t'(x[i]);
      sample_valid <= 1'b1;
      @(posedge clk);
      sample_valid <= 1'b0;
      if (i % 160 == 100) begin           // pause the output for a while
        pause = 1;
        repeat (400) @(posedge clk);
        pause = 0;
      end
      repeat (6) @(posedge clk);
    end
  endtask

  task automatic drain();
    int idle = 0;
    while (idle < 300) begin
      @(posedge clk);
      idle = out_valid ? 0 : idle + 1;
    end
  endtask

  task automatic do_reset();
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
  endtask

  function automatic bit same_bits(bitq_t a, bitq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin
    intq_t x, codes, back;
    bitq_t l1, l1pad, l2, dec1;
    int runs, escs, hits, masks, misses;
    bit [7:0] dict[4];
    int freq[256];

    x  = synth_ecg(NSAMP, 7);
    l1 = golomb_encode(x, TH1, TH2, TH3, codes, runs, escs);
    $display("reference: %0d samples -> %0d level-1 bits (CR %0.2f), %0d runs, %0d escapes",
             NSAMP, l1.size(), real'(NSAMP * 11) / real'(l1.size()), runs, escs);

    // ---- run A: bypass ----
    do_reset();
    push_samples(x);
    drain();
    check(same_bits(got, l1), $sformatf("run A stream: got %0d bits, expected %0d", got.size(), l1.size()));
    check(n_run == runs, $sformatf("run A runs %0d vs %0d", n_run, runs));
    check(n_esc == escs, $sformatf("run A escapes %0d vs %0d", n_esc, escs));
    back = golomb_decode(got, NSAMP / 8);
    check(back == x, "run A decodes to the input");

    // ---- dictionary selection: four most frequent words of level 1 ----
    l1pad = l1;
    while (l1pad.size() % 8 != 0) l1pad.push_back(1'b0);
    foreach (freq[i]) freq[i] = 0;
    for (int w = 0; w < l1pad.size(); w += 8) begin
      int v = 0;
      for (int i = 0; i < 8; i++) v = (v << 1) | int'(l1pad[w + i]);
      freq[v]++;
    end
    for (int e = 0; e < 4; e++) begin
      int best = 0;
      for (int v = 0; v < 256; v++) if (freq[v] > freq[best]) best = v;
      dict[e] = 8'(best);
      freq[best] = -1;
    end
    l2 = dict_encode(l1pad, dict, hits, masks, misses);
    $display("reference: level-2 %0d bits (CR %0.2f), %0d hits %0d bitmask %0d misses",
             l2.size(), real'(NSAMP * 11) / real'(l2.size()), hits, masks, misses);

    // ---- run B: dictionary on ----
    do_reset();
    got = {};
    n_hit = 0; n_mask = 0; n_miss = 0;
    for (int e = 0; e < 4; e++) begin
      dict_we   <= 1'b1;
      dict_addr <= 2'(e);
      dict_data <= dict[e];
      @(posedge clk);
    end
    dict_we <= 1'b0;
    dic_en  <= 1'b1;
    repeat (2) @(posedge clk);
    push_samples(x);
    drain();
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    drain();
    check(same_bits(got, l2), $sformatf("run B stream: got %0d bits, expected %0d", got.size(), l2.size()));
    check(n_hit == hits && n_mask == masks && n_miss == misses,
          $sformatf("run B matches %0d/%0d/%0d vs %0d/%0d/%0d", n_hit, n_mask, n_miss, hits, masks, misses));
    dec1 = dict_decode(got, dict);
    back = golomb_decode(dec1, NSAMP / 8);
    check(back == x, "run B decodes to the input");
    dic_en <= 1'b0;
    drain();

    // ---- every mechanism happened ----
    $display("pp1 swaps %0d, pp2 swaps %0d, codes 00:%0d 01:%0d 10:%0d 11:%0d, stall cycles %0d",
             n_pp1_swap, n_pp2_swap, n_code[0], n_code[1], n_code[2], n_code[3], n_stall);
    $display("runs %0d, escapes %0d, hits %0d, bitmask %0d, misses %0d, bypass bits %0d, dict bits %0d, mode switches %0d, backpressure %0d",
             n_run, n_esc, n_hit, n_mask, n_miss, n_bypass_bits, n_dict_bits, n_mode_sw, n_backpressure);
    check(n_pp1_swap > 0, "buffer 1 bank swap");
    check(n_pp2_swap > 0, "buffer 2 bank swap");
    for (int c = 0; c < 4; c++) check(n_code[c] > 0, $sformatf("divisor code %0d used", c));
    check(n_stall > 0, "processor stall on full buffer 2");
    check(n_run > 0, "run-length mark");
    check(n_esc > 0, "escape codeword");
    check(n_hit > 0, "dictionary exact match");
    check(n_mask > 0, "dictionary bitmask match");
    check(n_miss > 0, "dictionary miss");
    check(n_bypass_bits > 0, "dictionary bypass");
    check(n_mode_sw >= 2, "dictionary mode switch");
    check(n_backpressure > 0, "output back-pressure");
    check(n_overflow == 0, "no sample lost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
