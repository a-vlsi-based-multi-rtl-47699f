// tb_workload_1min: one minute of ECG (21,600 samples at 360 Hz) through the
// compressor at its default sizes, once per level: with the dictionary level
// bypassed, and with it on (dictionary = the four most frequent 8-bit words of
// the level-1 stream). Both outputs must equal the reference streams and
// decode back to every sample; the compression ratio 11*N / bits is printed.
// Samples are offered every 32 cycles; output is always accepted.
module tb_workload_1min;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int NSAMP = 21600;
  localparam int TH1 = 2, TH2 = 5, TH3 = 100;

  logic clk = 0, rst_n = 0;
  sample_t sample = '0;
  logic sample_valid = 0, sample_ready, overflow;
  logic dic_en = 0, flush = 0, dict_we = 0;
  logic [1:0] dict_addr = '0;
  logic [7:0] dict_data = '0;
  logic out_bit, out_valid, out_ready = 1;
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

  int checks = 0, failures = 0, n_overflow = 0;
  bit [7:0] dict[4];
  bitq_t got;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) got.push_back(out_bit);
    if (rst_n && overflow) n_overflow++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(intq_t x);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    if (dic_en)                       // reset restores the default dictionary
      for (int e = 0; e < 4; e++) begin
        dict_we <= 1'b1; dict_addr <= 2'(e); dict_data <= dict[e];
        @(posedge clk);
      end
    dict_we <= 1'b0;
    repeat (4) @(posedge clk);
    foreach (x[i]) begin
      sample       <= sample_t'(x[i]);
      sample_valid <= 1'b1;
      @(posedge clk);
      sample_valid <= 1'b0;
      repeat (31) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    repeat (100) @(posedge clk);
  endtask

  initial begin
    intq_t x, codes;
    bitq_t l1, l1pad, l2;
    int runs, escs, h, m, mi;
    int freq[256];
    x  = synth_ecg(NSAMP, 21);
    l1 = golomb_encode(x, TH1, TH2, TH3, codes, runs, escs);
    l1pad = l1;
    while (l1pad.size() % 8) l1pad.push_back(1'b0);
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
    l2 = dict_encode(l1pad, dict, h, m, mi);

    // level 1 only
    got = {};
    run(x);
    check(got == l1, $sformatf("level-1 stream: %0d bits vs %0d", got.size(), l1.size()));
    check(golomb_decode(got, NSAMP / 8) == x, "level-1 stream decodes to the input");
    $display("level 1: %0d bits, CR %0.3f", got.size(), real'(NSAMP * 11) / real'(got.size()));

    // both levels
    got = {};
    dic_en <= 1'b1;
    @(posedge clk);
    run(x);
    check(got == l2, $sformatf("level-2 stream: %0d bits vs %0d", got.size(), l2.size()));
    check(golomb_decode(dict_decode(got, dict), NSAMP / 8) == x, "level-2 stream decodes to the input");
    $display("level 2: %0d bits, CR %0.3f (hits %0d, bitmask %0d, misses %0d)",
             got.size(), real'(NSAMP * 11) / real'(got.size()), h, m, mi);
    check(n_overflow == 0, "no sample lost at one sample per 32 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
