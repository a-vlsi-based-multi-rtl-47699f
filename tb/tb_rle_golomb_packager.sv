// tb_rle_golomb_packager: feeds packets of (Q,R,code) from a model of
// ping-pong buffer 2 and collects the serial output under random bit_ready.
// The whole stream must equal the reference level-1 encoding of the same
// samples, and the run and escape pulses must match the reference counts.
// The samples are a synthetic ECG plus packets built to give a run of 8, runs
// of escape codewords and runs at the packet end.
module tb_rle_golomb_packager;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int TH1 = 2, TH2 = 5, TH3 = 100;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_done, bit_out, bit_valid, bit_ready = 0, run_evt, esc_evt;
  logic [PKT_LG-1:0] in_addr;
  qr_t in_data;
  qr_t pkt [PKT];
  assign in_data = pkt[in_addr];

  rle_golomb_packager dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bitq_t got;
  int n_run = 0, n_esc = 0;
  always @(posedge clk) begin
    if (bit_valid && bit_ready) got.push_back(bit_out);
    if (run_evt) n_run++;
    if (esc_evt) n_esc++;
  end
  always @(negedge clk) bit_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    intq_t x, codes;
    bitq_t exp;
    int runs, escs, prev = 0;
    x = synth_ecg(480, 11);
    for (int i = 0; i < 8; i++) x.push_back(100 + 240 * i);   // D = 240 x 7: escape run
    for (int i = 0; i < 8; i++) x.push_back(2000);             // flat: run of zeros
    for (int i = 0; i < 8; i++) x.push_back(2000 - 3 * i);     // constant slope
    for (int i = 0; i < 8; i++) x.push_back((i < 6) ? 500 : 1500);
    x = {x, synth_ecg(240, 12)};
    exp = golomb_encode(x, TH1, TH2, TH3, codes, runs, escs);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < x.size() / 8; p++) begin
      automatic int k = code_k(codes[p]);
      for (int i = 0; i < PKT; i++) begin
        automatic int d = x[p * 8 + i] - prev;
        prev = x[p * 8 + i];
        pkt[i].code = div_code_e'(codes[p]);
        pkt[i].q    = D_W'(d >>> k);
        pkt[i].r    = R_W'(d - ((d >>> k) << k));
      end
      @(negedge clk);
      in_valid = 1;
      do @(negedge clk); while (!in_done);
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(got.size() == exp.size(), $sformatf("stream length %0d vs %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check(0, $sformatf("first difference at bit %0d", i));
        break;
      end
    check(got == exp, "stream equal to reference");
    check(n_run == runs && runs > 0, $sformatf("runs %0d vs %0d", n_run, runs));
    check(n_esc == escs && escs > 0, $sformatf("escapes %0d vs %0d", n_esc, escs));
    check(golomb_decode(got, x.size() / 8) == x, "stream decodes to the samples");
    $display("%0d samples, %0d bits, %0d runs, %0d escapes", x.size(), got.size(), n_run, n_esc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
