// tb_packet_processor: drives the processor from a model of ping-pong buffer 1
// (a packet array, in_valid, release on in_done) and takes its output in place
// of buffer 2, with out_ready randomly low. For each packet it checks the
// divisor code from the mean of |D|, every (Q,R) pair against floor division,
// the continuity of D across packets, and that a packet takes exactly 19
// cycles from in_valid to in_done when out_ready stays high.
module tb_packet_processor;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int TH1 = 2, TH2 = 5, TH3 = 100;
  localparam int NPKT = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_done, out_en, out_ready = 1, stall;
  logic [PKT_LG-1:0] in_addr;
  sample_t in_data;
  qr_t out_data;
  div_code_e code;
  mag_t mean;

  sample_t pkt [PKT];
  assign in_data = pkt[in_addr];

  packet_processor dut (
    .clk, .rst_n, .th1(mag_t'(TH1)), .th2(mag_t'(TH2)), .th3(mag_t'(TH3)),
    .in_valid, .in_addr, .in_data, .in_done,
    .out_en, .out_data, .out_ready, .code, .mean, .stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  qr_t got[$];
  always @(posedge clk) if (out_en && out_ready) got.push_back(out_data);

  int n_stall = 0, n_code[4];
  always @(posedge clk) if (stall) n_stall++;

  initial begin
    int prev = 0;
    intq_t x;
    x = synth_ecg(NPKT * 8, 3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      automatic int d[PKT];
      automatic int sum = 0;
      automatic int c, k, t0, t1;
      automatic bit slow = (p % 4 == 3);
      for (int i = 0; i < PKT; i++) begin
        pkt[i] = sample_t'(x[p * 8 + i]);
        d[i] = x[p * 8 + i] - ((i == 0) ? prev : x[p * 8 + i - 1]);
        sum += (d[i] < 0) ? -d[i] : d[i];
      end
      prev = x[p * 8 + 7];
      c = pick_code(sum / 8, TH1, TH2, TH3);
      n_code[c]++;
      k = code_k(c);
      got = {};
      @(negedge clk);
      in_valid = 1;
      t0 = $time;
      while (1) begin
        out_ready = slow ? ($urandom_range(0, 2) == 0) : 1'b1;
        @(negedge clk);
        if (in_done) break;
      end
      t1 = $time;
      @(negedge clk);                    // release: in_done seen at posedge
      in_valid = 0;
      out_ready = 1;
      if (!slow) check((t1 - t0) / 10 == 18, $sformatf("packet %0d took %0d cycles to in_done", p, (t1 - t0) / 10 + 1));
      check(int'(mean) == sum / 8, $sformatf("packet %0d mean %0d vs %0d", p, mean, sum / 8));
      check(got.size() == PKT, "8 entries per packet");
      for (int i = 0; i < PKT && i < got.size(); i++) begin
        automatic int eq = d[i] >>> k;
        automatic int er = d[i] - eq * (1 << k);
        check(int'(got[i].code) == c && int'(got[i].q) == eq && int'(got[i].r) == er,
              $sformatf("pkt %0d entry %0d: code %0d q %0d r %0d, expected %0d %0d %0d",
                        p, i, got[i].code, got[i].q, got[i].r, c, eq, er));
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("codes %0d/%0d/%0d/%0d, stall cycles %0d", n_code[0], n_code[1], n_code[2], n_code[3], n_stall);
    check(n_stall > 0, "stall happened");
    for (int c = 0; c < 4; c++) check(n_code[c] > 0, $sformatf("code %0d used", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
