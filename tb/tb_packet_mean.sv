// tb_packet_mean: feeds random |D| values with random gaps and checks that
// mean_valid pulses once per 8 accepted values, in the cycle after the 8th,
// with mean = floor(sum / 8); also checks that clr drops a partial packet.
module tb_packet_mean;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, mean_valid;
  mag_t mag = '0, mean;
  acc_t acc;

  packet_mean dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sum = 0, n = 0, packets = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit last;
      int exp_mean;
      @(negedge clk);
      clr = (i % 997 == 500);
      en  = !clr && ($urandom_range(0, 3) != 0);
      mag = mag_t'((i % 200 < 8) ? 2047 : $urandom_range(0, 300));
      last = en && (n == 7);
      exp_mean = (sum + int'(mag)) / 8;
      if (clr) begin sum = 0; n = 0; end
      else if (en) begin
        sum += int'(mag);
        n++;
        if (n == 8) begin sum = 0; n = 0; end
      end
      @(negedge clk);
      check(mean_valid == last, "mean_valid once per 8 values, one cycle after the 8th");
      if (last) begin
        check(int'(mean) == exp_mean, $sformatf("mean %0d expected %0d", mean, exp_mean));
        packets++;
      end
      en = 0;
    end
    check(packets > 100, "enough packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
