// tb_sample_diff: checks D(n) = x(n) - x(n-1) over a random stream, including
// the zero start after reset, holding SR1 when not shifting and reloading SR1.
module tb_sample_diff;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0, shift_en = 0, load_en = 0;
  sample_t x = '0, load_val = '0, sr1;
  diff_t d;

  sample_diff dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int xi;
      @(negedge clk);
      xi = (i % 50 == 0) ? ((i % 100 == 0) ? 0 : 2047) : int'($urandom_range(0, 2047));
      x = sample_t'(xi);
      shift_en = ($urandom_range(0, 3) != 0);
      load_en  = ($urandom_range(0, 15) == 0);
      load_val = sample_t'($urandom_range(0, 2047));
      #1;
      check(int'(d) == xi - prev, $sformatf("D=%0d expected %0d", d, xi - prev));
      check(int'(sr1) == prev, "SR1 holds previous sample");
      if (load_en) prev = int'(load_val);
      else if (shift_en) prev = xi;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
