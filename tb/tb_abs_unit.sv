// tb_abs_unit: checks |D| for every D from -2047 to 2047.
module tb_abs_unit;
  import ecg_pkg::*;

  diff_t d;
  mag_t  mag;

  abs_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int v = -2047; v <= 2047; v++) begin
      d = diff_t'(v);
      #1;
      checks++;
      if (int'(mag) != ((v < 0) ? -v : v)) begin
        failures++;
        $display("FAIL: |%0d| gave %0d", v, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
