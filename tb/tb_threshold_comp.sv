// tb_threshold_comp: checks the divisor code for random thresholds and means,
// including the values right at each threshold.
module tb_threshold_comp;
  import ecg_pkg::*;

  mag_t mean, th1, th2, th3;
  logic c0, c1;
  div_code_e code;

  threshold_comp dut (.*);

  int checks = 0, failures = 0;
  int seen[4];

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int t1, t2, t3, m, e;
      t1 = $urandom_range(1, 200);
      t2 = t1 + $urandom_range(1, 200);
      t3 = t2 + $urandom_range(1, 200);
      case (i % 8)
        0: m = t1 - 1;
        1: m = t1;
        2: m = t2;
        3: m = t3;
        default: m = $urandom_range(0, 700);
      endcase
      th1 = mag_t'(t1); th2 = mag_t'(t2); th3 = mag_t'(t3); mean = mag_t'(m);
      #1;
      e = (m < t1) ? 1 : (m < t2) ? 2 : (m < t3) ? 3 : 0;
      seen[e]++;
      checks++;
      if (int'({c1, c0}) != e || int'(code) != e) begin
        failures++;
        $display("FAIL: M=%0d th=%0d/%0d/%0d gave %b expected %0d", m, t1, t2, t3, {c1, c0}, e);
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) failures++;
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
