// tb_cond_shifter: for every D in -2047..2047 and every code, checks the
// divisor (1, 8, 16, 32), k, R = D mod divisor and Q = floor(D / divisor),
// so that Q * divisor + R == D.
module tb_cond_shifter;
  import ecg_pkg::*;

  diff_t d;
  div_code_e code;
  logic signed [D_W-1:0] q;
  logic [R_W-1:0] r;
  logic [2:0] k;
  logic [R_W:0] divisor;

  cond_shifter dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int c = 0; c < 4; c++)
      for (int v = -2047; v <= 2047; v++) begin
        int dv, eq, er;
        dv = (c == 0) ? 1 : (4 << c);          // 8, 16, 32
        eq = (v >= 0) ? v / dv : -((-v + dv - 1) / dv);
        er = v - eq * dv;
        d = diff_t'(v);
        code = div_code_e'(c);
        #1;
        checks++;
        if (int'(divisor) != dv || int'(q) != eq || int'(r) != er ||
            int'(k) != ((c == 0) ? 0 : c + 2)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: D=%0d code=%0d: div=%0d q=%0d r=%0d, expected %0d %0d %0d",
                     v, c, divisor, q, r, dv, eq, er);
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
