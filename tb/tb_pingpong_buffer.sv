// tb_pingpong_buffer: self-checking test of the two-bank packet buffer.
//
// Writes packets of 8 random words at random times while a reader with random
// delays reads each full bank twice in random order and then frees it. Checks
// every word read against a queue of expected packets, that wr_ready drops
// exactly when both banks are full, that a write then raises overflow and is
// lost, and that the bank being read alternates.
module tb_pingpong_buffer;

  localparam int W = 11, D = 8;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_ready, overflow, rd_valid, rd_done = 0, rd_bank;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0] rd_addr = '0;

  pingpong_buffer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] expq[$];         // words written, in order
  int n_written = 0, n_full = 0, n_ovf = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer
  initial begin : writer
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 8 * 40; ) begin
      logic [W-1:0] v = W'($urandom);
      bit full_now;
      @(negedge clk);
      full_now = !wr_ready;
      wr_en   = ($urandom_range(0, 2) != 0);
      wr_data = v;
      @(posedge clk);
      #1;
      if (wr_en) begin
        if (full_now) begin
          check(overflow, "overflow after write to full buffer");
          n_ovf++;
        end else begin
          expq.push_back(v);
          i++;
        end
      end
      wr_en = 0;
    end
  end

  // reader
  initial begin : reader
    int pkt = 0;
    logic last_bank;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pkt < 40) begin
      @(negedge clk);
      if (rd_valid && $urandom_range(0, 5) == 0) begin
        logic [W-1:0] exp [D];
        if (pkt > 0) check(rd_bank != last_bank, "banks alternate");
        last_bank = rd_bank;
        for (int i = 0; i < D; i++) exp[i] = expq.pop_front();
        for (int pass = 0; pass < 2; pass++)
          for (int i = 0; i < D; i++) begin
            int a = (pass == 0) ? i : D - 1 - i;
            rd_addr = 3'(a);
            #1;
            check(rd_data == exp[a], $sformatf("pkt %0d word %0d: %h vs %h", pkt, a, rd_data, exp[a]));
            @(negedge clk);
          end
        // both banks full?  writer must see wr_ready low
        if (expq.size() >= D) begin
          check(!wr_ready, "wr_ready low with both banks full");
          n_full++;
        end
        repeat ($urandom_range(0, 30)) @(negedge clk);
        rd_done = 1;
        @(negedge clk);
        rd_done = 0;
        pkt++;
      end
    end
    $display("full-buffer waits %0d, overflows %0d", n_full, n_ovf);
    check(n_full > 0, "both banks were full at least once");
    check(n_ovf > 0, "an overflow occurred");
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
