// tb_bitmask_dict: checks the dictionary stage against the reference coder.
//   1. bypass (dic_en = 0): output bits equal input bits, ready passed back;
//   2. default dictionary: a random stream built from dictionary words, words
//      one 2-bit field away from them and random words, ending in a partial
//      word that flush pads with zeros;
//   3. dictionary reloaded through the load port, same checks;
// under random out_ready, and the coded stream must decode to the input.
module tb_bitmask_dict;
  import ecg_ref_pkg::*;

  logic clk = 0, rst_n = 0, dic_en = 0, flush = 0, dict_we = 0;
  logic [1:0] dict_addr = '0;
  logic [7:0] dict_data = '0;
  logic in_bit = 0, in_valid = 0, in_ready, out_bit, out_valid, out_ready = 0;
  logic hit_evt, mask_evt, miss_evt, dic_mode;

  bitmask_dict dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bitq_t got;
  int n_hit = 0, n_mask = 0, n_miss = 0;
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_bit);
    if (hit_evt) n_hit++;
    if (mask_evt) n_mask++;
    if (miss_evt) n_miss++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  function automatic bitq_t make_stream(bit [7:0] dict[4], int nwords, int tail);
    bitq_t q;
    for (int w = 0; w < nwords; w++) begin
      bit [7:0] v;
      case ($urandom_range(0, 2))
        0: v = dict[$urandom_range(0, 3)];
        1: v = dict[$urandom_range(0, 3)] ^ 8'($urandom_range(1, 3) << (2 * $urandom_range(0, 3)));
        default: v = 8'($urandom);
      endcase
      put(q, v, 8);
    end
    for (int i = 0; i < tail; i++) q.push_back(1'($urandom));
    return q;
  endfunction

  task automatic send(bitq_t q);
    foreach (q[i]) begin
      @(negedge clk);
      in_bit = q[i];
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  task automatic drain();
    repeat (40) @(posedge clk);
  endtask

  task automatic dict_run(bit [7:0] dict[4], string tag);
    bitq_t in, pad, exp;
    int h, m, x;
    in = make_stream(dict, 300, 5);
    pad = in;
    while (pad.size() % 8) pad.push_back(1'b0);
    exp = dict_encode(pad, dict, h, m, x);
    got = {};
    n_hit = 0; n_mask = 0; n_miss = 0;
    send(in);
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    drain();
    check(got == exp, $sformatf("%s: coded stream (%0d bits vs %0d)", tag, got.size(), exp.size()));
    check(n_hit == h && n_mask == m && n_miss == x && h > 0 && m > 0 && x > 0,
          $sformatf("%s: matches %0d/%0d/%0d vs %0d/%0d/%0d", tag, n_hit, n_mask, n_miss, h, m, x));
    check(dict_decode(got, dict) == pad, $sformatf("%s: decodes to input", tag));
  endtask

  initial begin
    bit [7:0] dict[4];
    bitq_t in;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. bypass
    in = make_stream('{8'h00, 8'h08, 8'h80, 8'hFF}, 40, 3);
    got = {};
    send(in);
    drain();
    check(got == in, "bypass passes the stream through");
    check(!dic_mode, "bypass mode");
    // 2. default dictionary
    dic_en = 1;
    drain();
    check(dic_mode, "dictionary mode entered");
    dict = '{8'h00, 8'h08, 8'h80, 8'hFF};
    dict_run(dict, "default dictionary");
    // 3. loaded dictionary
    dict = '{8'h3C, 8'hA5, 8'h1F, 8'h62};
    for (int e = 0; e < 4; e++) begin
      @(negedge clk);
      dict_we = 1; dict_addr = 2'(e); dict_data = dict[e];
    end
    @(negedge clk);
    dict_we = 0;
    dict_run(dict, "loaded dictionary");
    dic_en = 0;
    drain();
    check(!dic_mode, "back to bypass");
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
