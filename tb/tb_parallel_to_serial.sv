// tb_parallel_to_serial: sends samples through the serialiser into a
// behavioural DAC model and checks, for each word, the 16-bit code
// (clamp(0.8 * y, 0, 65535)), the command and address nibbles and that
// exactly 24 SCK edges were used. Samples are given one at a time, and also
// three back to back to exercise the holding register (second is kept) and
// the overrun pulse (third is dropped). The time for one word at CLK_DIV = 1
// must be 50 clocks.
module tb_parallel_to_serial;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [27:0] in_data = '0;
  logic dac_cs_ld, dac_sck, dac_sdi, busy, overrun;
  logic [3:0] cmd, addr;
  logic [15:0] code;
  int bits, word_cnt;
  int checks = 0, failures = 0;
  int overruns = 0;

  parallel_to_serial dut (.*);
  ltc2752_model dac (.cs_ld(dac_cs_ld), .sck(dac_sck), .sdi(dac_sdi), .cmd, .addr, .code, .bits, .word_cnt);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && overrun) overruns++;

  function automatic int expect_code(input longint y);
    longint c;
    c = (y * 52429) >>> 16;
    if (c < 0) c = 0;
    if (c > 65535) c = 65535;
    return int'(c);
  endfunction

  task automatic check_word(input longint y, input int prev_cnt);
    checks++;
    if (word_cnt != prev_cnt + 1 || code != 16'(expect_code(y)) || cmd != 4'b0011 || addr != 4'b0000 || bits != 24) begin
      failures++;
      $display("y=%0d: words %0d code %0d expected %0d cmd %b addr %b bits %0d", y, word_cnt - prev_cnt,
               code, expect_code(y), cmd, addr, bits);
    end
  endtask

  task automatic send_one(input longint y);
    int prev, t0, t1;
    prev = word_cnt;
    @(negedge clk);
    in_valid = 1;
    in_data  = 28'(y);
    t0 = $time;
    @(negedge clk);
    in_valid = 0;
    @(posedge dac_cs_ld);
    t1 = $time;
    #1;
    check_word(y, prev);
    checks++;
    // accepted at t0, one clock to load, 48 SCK half periods, one to raise CS
    if ((t1 - t0) / 10 != 50) begin
      failures++;
      $display("word time %0d clocks, expected 50", (t1 - t0) / 10);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ys [3];
    int prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_one(0);
    send_one(16384);         // 1.0 V
    send_one(81919);         // ~5 V
    send_one(-5000);         // clamps to 0
    send_one(200000);        // clamps to 65535
    for (int i = 0; i < 50; i++) send_one(longint'($urandom_range(0, 81919)));
    // three samples back to back
    prev = word_cnt;
    ys = '{12345, 23456, 34567};
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = 28'(ys[i]);
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge dac_cs_ld);
    #1;
    check_word(ys[0], prev);
    @(posedge dac_cs_ld);
    #1;
    check_word(ys[1], prev + 1);
    repeat (200) @(negedge clk);
    checks++;
    if (word_cnt != prev + 2 || overruns != 1) begin
      failures++;
      $display("back-to-back: %0d words, %0d overruns", word_cnt - prev, overruns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
