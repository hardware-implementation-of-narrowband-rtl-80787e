// tb_noise_adder: registered saturating sum of signal and noise, compared with
// a clipped integer sum for random, overflowing and underflowing operands.
module tb_noise_adder;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [27:0] signal = '0, noise = '0;
  logic out_valid;
  logic signed [27:0] sum;
  int checks = 0, failures = 0;

  noise_adder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input longint s, input longint n);
    longint e;
    @(negedge clk);
    signal = 28'(s); noise = 28'(n); in_valid = 1;
    e = s + n;
    if (e > 134217727) e = 134217727;
    if (e < -134217728) e = -134217728;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(sum) != e) begin
      failures++;
      $display("%0d + %0d: got %0d expected %0d", s, n, sum, e);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(134217727, 5);
    check(-134217728, -1);
    check(100, -300);
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom_range(0, 268435455)) - 134217728, longint'($urandom_range(0, 268435455)) - 134217728);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
