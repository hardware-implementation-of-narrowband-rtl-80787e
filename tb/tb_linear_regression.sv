// tb_linear_regression: checks the ADC-code to 4.14-voltage conversion.
//
// Codes 1..10 must give the conversion table 0,0,0,1,1,1,2,2,2,3; 2000 random
// codes are compared with floor(x * 5 V / 2^18 * 2^14) computed in real
// arithmetic, and the end of range (code 2^18-1 -> 81919) is checked. The
// output must follow in_valid by exactly one clock.
module tb_linear_regression;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [17:0] in_code = '0;
  logic out_valid;
  logic signed [17:0] out_y;

  linear_regression dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int table_y [10] = '{0, 0, 0, 1, 1, 1, 2, 2, 2, 3};

  task automatic apply(input int x, input int expect_y);
    @(negedge clk);
    in_valid = 1;
    in_code  = 18'(x);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out_y != 18'(expect_y)) begin
      failures++;
      $display("code %0d: valid=%0b y=%0d expected %0d", x, out_valid, out_y, expect_y);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stayed high");
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
    for (int x = 1; x <= 10; x++) apply(x, table_y[x-1]);
    for (int i = 0; i < 2000; i++) begin
      int x;
      x = int'($urandom_range(0, 262143));
      apply(x, $rtoi($floor(real'(x) * 5.0 / 262144.0 * 16384.0)));
    end
    apply(262143, 81919);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
