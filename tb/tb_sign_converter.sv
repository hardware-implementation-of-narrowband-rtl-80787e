// tb_sign_converter: the magnitude output must equal |value| for the sign
// taken from the operand's MSB, including the most negative value, and copy
// the input when the sign input is 0.
module tb_sign_converter;
  localparam int W = 18;
  logic sign;
  logic [W-1:0] value, magnitude;
  int checks = 0, failures = 0;

  sign_converter #(.W(W)) dut (.*);

  task automatic check(input int v);
    int expect_m;
    value = W'(v);
    sign  = value[W-1];
    expect_m = (v < 0) ? -v : v;
    #1;
    checks++;
    if (magnitude != W'(expect_m)) begin
      failures++;
      $display("value %0d: magnitude %0d expected %0d", v, magnitude, expect_m);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(131071); check(-131072); check(-5);
    for (int i = 0; i < 1000; i++) check(int'($urandom_range(0, 262143)) - 131072);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
