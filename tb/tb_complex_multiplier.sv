// tb_complex_multiplier: M = H * Y for random operands, compared with a
// complex product worked out with 64-bit integers, rounded (half up) by the
// 16 fraction bits of H and saturated to 28 bits. Checks the special cases
// H = 1 (M = Y), H = 0.8 and H = j, and that the result follows in_valid by
// one clock.
module tb_complex_multiplier;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [17:0] h_re = '0, h_im = '0;
  logic signed [27:0] y_re = '0, y_im = '0;
  logic out_valid;
  logic signed [27:0] m_re, m_im;
  int checks = 0, failures = 0;

  complex_multiplier dut (.*);
  always #5 clk = ~clk;

  function automatic longint ref_scale(input longint v);
    longint r;
    r = (v + 32768) >>> 16;
    if (r > 134217727) r = 134217727;
    if (r < -134217728) r = -134217728;
    return r;
  endfunction

  task automatic check(input longint a, input longint b, input longint c, input longint d);
    longint er, ei;
    @(negedge clk);
    h_re = 18'(a); h_im = 18'(b); y_re = 28'(c); y_im = 28'(d);
    in_valid = 1;
    er = ref_scale(a * c - b * d);
    ei = ref_scale(b * c + a * d);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(m_re) != er || longint'(m_im) != ei) begin
      failures++;
      $display("(%0d,%0d)*(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", a, b, c, d, m_re, m_im, er, ei);
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
    check(65536, 0, 12345678, -7654321);      // H = 1
    check(52429, 0, 1000000, -1000000);       // H = 0.8
    check(0, 65536, 5000, 7000);              // H = j
    check(-131072, -131072, -134217728, -134217728);  // saturates
    for (int i = 0; i < 3000; i++)
      check(longint'($urandom_range(0, 262143)) - 131072, longint'($urandom_range(0, 262143)) - 131072,
            longint'($urandom_range(0, 268435455)) - 134217728, longint'($urandom_range(0, 268435455)) - 134217728);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
