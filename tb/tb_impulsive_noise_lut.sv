// tb_impulsive_noise_lut: at gain 4096 (x1) every output must match the
// damped sinusoid 16384 exp(-n/12) sin(2 pi n / 8) for n < 64 and zero for
// the rest of the 2048-sample period (within 1 LSB), over two periods, with
// `active` high exactly during the impulse. Gain 8192 must double it and
// enable low must silence it.
module tb_impulsive_noise_lut;
  localparam int D = 2048;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0, enable = 0, rd_en = 0;
  logic [15:0] gain = '0;
  logic signed [27:0] noise;
  logic active;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  impulsive_noise_lut dut (.*);
  always #5 clk = ~clk;

  task automatic rd();
    @(negedge clk);
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    for (int p = 0; p < 3; p++) begin
      gain = (p == 2) ? 16'd8192 : 16'd4096;
      for (int n = 0; n < D; n++) begin
        real e;
        e = (n < 64) ? 16384.0 * $exp(-n / 12.0) * $sin(2.0 * PI * n / 8.0) : 0.0;
        if (p == 2) e = 2.0 * e;
        rd();
        checks++;
        if (rabs(real'(noise) - e) > 2.0 || active != (n < 64)) begin
          failures++;
          if (failures < 8) $display("period %0d n %0d: %0d expected %0.1f active %0b", p, n, noise, e, active);
        end
      end
    end
    enable = 0;
    for (int n = 0; n < 64; n++) begin
      rd();
      checks++;
      if (noise != 0 || active) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
