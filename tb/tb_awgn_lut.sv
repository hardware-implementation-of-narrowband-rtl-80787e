// tb_awgn_lut: the noise table read at unit gain (gain = 4096 = sigma) must
// look Gaussian and white: mean near 0, standard deviation within 8% of 4096,
// about 68% of samples within one sigma, real and imaginary parts
// uncorrelated, and the sequence must repeat after 1024 reads. At half gain
// every sample must be the unit-gain sample halved, and with enable low or
// gain 0 the output must be zero.
module tb_awgn_lut;
  localparam int D = 1024;
  logic clk = 0, rst_n = 0, enable = 0, rd_en = 0;
  logic [15:0] gain = '0;
  logic signed [27:0] noise_re, noise_im;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  int sr [D], si [D];

  awgn_lut dut (.*);
  always #5 clk = ~clk;

  task automatic rd();
    @(negedge clk);
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
  endtask

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("failed: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean, var_r, corr;
    int  in1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    gain = 16'd4096;
    mean = 0.0; var_r = 0.0; corr = 0.0; in1 = 0;
    for (int n = 0; n < D; n++) begin
      rd();
      sr[n] = int'(noise_re);
      si[n] = int'(noise_im);
      mean  += real'(sr[n] + si[n]) / (2.0 * D);
      var_r += real'(sr[n]) ** 2 / (2.0 * D) + real'(si[n]) ** 2 / (2.0 * D);
      corr  += real'(sr[n]) * real'(si[n]) / D;
      if (rabs(sr[n]) < 4096) in1++;
    end
    $display("mean %0.1f sigma %0.1f corr %0.3f within 1 sigma %0d", mean, $sqrt(var_r), corr / var_r, in1);
    expect_true(rabs(mean) < 400.0, "mean");
    expect_true(rabs($sqrt(var_r) - 4096.0) < 330.0, "sigma");
    expect_true(rabs(corr / var_r) < 0.1, "re/im correlation");
    expect_true(in1 > 620 && in1 < 780, "one-sigma fraction");
    // second pass at half gain: same sequence, halved
    gain = 16'd2048;
    for (int n = 0; n < D; n++) begin
      rd();
      checks++;
      if (noise_re != 28'(sr[n] >>> 1) || noise_im != 28'(si[n] >>> 1)) begin
        failures++;
        if (failures < 5) $display("half gain %0d: (%0d,%0d) vs (%0d,%0d)", n, noise_re, noise_im, sr[n], si[n]);
      end
    end
    gain = 16'd0;
    rd();
    expect_true(noise_re == 0 && noise_im == 0, "gain 0");
    gain = 16'd4096;
    enable = 0;
    rd();
    expect_true(noise_re == 0 && noise_im == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
