// tb_paper_scenarios: runs the emulator through the bench scenarios it was
// built for, at default parameters, with one sample every 50 clocks (a
// 6.875 MHz clock gives the 137.5 kHz sample rate and a 3.44 MHz DAC SCK).
//
// Input is a sine of 1.18 V amplitude on a 2.5 V offset, as ADC codes. Each
// scenario starts from reset, streams 4 frames of 512 samples plus the 1022
// samples of latency, and measures the output as the DAC sees it (16-bit
// codes from the DAC model, 5 V full scale) and as 4.14 samples:
//   flat       H = 1, no noise, 1.33 kHz: error rms below 2 LSB (122 uV),
//              i.e. the emulator itself adds next to no noise;
//   TF = 1     46 Hz, 132 Hz, 1.33 kHz: output equals input within 4 LSB,
//              DAC peak-to-peak within 1% of the input's;
//   TF = 0.8   11 Hz, 1 kHz: output equals 0.8 x input within 4 LSB, DAC
//              peak-to-peak ratio 0.8 within 1%;
//   AWGN       100 uV (gain 37) and 100 mV (gain 37068) rms: measured error
//              rms within the expected band;
//   impulse    alone, then with 100 mV AWGN: the impulse shows up exactly
//              where imp_active says (peak error above 0.7 V there; the impulse peaks at 0.85 V).
module tb_paper_scenarios;
  localparam int N = 512;
  localparam int LAT = 2 * (N - 1);
  localparam int FRAMES = 4;
  localparam int GAP = 50;
  localparam real FS = 137.5e3;
  localparam real PI = 3.141592653589793;
  localparam real LSB_V = 1.0 / 16384.0;   // 4.14 format

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic [17:0] adc_code = '0;
  logic awgn_en = 0, imp_en = 0;
  logic [15:0] awgn_gain = '0, imp_gain = '0;
  logic h_wr_en = 0;
  logic [8:0] h_wr_addr = '0;
  logic signed [17:0] h_wr_re = '0, h_wr_im = '0;
  logic out_valid;
  logic [8:0] out_idx;
  logic signed [27:0] out_sample;
  logic imp_active;
  logic dac_cs_ld, dac_sck, dac_sdi, dac_busy, dac_overrun;
  logic [3:0] dcmd, daddr;
  logic [15:0] dcode;
  int dbits, dwords;

  plc_channel_emulator dut (.*);
  ltc2752_model dac (.cs_ld(dac_cs_ld), .sck(dac_sck), .sdi(dac_sdi), .cmd(dcmd), .addr(daddr),
                     .code(dcode), .bits(dbits), .word_cnt(dwords));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int yin  [FRAMES*N];
  int yout [FRAMES*N+LAT];
  bit act  [FRAMES*N+LAT];
  int nout = 0;
  int dac_min, dac_max, dac_words;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (nout < FRAMES * N + LAT) begin
        yout[nout] = int'(out_sample);
        act[nout]  = imp_active;
      end
      nout++;
    end
  end

  // DAC codes of the samples that carry frames 1..3 of the input
  always @(posedge dac_cs_ld) begin
    if (rst_n && dac_words >= LAT + N && dac_words < LAT + FRAMES * N) begin
      if (int'(dcode) < dac_min) dac_min = int'(dcode);
      if (int'(dcode) > dac_max) dac_max = int'(dcode);
    end
    if (rst_n) dac_words++;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  task automatic load_flat(input int gain_q16);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      h_wr_en = 1;
      h_wr_addr = 9'(k);
      h_wr_re = 18'(gain_q16);
      h_wr_im = '0;
    end
    @(negedge clk);
    h_wr_en = 0;
  endtask

  // run one scenario; returns input peak-to-peak in DAC codes (ideal)
  task automatic run(input real f_hz, output real in_pp_codes);
    int xmin, xmax;
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nout = 0;
    dac_words = 0;
    dac_min = 65535;
    dac_max = 0;
    xmin = 1 << 30;
    xmax = 0;
    for (int n = 0; n < FRAMES * N + LAT + 2; n++) begin
      int x;
      x = (n < FRAMES * N)
          ? $rtoi($floor((2.5 + 1.18 * $sin(2.0 * PI * f_hz * n / FS)) / 5.0 * 262144.0 + 0.5)) : 0;
      if (n < FRAMES * N) begin
        yin[n] = (x * 5) >>> 4;
        if (n >= N) begin
          if (x < xmin) xmin = x;
          if (x > xmax) xmax = x;
        end
      end
      @(negedge clk);
      adc_valid = 1;
      adc_code  = 18'(x);
      @(negedge clk);
      adc_valid = 0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    in_pp_codes = real'(xmax - xmin) / 4.0;
  endtask

  function automatic real err_rms(input real g);
    real s2;
    s2 = 0.0;
    for (int j = N; j < FRAMES * N; j++) s2 += (real'(yout[j + LAT]) - g * real'(yin[j])) ** 2;
    return $sqrt(s2 / ((FRAMES - 1) * N));
  endfunction

  function automatic real err_max(input real g);
    real m;
    m = 0.0;
    for (int j = N; j < FRAMES * N; j++)
      if (rabs(real'(yout[j + LAT]) - g * real'(yin[j])) > m) m = rabs(real'(yout[j + LAT]) - g * real'(yin[j]));
    return m;
  endfunction

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pp, ratio, e, r;
    real f1 [3];
    real f8 [2];
    f1 = '{46.0, 132.0, 1330.0};
    f8 = '{11.0, 1000.0};

    // ---------------- flat spectrum / FPGA noise floor ----------------
    load_flat(65536);
    run(1330.0, pp);
    e = err_rms(1.0);
    $display("flat: error rms %0.2f LSB = %0.1f uV", e, e * LSB_V * 1e6);
    expect_true(e < 2.0, "flat: emulator noise floor");

    // ---------------- TF = 1 ----------------
    foreach (f1[i]) begin
      run(f1[i], pp);
      ratio = real'(dac_max - dac_min) / pp;
      e = err_max(1.0);
      $display("TF=1 %0.0f Hz: max error %0.1f LSB, DAC pk-pk ratio %0.4f", f1[i], e, ratio);
      expect_true(e <= 4.0, "TF=1 waveform");
      expect_true(rabs(ratio - 1.0) < 0.01, "TF=1 amplitude");
    end

    // ---------------- TF = 0.8 ----------------
    load_flat(52429);
    foreach (f8[i]) begin
      run(f8[i], pp);
      ratio = real'(dac_max - dac_min) / pp;
      e = err_max(0.8);
      $display("TF=0.8 %0.0f Hz: max error %0.1f LSB, DAC pk-pk ratio %0.4f", f8[i], e, ratio);
      expect_true(e <= 4.0, "TF=0.8 waveform");
      expect_true(rabs(ratio - 0.8) < 0.01, "TF=0.8 amplitude");
    end

    // ---------------- AWGN ----------------
    load_flat(65536);
    awgn_en = 1;
    awgn_gain = 16'd37;
    run(132.0, pp);
    r = err_rms(1.0);
    $display("AWGN 100 uV: error rms %0.1f uV", r * LSB_V * 1e6);
    expect_true(r * LSB_V > 60e-6 && r * LSB_V < 200e-6, "AWGN 100 uV level");
    awgn_gain = 16'd37068;
    run(132.0, pp);
    r = err_rms(1.0);
    $display("AWGN 100 mV: error rms %0.2f mV", r * LSB_V * 1e3);
    expect_true(r * LSB_V > 80e-3 && r * LSB_V < 120e-3, "AWGN 100 mV level");

    // ---------------- impulsive noise ----------------
    for (int both = 0; both < 2; both++) begin
      real peak_in, peak_out;
      awgn_en = (both == 1);
      imp_en = 1;
      imp_gain = 16'd4096;
      run(132.0, pp);
      peak_in = 0.0;
      peak_out = 0.0;
      for (int j = N; j < FRAMES * N; j++) begin
        e = rabs(real'(yout[j + LAT]) - real'(yin[j])) * LSB_V;
        if (act[j + LAT] && e > peak_in) peak_in = e;
        if (!act[j + LAT] && e > peak_out) peak_out = e;
      end
      $display("impulse%s: peak error %0.3f V inside the impulse, %0.3f V outside",
               both ? " + AWGN" : "", peak_in, peak_out);
      expect_true(peak_in > 0.7, "impulse visible");
      expect_true(peak_out < (both ? 0.6 : 0.001), "no impulse outside its window");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
