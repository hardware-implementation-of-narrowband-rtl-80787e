// tb_plc_channel_emulator: end-to-end test of the channel emulator at its
// default parameters (512-point transforms, four-path channel table).
//
// ADC codes of a sine on a 2.5 V offset are fed with one sample every 50 to
// 120 clocks (irregular spacing stalls the pipelines between samples). Each
// phase starts from reset and streams four 512-sample frames; the output of
// sample j is the input of sample j - 2*(N-1) after the channel. Phases:
//   A  default multipath H(f), no noise: frame 1 is compared with a
//      per-frame circular convolution worked out here (DFT, product with the
//      model H(f), inverse DFT in real arithmetic);
//   B  H = 1 loaded through the table write port: output equals input;
//   C  H = 0.8: output is 0.8 times the input;
//   D  H = 1 with AWGN (gain 37068, about 100 mV rms in time): the output
//      error must have the expected rms gain/sqrt(N) (+-20%);
//   E  H = 1 with impulsive noise only: the error equals the impulse table
//      where imp_active is high and is near zero elsewhere;
//   F  both noises on;
//   G  samples every 20 clocks, faster than a DAC write: dac_overrun fires.
// Every DAC word received by the DAC model must carry the code of the
// corresponding output sample. Each mechanism (table write, stall, AWGN,
// impulse, overrun) is counted and must have happened at least once.
module tb_plc_channel_emulator;
  localparam int N = 512;
  localparam int LAT = 2 * (N - 1);
  localparam int FRAMES = 4;
  localparam real PI = 3.141592653589793;

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
  int n_hwrite = 0, n_stall = 0, n_awgn = 0, n_imp = 0, n_overrun = 0, n_dacword = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---------------- capture ----------------
  int  yin [FRAMES*N];           // linear-regression value of each input
  int  yout [FRAMES*N+LAT];      // output samples in order
  bit  act [FRAMES*N+LAT];
  int  nout = 0;
  int  exp_codes [$];
  bit  dac_check = 1'b1;          // off while samples are dropped on purpose

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint c;
      if (nout < FRAMES * N + LAT) begin
        yout[nout] = int'(out_sample);
        act[nout]  = imp_active;
      end
      nout++;
      c = (longint'(out_sample) * 52429) >>> 16;
      if (c < 0) c = 0;
      if (c > 65535) c = 65535;
      exp_codes.push_back(int'(c));
    end
    if (rst_n && dac_overrun) n_overrun++;
  end

  always @(posedge dac_cs_ld) begin
    #1;
    if (rst_n && dac_check && exp_codes.size() > 0) begin
      int e;
      e = exp_codes.pop_front();
      checks++;
      n_dacword++;
      if (int'(dcode) != e || dbits != 24) begin
        failures++;
        if (failures < 20) $display("DAC word: code %0d expected %0d, %0d bits", dcode, e, dbits);
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nout = 0;
    exp_codes.delete();
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
    n_hwrite++;
  endtask

  // stream FRAMES frames of a sine, then LAT zero samples to flush
  task automatic run_stream(input real fnorm, input int min_gap, input int max_gap);
    for (int n = 0; n < FRAMES * N + LAT + 2; n++) begin
      int x, gap;
      if (n < FRAMES * N)
        x = 131072 + $rtoi($floor(100000.0 * $sin(2.0 * PI * fnorm * n) + 0.5));
      else
        x = 0;
      if (n < FRAMES * N) yin[n] = (x * 5) >>> 4;
      @(negedge clk);
      adc_valid = 1;
      adc_code  = 18'(x);
      @(negedge clk);
      adc_valid = 0;
      gap = int'($urandom_range(min_gap, max_gap));
      if (gap > min_gap) n_stall++;
      repeat (gap - 2) @(negedge clk);
    end
    repeat (100) @(negedge clk);
  endtask

  // compare outputs of frames 1..FRAMES-1 with gain * input
  task automatic check_scaled(input real g, input real tol, input string tag);
    real maxe;
    maxe = 0.0;
    for (int j = N; j < FRAMES * N; j++) begin
      real e;
      e = rabs(real'(yout[j + LAT]) - g * real'(yin[j]));
      if (e > maxe) maxe = e;
      checks++;
      if (e > tol) begin
        failures++;
        if (failures < 20) $display("%s: sample %0d out %0d expected %0.1f", tag, j, yout[j + LAT], g * yin[j]);
      end
    end
    $display("%s: max error %0.1f LSB", tag, maxe);
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------- A: default multipath channel ----------
    do_reset();
    run_stream(9.3 / N, 50, 120);
    begin
      real hr [N], hi [N], yr [N], yi [N];
      real g [4], d [4], maxe;
      g = '{0.64, 0.38, -0.15, 0.05};
      d = '{200.0, 222.4, 244.8, 267.5};
      for (int k = 0; k < N; k++) begin
        real f;
        f = real'((k < N / 2) ? k : k - N) * 1.0e6 / N;
        hr[k] = 0.0;
        hi[k] = 0.0;
        for (int i = 0; i < 4; i++) begin
          real a;
          a = g[i] * $exp(-7.8e-10 * rabs(f) * d[i]);
          hr[k] += a * $cos(2.0 * PI * f * d[i] / 1.5e8);
          hi[k] -= a * $sin(2.0 * PI * f * d[i] / 1.5e8);
        end
        if (k == N / 2) hi[k] = 0.0;
        // quantised as stored
        hr[k] = $floor(hr[k] * 65536.0 + 0.5) / 65536.0;
        hi[k] = $floor(hi[k] * 65536.0 + 0.5) / 65536.0;
      end
      for (int k = 0; k < N; k++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int n = 0; n < N; n++) begin
          sr += real'(yin[N + n]) * $cos(2.0 * PI * ((n * k) % N) / N);
          si -= real'(yin[N + n]) * $sin(2.0 * PI * ((n * k) % N) / N);
        end
        yr[k] = sr * hr[k] - si * hi[k];
        yi[k] = sr * hi[k] + si * hr[k];
      end
      maxe = 0.0;
      for (int n = 0; n < N; n++) begin
        real xo, e;
        xo = 0.0;
        for (int k = 0; k < N; k++)
          xo += yr[k] * $cos(2.0 * PI * ((n * k) % N) / N) - yi[k] * $sin(2.0 * PI * ((n * k) % N) / N);
        xo = xo / N;
        e = rabs(real'(yout[N + n + LAT]) - xo);
        if (e > maxe) maxe = e;
        checks++;
        if (e > 24.0) begin
          failures++;
          if (failures < 20) $display("A: sample %0d out %0d expected %0.1f", n, yout[N + n + LAT], xo);
        end
      end
      $display("A (multipath): max error %0.1f LSB", maxe);
    end

    // ---------- B: H = 1 ----------
    load_flat(65536);
    do_reset();
    run_stream(3.7 / N, 50, 120);
    check_scaled(1.0, 16.0, "B (H=1)");

    // ---------- C: H = 0.8 ----------
    load_flat(52429);
    do_reset();
    run_stream(1.0 / 64.0, 50, 90);
    check_scaled(0.8, 16.0, "C (H=0.8)");

    // ---------- D: AWGN ----------
    load_flat(65536);
    awgn_en = 1;
    awgn_gain = 16'd37068;
    do_reset();
    run_stream(3.7 / N, 50, 60);
    begin
      real s2, rms, expect_rms;
      s2 = 0.0;
      for (int j = N; j < FRAMES * N; j++) s2 += (real'(yout[j + LAT]) - real'(yin[j])) ** 2;
      rms = $sqrt(s2 / ((FRAMES - 1) * N));
      expect_rms = 37068.0 / $sqrt(real'(N));
      $display("D (AWGN): error rms %0.1f LSB, expected %0.1f", rms, expect_rms);
      checks++;
      if (rms < 0.8 * expect_rms || rms > 1.2 * expect_rms) failures++;
      else n_awgn++;
    end

    // ---------- E: impulsive noise ----------
    awgn_en = 0;
    imp_en = 1;
    imp_gain = 16'd4096;
    do_reset();
    run_stream(3.7 / N, 50, 60);
    for (int j = N; j < FRAMES * N; j++) begin
      int p;
      real e, expect_imp;
      p = (j + LAT) % 2048;
      expect_imp = (p < 64) ? 16384.0 * $exp(-p / 12.0) * $sin(2.0 * PI * p / 8.0) : 0.0;
      e = rabs(real'(yout[j + LAT]) - real'(yin[j]) - expect_imp);
      checks++;
      if (e > 18.0 || act[j + LAT] != (p < 64)) begin
        failures++;
        if (failures < 20) $display("E: sample %0d diff %0d expected impulse %0.1f", j,
                                    yout[j + LAT] - yin[j], expect_imp);
      end
      if (act[j + LAT] && p == 0) n_imp++;
    end
    $display("E (impulse): %0d impulses seen", n_imp);

    // ---------- F: both noises ----------
    awgn_en = 1;
    do_reset();
    run_stream(3.7 / N, 50, 60);
    begin
      real s2;
      int  imp_seen;
      s2 = 0.0;
      imp_seen = 0;
      for (int j = N; j < FRAMES * N; j++) begin
        s2 += (real'(yout[j + LAT]) - real'(yin[j])) ** 2;
        if (act[j + LAT]) imp_seen++;
      end
      checks++;
      if ($sqrt(s2 / ((FRAMES - 1) * N)) < 0.8 * 37068.0 / $sqrt(real'(N)) || imp_seen == 0) failures++;
      $display("F (both): error rms %0.1f LSB, %0d impulse samples", $sqrt(s2 / ((FRAMES - 1) * N)), imp_seen);
    end

    // ---------- G: samples faster than the DAC ----------
    awgn_en = 0;
    imp_en = 0;
    dac_check = 1'b0;
    do_reset();
    for (int n = 0; n < 2 * N; n++) begin
      @(negedge clk);
      adc_valid = 1;
      adc_code  = 18'(131072);
      @(negedge clk);
      adc_valid = 0;
      repeat (18) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    exp_codes.delete();
    $display("G (overrun): %0d overruns", n_overrun);

    // ---------- mechanism coverage ----------
    $display("coverage: table writes %0d, stalls %0d, awgn %0d, impulses %0d, overruns %0d, DAC words %0d",
             n_hwrite, n_stall, n_awgn, n_imp, n_overrun, n_dacword);
    checks += 6;
    if (n_hwrite == 0)  failures++;
    if (n_stall == 0)   failures++;
    if (n_awgn == 0)    failures++;
    if (n_imp == 0)     failures++;
    if (n_overrun == 0) failures++;
    if (n_dacword == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
