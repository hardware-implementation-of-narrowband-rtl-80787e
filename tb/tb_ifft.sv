// tb_ifft: checks the inverse streaming FFT (512 points, bit-reversed input,
// natural-order output, 1/N scaling) against a direct inverse DFT.
//
// Three frames of random complex spectra (28-bit words, components up to
// +-2^26) are streamed, input position p carrying bin bitrev(p); frame 2 has
// gaps in in_valid. Frames 1 and 2 are compared sample by sample with
// x(n) = (1/N) sum X(k) exp(+j2pi nk/N); the stage-by-stage truncation allows
// a few LSB of error, so the tolerance is 16 LSB plus 2e-6 of max|X|. The
// latency (N-1 samples plus one clock per stage) is checked as well.
module tb_ifft;
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

  streaming_fft #(.N(N), .INVERSE(1'b1), .BITREV_IN(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real xr [3][N], xi [3][N];   // spectrum, natural bin order
  int  outcnt = 0;
  int  first_in_cyc [3];
  real got_re [3][N], got_im [3][N];
  int  pos0_cyc [3];

  function automatic int bitrev9(int v);
    int r = 0;
    for (int i = 0; i < S; i++) if (v[i]) r |= 1 << (S - 1 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, p;
      f = (outcnt - (N - 1)) / N;
      p = (outcnt - (N - 1)) % N;
      if (outcnt >= N - 1 && f < 3) begin
        if (p == 0) pos0_cyc[f] = cyc;
        got_re[f][p] = real'(out_re);
        got_im[f][p] = real'(out_im);
        if (out_idx != S'(p)) failures++;
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
    for (int f = 0; f < 3; f++)
      for (int k = 0; k < N; k++) begin
        xr[f][k] = real'(int'($urandom_range(0, 1 << 27)) - (1 << 26));
        xi[f][k] = real'(int'($urandom_range(0, 1 << 27)) - (1 << 26));
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int p = 0; p < N; p++) begin
        if (f == 2) while ($urandom_range(0, 3) == 0) @(negedge clk);
        @(negedge clk);
        if (p == 0) first_in_cyc[f] = cyc;
        in_valid = 1;
        in_idx   = S'(p);
        in_re    = DW'($rtoi(xr[f][bitrev9(p)]));
        in_im    = DW'($rtoi(xi[f][bitrev9(p)]));
        @(negedge clk);
        in_valid = 0;
      end
    end
    for (int n = 0; n < N + 4; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_idx   = S'(n);
      in_re    = '0;
      in_im    = '0;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);

    for (int f = 1; f < 3; f++) begin
      real tol, maxerr;
      maxerr = 0.0;
      tol = 16.0 + 2e-6 * real'(1 << 26);
      for (int n = 0; n < N; n++) begin
        real rr, ri, e;
        rr = 0.0;
        ri = 0.0;
        for (int k = 0; k < N; k++) begin
          real c, s;
          c = $cos(2.0 * PI * ((n * k) % N) / N);
          s = $sin(2.0 * PI * ((n * k) % N) / N);
          rr += xr[f][k] * c - xi[f][k] * s;
          ri += xr[f][k] * s + xi[f][k] * c;
        end
        rr = rr / N;
        ri = ri / N;
        e = $sqrt((rr - got_re[f][n]) ** 2 + (ri - got_im[f][n]) ** 2);
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > tol) begin
          failures++;
          if (failures < 10)
            $display("frame %0d n %0d: got (%0.0f,%0.0f) expected (%0.1f,%0.1f)", f, n,
                     got_re[f][n], got_im[f][n], rr, ri);
        end
      end
      $display("frame %0d: max error %0.1f LSB, tolerance %0.1f", f, maxerr, tol);
    end
    checks++;
    if (pos0_cyc[1] - first_in_cyc[1] != 2 * (N - 1) + S) begin
      failures++;
      $display("latency: %0d clocks, expected %0d", pos0_cyc[1] - first_in_cyc[1], 2 * (N - 1) + S);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
