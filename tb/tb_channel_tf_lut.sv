// tb_channel_tf_lut: reads every bin of the default table and compares it
// with the four-path multipath model evaluated here in real arithmetic
// (within 1 LSB of Q2.16), checks conjugate symmetry H(N-k) = conj H(k),
// a flat 0.8 table, and that words written through the write port read back.
// Reads are synchronous: data must appear one clock after rd_en.
module tb_channel_tf_lut;
  localparam int N = 512;
  localparam real PI = 3.141592653589793;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [8:0] rd_addr = '0, wr_addr = '0;
  logic signed [17:0] rd_re, rd_im, wr_re = '0, wr_im = '0, fl_re, fl_im;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real g [4] = '{0.64, 0.38, -0.15, 0.05};
  real d [4] = '{200.0, 222.4, 244.8, 267.5};
  int hre [N], him [N];

  channel_tf_lut dut (.*);
  channel_tf_lut #(.INIT_FLAT(1'b1), .FLAT_GAIN(0.8)) dut_flat (
    .clk, .rd_en, .rd_addr, .rd_re(fl_re), .rd_im(fl_im),
    .wr_en(1'b0), .wr_addr('0), .wr_re('0), .wr_im('0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      real f, er, ei;
      f  = real'((k < N / 2) ? k : k - N) * 1.0e6 / N;
      er = 0.0;
      ei = 0.0;
      for (int i = 0; i < 4; i++) begin
        real a;
        a  = g[i] * $exp(-7.8e-10 * ((f < 0) ? -f : f) * d[i]);
        er += a * $cos(2.0 * PI * f * d[i] / 1.5e8);
        ei -= a * $sin(2.0 * PI * f * d[i] / 1.5e8);
      end
      if (k == N / 2) ei = 0.0;
      @(negedge clk);
      rd_en = 1;
      rd_addr = 9'(k);
      @(negedge clk);
      rd_en = 0;
      hre[k] = int'(rd_re);
      him[k] = int'(rd_im);
      checks += 2;
      if (rabs(real'(rd_re) - er * 65536.0) > 1.0 || rabs(real'(rd_im) - ei * 65536.0) > 1.0) begin
        failures++;
        $display("bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", k, rd_re, rd_im, er * 65536.0, ei * 65536.0);
      end
      if (fl_re != 18'sd52429 || fl_im != 0) begin
        failures++;
        $display("flat table bin %0d: (%0d,%0d)", k, fl_re, fl_im);
      end
    end
    for (int k = 1; k < N; k++) begin
      checks++;
      if (hre[k] != hre[N-k] || him[k] != -him[N-k]) begin
        failures++;
        $display("symmetry bin %0d", k);
      end
    end
    // write and read back
    for (int i = 0; i < 64; i++) begin
      int a, vr, vi;
      a  = int'($urandom_range(0, N - 1));
      vr = int'($urandom_range(0, 262143)) - 131072;
      vi = int'($urandom_range(0, 262143)) - 131072;
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(a); wr_re = 18'(vr); wr_im = 18'(vi);
      @(negedge clk);
      wr_en = 0;
      rd_en = 1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_re != 18'(vr) || rd_im != 18'(vi)) begin
        failures++;
        $display("write/read %0d: got (%0d,%0d)", a, rd_re, rd_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
