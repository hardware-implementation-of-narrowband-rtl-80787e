// awgn_lut: white Gaussian noise for the frequency domain, read from a table.
//
// The table holds DEPTH pairs of independent Gaussian samples (real and
// imaginary), signed SAMPLE_W-bit integers with standard deviation
// 2^SIGMA_LOG2 LSBs, clipped to the word range. They are computed at
// elaboration with the Box-Muller transform from a fixed linear-congruential
// sequence (x <- 1103515245 x + 12345 mod 2^31, seed SEED), so every build
// holds the same noise. Each rd_en reads the next pair (a free-running
// pointer that wraps after DEPTH) and scales it: noise = sample * gain /
// 2^SIGMA_LOG2, so `gain` is the noise standard deviation in output LSBs.
// With enable low the outputs are zero, which is how the noise is switched
// off. A stored table of Gaussian noise is what the design describes; depth,
// word width, generator and gain control are this design's choices.
//
// Timing: synchronous read, noise_* valid one clock after rd_en.
module awgn_lut
  import plc_pkg::*;
#(
  parameter int DEPTH      = 1024,
  parameter int SAMPLE_W   = 16,
  parameter int SIGMA_LOG2 = 12,
  parameter int OUT_W      = FFT_DW,
  parameter int SEED       = 20170101
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [15:0]             gain,
  input  logic                    rd_en,
  output logic signed [OUT_W-1:0] noise_re,
  output logic signed [OUT_W-1:0] noise_im
);
  localparam real PI = 3.141592653589793;
  localparam int  AW = $clog2(DEPTH);

  function automatic logic signed [SAMPLE_W-1:0] clip(input real v);
    real hi;
    hi = (2.0 ** (SAMPLE_W - 1)) - 1.0;
    if (v > hi) v = hi;
    if (v < -hi) v = -hi;
    return SAMPLE_W'($rtoi($floor(v + 0.5)));
  endfunction

  // entry n in bits [n*2*SAMPLE_W +: 2*SAMPLE_W] = {im, re}
  function automatic logic [2*DEPTH*SAMPLE_W-1:0] build_table();
    logic [2*DEPTH*SAMPLE_W-1:0] t;
    longint x;
    real u1, u2, r, sigma;
    x     = longint'(SEED);
    sigma = 2.0 ** SIGMA_LOG2;
    for (int n = 0; n < DEPTH; n++) begin
      x  = (x * 64'd1103515245 + 64'd12345) % 64'd2147483648;
      u1 = (real'(x) + 1.0) / 2147483649.0;
      x  = (x * 64'd1103515245 + 64'd12345) % 64'd2147483648;
      u2 = real'(x) / 2147483648.0;
      r  = $sqrt(-2.0 * $ln(u1)) * sigma;
      t[n*2*SAMPLE_W +: 2*SAMPLE_W] = {clip(r * $sin(2.0 * PI * u2)), clip(r * $cos(2.0 * PI * u2))};
    end
    return t;
  endfunction

  localparam logic [2*DEPTH*SAMPLE_W-1:0] TABLE = build_table();

  logic signed [SAMPLE_W-1:0] tab_re [DEPTH];
  logic signed [SAMPLE_W-1:0] tab_im [DEPTH];
  for (genvar n = 0; n < DEPTH; n++) begin : g_tab
    assign tab_re[n] = TABLE[n*2*SAMPLE_W +: SAMPLE_W];
    assign tab_im[n] = TABLE[n*2*SAMPLE_W+SAMPLE_W +: SAMPLE_W];
  end

  localparam int PW = SAMPLE_W + 17;

  function automatic logic signed [OUT_W-1:0] scaled(input logic signed [SAMPLE_W-1:0] s,
                                                     input logic [15:0] g);
    logic signed [PW-1:0] p;
    p = (PW'(s) * $signed({1'b0, g})) >>> SIGMA_LOG2;
    return OUT_W'(sat_s(64'(p), OUT_W));
  endfunction

  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      noise_re <= '0;
      noise_im <= '0;
    end else if (rd_en) begin
      ptr      <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
      noise_re <= enable ? scaled(tab_re[ptr], gain) : '0;
      noise_im <= enable ? scaled(tab_im[ptr], gain) : '0;
    end
  end
endmodule
