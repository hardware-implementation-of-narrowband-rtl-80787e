// channel_tf_lut: memory holding the channel transfer function H(f_k) for
// every FFT bin k, real and imaginary parts, as signed Q2.16 words.
//
// The channel is the Zimmermann-Dostert multipath model
//   H(f) = sum_i g_i * exp(-(a0 + a1*|f|^k) d_i) * exp(-j 2 pi f d_i / vp),
// stored in rectangular form, Re = sum g_i A_i cos(2 pi f d_i/vp) and
// Im = -sum g_i A_i sin(2 pi f d_i/vp). Bin k stands for f_k = k*FS/N for
// k < N/2 and (k-N)*FS/N above, so the stored response is conjugate-symmetric
// and the inverse transform of the filtered spectrum stays real; the Nyquist
// bin keeps only its real part. The default contents are computed at
// elaboration from the four-path reference parameter set of the model
// (g = 0.64, 0.38, -0.15, 0.05; d = 200, 222.4, 244.8, 267.5 m; a0 = 0,
// a1 = 7.8e-10 s/m, k = 1, vp = 1.5e8 m/s); those numbers are the model's
// published example, not values the emulator description lists. INIT_FLAT
// selects a flat H = FLAT_GAIN instead (e.g. 1.0 or 0.8 for a transparent or
// attenuating channel).
//
// The write port lets other responses be loaded (one bin per wr_en).
// Reads are synchronous: rd_re/rd_im hold the entry of rd_addr one clock
// after rd_en, as a block RAM would.
module channel_tf_lut
  import plc_pkg::*;
#(
  parameter int  N         = FFT_N,
  parameter int  W         = HW,
  parameter int  FRAC      = H_FRAC,
  parameter real FS        = 1.0e6,   // sample rate the FFT bins refer to, Hz
  parameter bit  INIT_FLAT = 1'b0,
  parameter real FLAT_GAIN = 1.0
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [W-1:0]  rd_re,
  output logic signed [W-1:0]  rd_im,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_addr,
  input  logic signed [W-1:0]  wr_re,
  input  logic signed [W-1:0]  wr_im
);
  localparam real PI    = 3.141592653589793;
  localparam int  PATHS = 4;
  localparam real A0    = 0.0;
  localparam real A1    = 7.8e-10;
  localparam real KEXP  = 1.0;
  localparam real VP    = 1.5e8;

  function automatic real g_of(input int i);
    case (i)
      0: return 0.64;
      1: return 0.38;
      2: return -0.15;
      default: return 0.05;
    endcase
  endfunction

  function automatic real d_of(input int i);
    case (i)
      0: return 200.0;
      1: return 222.4;
      2: return 244.8;
      default: return 267.5;
    endcase
  endfunction

  function automatic logic signed [W-1:0] q(input real v);
    return W'($rtoi($floor(v * (2.0 ** FRAC) + 0.5)));
  endfunction

  // Whole table as one constant, bin k in bits [k*2W +: 2W] = {im, re}.
  function automatic logic [2*N*W-1:0] build_table();
    logic [2*N*W-1:0] t;
    for (int k = 0; k < N; k++) begin
      real f, hr, hi, amp, ph;
      f  = ((k < N / 2) ? real'(k) : real'(k - N)) * FS / N;
      hr = 0.0;
      hi = 0.0;
      for (int i = 0; i < PATHS; i++) begin
        amp = g_of(i) * $exp(-(A0 + A1 * ($pow((f < 0.0) ? -f : f, KEXP))) * d_of(i));
        ph  = 2.0 * PI * f * d_of(i) / VP;
        hr  = hr + amp * $cos(ph);
        hi  = hi - amp * $sin(ph);
      end
      if (k == N / 2) hi = 0.0;
      if (INIT_FLAT) begin
        hr = FLAT_GAIN;
        hi = 0.0;
      end
      t[k*2*W +: 2*W] = {q(hi), q(hr)};
    end
    return t;
  endfunction

  localparam logic [2*N*W-1:0] INIT_TABLE = build_table();

  logic signed [W-1:0] mem_re [N];
  logic signed [W-1:0] mem_im [N];

  initial begin
    for (int k = 0; k < N; k++) begin
      mem_re[k] = INIT_TABLE[k*2*W +: W];
      mem_im[k] = INIT_TABLE[k*2*W+W +: W];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_re[wr_addr] <= wr_re;
      mem_im[wr_addr] <= wr_im;
    end
    if (rd_en) begin
      rd_re <= mem_re[rd_addr];
      rd_im <= mem_im[rd_addr];
    end
  end
endmodule
