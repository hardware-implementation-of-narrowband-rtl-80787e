// plc_channel_emulator: narrowband power-line channel emulator working in the
// frequency domain.
//
// Every ADC sample is corrected by the linear regression into a 4.14 voltage
// and streamed through a 512-point FFT. Each FFT bin Y(k) is multiplied by the
// stored channel response H(k) (convolution done as a product), white
// Gaussian noise is added to its real and imaginary parts, and the spectrum
// goes through the inverse FFT back to the time domain. The real part of the
// result gets impulsive noise added and is sent to the DAC as a 24-clock
// serial word. All of this streams: one sample in per adc_valid, one sample
// out per sample in, with a delay of 2*(N-1) samples (the two transforms) plus
// about 30 clocks of pipeline registers.
//
// The FFT emits its bins in bit-reversed order, so the H and noise tables are
// addressed with the bit-reversed output position, and the inverse transform
// takes bit-reversed input and returns natural-order samples: no reordering
// memory is needed. H is loadable at run time through the h_wr_* port (one
// bin per clock); the noise sources are switched and scaled by awgn_en /
// awgn_gain and imp_en / imp_gain.
//
// The block chain, the 18-bit ADC code, the 4.14 format, N = 512, the 28-bit
// transform words and the 24-clock DAC word follow the design description;
// the sample strobe, the single clock, the table formats and the noise
// controls are this design's choices. adc_valid must not come more often than
// once per 50*DAC_CLK_DIV clocks, the length of a DAC write, or samples are
// dropped at the DAC (dac_overrun).
module plc_channel_emulator
  import plc_pkg::*;
#(
  parameter int  N           = FFT_N,
  parameter real FS          = 1.0e6,
  parameter bit  H_INIT_FLAT = 1'b0,
  parameter real H_FLAT_GAIN = 1.0,
  parameter int  DAC_CLK_DIV = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ADC side (parallel code from the converter, one strobe per conversion)
  input  logic                     adc_valid,
  input  logic [ADC_W-1:0]         adc_code,
  // noise controls
  input  logic                     awgn_en,
  input  logic [15:0]              awgn_gain,
  input  logic                     imp_en,
  input  logic [15:0]              imp_gain,
  // transfer-function table write port
  input  logic                     h_wr_en,
  input  logic [$clog2(N)-1:0]     h_wr_addr,
  input  logic signed [HW-1:0]     h_wr_re,
  input  logic signed [HW-1:0]     h_wr_im,
  // time-domain output before serialisation
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic signed [FFT_DW-1:0] out_sample,
  output logic                     imp_active,
  // DAC side
  output logic                     dac_cs_ld,
  output logic                     dac_sck,
  output logic                     dac_sdi,
  output logic                     dac_busy,
  output logic                     dac_overrun
);
  localparam int LOGN = $clog2(N);

  // ---------------- linear regression ----------------
  logic                    lr_valid;
  logic signed [LR_W-1:0]  lr_y;
  logic [LOGN-1:0]         lr_idx;

  linear_regression u_lr (
    .clk, .rst_n, .in_valid(adc_valid), .in_code(adc_code),
    .out_valid(lr_valid), .out_y(lr_y)
  );

  // position of each sample in its N-sample frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lr_idx <= '0;
    else if (lr_valid) lr_idx <= lr_idx + LOGN'(1);
  end

  // ---------------- FFT ----------------
  logic                     fft_valid;
  logic [LOGN-1:0]          fft_idx;
  logic signed [FFT_DW-1:0] fft_re, fft_im;

  streaming_fft #(.N(N), .INVERSE(1'b0), .BITREV_IN(1'b0)) u_fft (
    .clk, .rst_n,
    .in_valid(lr_valid), .in_idx(lr_idx), .in_re(FFT_DW'(lr_y)), .in_im('0),
    .out_valid(fft_valid), .out_idx(fft_idx), .out_re(fft_re), .out_im(fft_im)
  );

  // bin number of the current FFT output
  logic [LOGN-1:0] fft_bin;
  assign fft_bin = LOGN'(bitrev(16'(fft_idx), LOGN));

  // ---------------- channel transfer function and AWGN tables ----------------
  logic signed [HW-1:0]     h_re, h_im;
  logic signed [FFT_DW-1:0] awgn_re, awgn_im;

  channel_tf_lut #(.N(N), .FS(FS), .INIT_FLAT(H_INIT_FLAT), .FLAT_GAIN(H_FLAT_GAIN)) u_htab (
    .clk, .rd_en(fft_valid), .rd_addr(fft_bin), .rd_re(h_re), .rd_im(h_im),
    .wr_en(h_wr_en), .wr_addr(h_wr_addr), .wr_re(h_wr_re), .wr_im(h_wr_im)
  );

  awgn_lut u_awgn (
    .clk, .rst_n, .enable(awgn_en), .gain(awgn_gain), .rd_en(fft_valid),
    .noise_re(awgn_re), .noise_im(awgn_im)
  );

  // FFT output waits one clock for the table reads
  logic                     y1_valid;
  logic [LOGN-1:0]          y1_idx;
  logic signed [FFT_DW-1:0] y1_re, y1_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_valid <= 1'b0;
      y1_idx   <= '0;
      y1_re    <= '0;
      y1_im    <= '0;
    end else begin
      y1_valid <= fft_valid;
      if (fft_valid) begin
        y1_idx <= fft_idx;
        y1_re  <= fft_re;
        y1_im  <= fft_im;
      end
    end
  end

  // ---------------- multiplier ----------------
  logic                     m_valid;
  logic signed [FFT_DW-1:0] m_re, m_im;
  logic [LOGN-1:0]          m_idx;
  logic signed [FFT_DW-1:0] n2_re, n2_im;

  complex_multiplier u_mul (
    .clk, .rst_n, .in_valid(y1_valid),
    .h_re(h_re), .h_im(h_im), .y_re(y1_re), .y_im(y1_im),
    .out_valid(m_valid), .m_re(m_re), .m_im(m_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_idx <= '0;
      n2_re <= '0;
      n2_im <= '0;
    end else if (y1_valid) begin
      m_idx <= y1_idx;
      n2_re <= awgn_re;
      n2_im <= awgn_im;
    end
  end

  // ---------------- AWGN adders (frequency domain) ----------------
  logic                     f_valid, f_valid_im;
  logic signed [FFT_DW-1:0] f_re, f_im;
  logic [LOGN-1:0]          f_idx;

  noise_adder u_add_re (
    .clk, .rst_n, .in_valid(m_valid), .signal(m_re), .noise(n2_re),
    .out_valid(f_valid), .sum(f_re)
  );
  noise_adder u_add_im (
    .clk, .rst_n, .in_valid(m_valid), .signal(m_im), .noise(n2_im),
    .out_valid(f_valid_im), .sum(f_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f_idx <= '0;
    else begin
      // the two AWGN adders run in lockstep
      a_adders_lockstep: assert (f_valid == f_valid_im);
      if (m_valid) f_idx <= m_idx;
    end
  end

  // ---------------- inverse FFT ----------------
  logic                     t_valid;
  logic [LOGN-1:0]          t_idx;
  logic signed [FFT_DW-1:0] t_re, t_im;

  streaming_fft #(.N(N), .INVERSE(1'b1), .BITREV_IN(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid(f_valid), .in_idx(f_idx), .in_re(f_re), .in_im(f_im),
    .out_valid(t_valid), .out_idx(t_idx), .out_re(t_re), .out_im(t_im)
  );

  // ---------------- impulsive noise (time domain, real part) ----------------
  logic signed [FFT_DW-1:0] imp_noise;
  logic                     t1_valid;
  logic [LOGN-1:0]          t1_idx;
  logic signed [FFT_DW-1:0] t1_re;

  impulsive_noise_lut u_imp (
    .clk, .rst_n, .enable(imp_en), .gain(imp_gain), .rd_en(t_valid),
    .noise(imp_noise), .active(imp_active)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_valid <= 1'b0;
      t1_idx   <= '0;
      t1_re    <= '0;
    end else begin
      t1_valid <= t_valid;
      if (t_valid) begin
        t1_idx <= t_idx;
        t1_re  <= t_re;
      end
    end
  end

  noise_adder u_add_imp (
    .clk, .rst_n, .in_valid(t1_valid), .signal(t1_re), .noise(imp_noise),
    .out_valid(out_valid), .sum(out_sample)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_idx <= '0;
    else if (t1_valid) out_idx <= t1_idx;
  end

  // ---------------- DAC interface ----------------
  parallel_to_serial #(.CLK_DIV(DAC_CLK_DIV)) u_p2s (
    .clk, .rst_n, .in_valid(out_valid), .in_data(out_sample),
    .dac_cs_ld, .dac_sck, .dac_sdi, .busy(dac_busy), .overrun(dac_overrun)
  );

  // the imaginary part of the inverse transform of a conjugate-symmetric
  // spectrum is only rounding; just the real part goes on
  logic unused_ok;
  assign unused_ok = ^t_im;
endmodule
