// impulsive_noise_lut: impulsive noise for the time domain, read from a table.
//
// The table holds one period of DEPTH samples: an impulse shaped as a damped
// sinusoid, PEAK * exp(-n/TAU) * sin(2 pi F_NORM n) for n < IMP_LEN, followed
// by silence, so an impulse recurs every DEPTH output samples. The shape
// follows the damped-sinusoid impulse model common for power-line noise; the
// table is computed at elaboration. Each rd_en reads the next entry (wrapping
// pointer) and scales it: noise = sample * gain / 2^GAIN_LOG2, so gain =
// 2^GAIN_LOG2 reproduces the table. enable low gives zero. A stored table is
// what the design describes; its shape, size and the gain control are this
// design's choices.
//
// Timing: synchronous read, noise valid one clock after rd_en; `active` is
// high while the entry read is part of the impulse.
module impulsive_noise_lut
  import plc_pkg::*;
#(
  parameter int  DEPTH     = 2048,
  parameter int  SAMPLE_W  = 16,
  parameter int  IMP_LEN   = 64,
  parameter real PEAK      = 16384.0,  // 1.0 V in the 4.14 format
  parameter real TAU       = 12.0,     // decay, samples
  parameter real F_NORM    = 0.125,    // ringing frequency / sample rate
  parameter int  GAIN_LOG2 = 12,
  parameter int  OUT_W     = FFT_DW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [15:0]             gain,
  input  logic                    rd_en,
  output logic signed [OUT_W-1:0] noise,
  output logic                    active
);
  localparam real PI = 3.141592653589793;
  localparam int  AW = $clog2(DEPTH);
  localparam int  PW = SAMPLE_W + 17;

  logic signed [SAMPLE_W-1:0] tab [IMP_LEN];
  for (genvar n = 0; n < IMP_LEN; n++) begin : g_tab
    localparam real V = PEAK * $exp(-n / TAU) * $sin(2.0 * PI * F_NORM * n);
    assign tab[n] = SAMPLE_W'($rtoi($floor(V + 0.5)));
  end

  logic [AW-1:0]              ptr;
  logic signed [SAMPLE_W-1:0] sample;
  logic signed [PW-1:0]       prod;

  always_comb begin
    sample = (ptr < AW'(IMP_LEN)) ? tab[ptr[$clog2(IMP_LEN)-1:0]] : '0;
    prod   = (PW'(sample) * $signed({1'b0, gain})) >>> GAIN_LOG2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      noise  <= '0;
      active <= 1'b0;
    end else if (rd_en) begin
      ptr    <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
      noise  <= enable ? OUT_W'(sat_s(64'(prod), OUT_W)) : '0;
      active <= enable && (ptr < AW'(IMP_LEN));
    end
  end
endmodule
