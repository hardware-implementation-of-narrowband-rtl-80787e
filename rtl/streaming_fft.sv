// streaming_fft: N-point pipelined radix-2 FFT / inverse FFT, one sample per
// in_valid, continuous streaming.
//
// log2(N) sdf_stage instances are chained. With BITREV_IN = 0 the stages are
// decimation-in-frequency with delays N/2, N/4, ..., 1: the input frame is in
// natural order and the output frame comes out in bit-reversed order (output
// position p holds bin bitrev(p)). With BITREV_IN = 1 the stages are
// decimation-in-time with delays 1, 2, ..., N/2: the input is taken in
// bit-reversed order and the output is in natural order. Chaining a forward
// BITREV_IN = 0 transform into an inverse BITREV_IN = 1 transform therefore
// needs no reordering memory.
//
// INVERSE = 1 conjugates the twiddle factors and halves every stage's
// outputs, so the result carries the 1/N factor of the inverse DFT
// (truncated). The forward transform is unscaled: an 18-bit real input grows
// by at most log2(N) bits and fits the 28-bit word.
//
// Interface: in_idx is the sample's position 0..N-1 in its frame; out_idx is
// the position of the output sample in the output frame. A frame's first
// output appears N-1 valid samples after its first input (plus one clock per
// stage); the pipeline only advances on in_valid.
module streaming_fft
  import plc_pkg::*;
#(
  parameter int N         = FFT_N,
  parameter int DW        = FFT_DW,
  parameter int TW_W      = TWID_W,
  parameter int TW_FRAC   = TWID_FRAC,
  parameter bit INVERSE   = 1'b0,
  parameter bit BITREV_IN = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int S = $clog2(N);

  logic                 v  [S+1];
  logic [S-1:0]         ix [S+1];
  logic signed [DW-1:0] re [S+1];
  logic signed [DW-1:0] im [S+1];

  assign v[0]  = in_valid;
  assign ix[0] = in_idx;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar k = 0; k < S; k++) begin : g_stage
    localparam int L = BITREV_IN ? (1 << k) : (N >> (k + 1));
    sdf_stage #(
      .N(N), .L(L), .DW(DW), .TW_W(TW_W), .TW_FRAC(TW_FRAC),
      .DIT(BITREV_IN), .INVERSE(INVERSE), .SCALE(INVERSE)
    ) u_stage (
      .clk, .rst_n,
      .in_valid (v[k]),   .in_idx (ix[k]),   .in_re (re[k]),   .in_im (im[k]),
      .out_valid(v[k+1]), .out_idx(ix[k+1]), .out_re(re[k+1]), .out_im(im[k+1])
    );
  end

  assign out_valid = v[S];
  assign out_idx   = ix[S];
  assign out_re    = re[S];
  assign out_im    = im[S];
endmodule
