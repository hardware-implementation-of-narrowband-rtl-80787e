// sdf_stage: one radix-2 single-path delay-feedback (SDF) butterfly stage.
//
// A stream of complex samples enters one per in_valid, tagged with its
// position in_idx inside the N-sample frame. The stage pairs the samples at
// positions p and p+L (L = delay length) through an L-word feedback memory:
// during the first half of each 2L-sample group it stores the incoming sample
// and emits the difference kept from the previous group; during the second
// half it forms the butterfly of the stored sample and the incoming one, emits
// the sum and stores the difference. Every output is thus the result for
// position in_idx - L, which is what out_idx carries.
//
// DIT = 0 (decimation in frequency): the difference is multiplied by the
// twiddle factor on its way out. DIT = 1 (decimation in time): the incoming
// second-half sample is multiplied by the twiddle factor before the
// butterfly. The twiddle for the pair with offset m in its half is
// exp(-j*pi*m/L) (exp(+j*pi*m/L) when INVERSE = 1), taken from a table of L
// entries computed at elaboration. SCALE = 1 halves both butterfly outputs
// (arithmetic shift, i.e. truncation), giving the 1/N of the inverse
// transform over log2(N) stages. Results saturate to DW bits.
//
// The feedback memory is read asynchronously and written on the same clock
// (read-before-write), which maps to distributed RAM or registers.
//
// Timing: out_valid/out_* are registered, one clock after in_valid; the stage
// advances only on in_valid, so samples may arrive on any clock. The SDF
// organisation, Q2.16 twiddles and truncating scale are this design's choice;
// the streaming radix-2 pipeline it implements is what the design describes.
module sdf_stage
  import plc_pkg::*;
#(
  parameter int N       = FFT_N,
  parameter int L       = FFT_N / 2,
  parameter int DW      = FFT_DW,
  parameter int TW_W    = TWID_W,
  parameter int TW_FRAC = TWID_FRAC,
  parameter bit DIT     = 1'b0,
  parameter bit INVERSE = 1'b0,
  parameter bit SCALE   = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(N)-1:0]   in_idx,
  input  logic signed [DW-1:0]   in_re,
  input  logic signed [DW-1:0]   in_im,
  output logic                   out_valid,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im
);
  localparam int LOGN = $clog2(N);
  localparam int LL   = (L > 1) ? $clog2(L) : 1;
  localparam int PW   = DW + TW_W + 2;   // twiddle product width
  localparam int BW   = DW + 2;          // butterfly width
  localparam real PI  = 3.141592653589793;

  // ---------------- twiddle table: cos and sin of pi*m/L ----------------
  logic signed [TW_W-1:0] tw_cos [L];
  logic signed [TW_W-1:0] tw_sin [L];
  for (genvar m = 0; m < L; m++) begin : g_tw
    localparam real ANG = PI * m / L;
    assign tw_cos[m] = TW_W'($rtoi($floor($cos(ANG) * (2.0 ** TW_FRAC) + 0.5)));
    assign tw_sin[m] = TW_W'($rtoi($floor($sin(ANG) * (2.0 ** TW_FRAC) + 0.5)));
  end

  // ---------------- feedback memory ----------------
  logic signed [DW-1:0] mem_re [L];
  logic signed [DW-1:0] mem_im [L];

  logic [LL-1:0] addr;
  logic          second_half;
  assign addr        = (L > 1) ? LL'(in_idx) : '0;
  assign second_half = in_idx[$clog2(L)];

  logic signed [DW-1:0] a_re, a_im;
  assign a_re = mem_re[addr];
  assign a_im = mem_im[addr];

  // x * W with W = c -/+ j s, rounded back to the data scale
  function automatic logic signed [BW-1:0] rot_re(input logic signed [DW-1:0] xr, xi,
                                                  input logic signed [TW_W-1:0] c, s);
    logic signed [PW-1:0] p;
    if (INVERSE) p = PW'(xr) * PW'(c) - PW'(xi) * PW'(s);
    else         p = PW'(xr) * PW'(c) + PW'(xi) * PW'(s);
    p = (p + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    return BW'(p);
  endfunction

  function automatic logic signed [BW-1:0] rot_im(input logic signed [DW-1:0] xr, xi,
                                                  input logic signed [TW_W-1:0] c, s);
    logic signed [PW-1:0] p;
    if (INVERSE) p = PW'(xi) * PW'(c) + PW'(xr) * PW'(s);
    else         p = PW'(xi) * PW'(c) - PW'(xr) * PW'(s);
    p = (p + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    return BW'(p);
  endfunction

  function automatic logic signed [DW-1:0] fit(input logic signed [BW-1:0] v, input bit half);
    logic signed [BW-1:0] h;
    h = half ? (v >>> 1) : v;
    return DW'(sat_s(64'(h), DW));
  endfunction

  logic signed [TW_W-1:0] c, s;
  assign c = tw_cos[addr];
  assign s = tw_sin[addr];

  logic signed [BW-1:0] b_re, b_im;      // second butterfly input
  logic signed [BW-1:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [DW-1:0] nxt_re, nxt_im, wr_re, wr_im;

  always_comb begin
    if (DIT) begin
      b_re = rot_re(in_re, in_im, c, s);
      b_im = rot_im(in_re, in_im, c, s);
    end else begin
      b_re = BW'(in_re);
      b_im = BW'(in_im);
    end
    sum_re = BW'(a_re) + b_re;
    sum_im = BW'(a_im) + b_im;
    dif_re = BW'(a_re) - b_re;
    dif_im = BW'(a_im) - b_im;
    if (second_half) begin
      nxt_re = fit(sum_re, SCALE);
      nxt_im = fit(sum_im, SCALE);
      wr_re  = fit(dif_re, SCALE);
      wr_im  = fit(dif_im, SCALE);
    end else begin
      if (DIT) begin
        nxt_re = a_re;
        nxt_im = a_im;
      end else begin
        nxt_re = fit(rot_re(a_re, a_im, c, s), 1'b0);
        nxt_im = fit(rot_im(a_re, a_im, c, s), 1'b0);
      end
      wr_re = in_re;
      wr_im = in_im;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[addr] <= wr_re;
      mem_im[addr] <= wr_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx - LOGN'(L);
        out_re  <= nxt_re;
        out_im  <= nxt_im;
      end
    end
  end
endmodule
