// complex_multiplier: frequency-domain convolution M = H * Y.
//
// With H = a + jb (transfer function, signed Q2.16) and Y = c + jd (FFT bin),
// M = (ac - bd) + j(bc + ad). Each of the four products is a product_term
// (sign converters, unsigned multiplier, sign corrector); the b*d term uses
// the corrector that already negates it, so the two adders only add. The sums
// are rounded to the Y scale (drop H_FRAC fraction bits, round half up) and
// saturated to OUT_W bits. The product-term structure and the two adders
// follow the design description; rounding and saturation are this design's
// choice.
//
// Timing: registered, out_valid and m_* one clock after in_valid.
module complex_multiplier
  import plc_pkg::*;
#(
  parameter int YW     = FFT_DW,
  parameter int HWID   = HW,
  parameter int FRAC   = H_FRAC,
  parameter int OUT_W  = FFT_DW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [HWID-1:0]  h_re,    // a
  input  logic signed [HWID-1:0]  h_im,    // b
  input  logic signed [YW-1:0]    y_re,    // c
  input  logic signed [YW-1:0]    y_im,    // d
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] m_re,
  output logic signed [OUT_W-1:0] m_im
);
  localparam int PW = HWID + YW;

  logic signed [PW-1:0] ac, nbd, bc, ad;
  logic signed [PW:0]   sum_re, sum_im;

  product_term #(.WA(HWID), .WB(YW), .NEG_ON_SAME(1'b0)) u_ac (.a(h_re), .b(y_re), .p(ac));
  product_term #(.WA(HWID), .WB(YW), .NEG_ON_SAME(1'b1)) u_bd (.a(h_im), .b(y_im), .p(nbd));
  product_term #(.WA(HWID), .WB(YW), .NEG_ON_SAME(1'b0)) u_bc (.a(h_im), .b(y_re), .p(bc));
  product_term #(.WA(HWID), .WB(YW), .NEG_ON_SAME(1'b0)) u_ad (.a(h_re), .b(y_im), .p(ad));

  // the two adders of the real and imaginary parts
  assign sum_re = (PW+1)'(ac) + (PW+1)'(nbd);
  assign sum_im = (PW+1)'(bc) + (PW+1)'(ad);

  function automatic logic signed [OUT_W-1:0] scale(input logic signed [PW:0] v);
    logic signed [PW:0] r;
    r = (v + (PW+1)'(1 << (FRAC - 1))) >>> FRAC;
    return OUT_W'(sat_s(64'(r), OUT_W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      m_re      <= '0;
      m_im      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        m_re <= scale(sum_re);
        m_im <= scale(sum_im);
      end
    end
  end
endmodule
