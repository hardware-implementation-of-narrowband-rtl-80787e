// plc_pkg: widths and helpers shared by the PLC channel emulator.
//
// The emulator moves one real sample per ADC conversion through a
// frequency-domain channel: linear regression (4.14 fixed point), a 512-point
// FFT with 28-bit complex output, multiplication by a stored transfer function
// H(f), additive noise, an inverse FFT back to 28-bit samples and a serial DAC
// interface. The 18-bit ADC code, the 4.14 format, the 28-bit FFT/IFFT word and
// the 512-point size come from the design description; the 18-bit Q2.16 format
// of H(f) and of the FFT twiddle factors is this design's own choice.
package plc_pkg;

  localparam int ADC_W    = 18;   // LTC2389-18 code width
  localparam int LR_W     = 18;   // linear regression output, signed 4.14
  localparam int LR_FRAC  = 14;
  localparam int FFT_N    = 512;  // transform points
  localparam int FFT_DW   = 28;   // FFT / IFFT real and imaginary word width
  localparam int HW       = 18;   // H(f) word width, signed Q2.16
  localparam int H_FRAC   = 16;
  localparam int TWID_W   = 18;   // twiddle word width, signed Q2.16
  localparam int TWID_FRAC = 16;
  localparam int DAC_W    = 16;   // LTC2752 code width
  localparam int DAC_BITS = 24;   // serial clocks per DAC conversion

  // Saturate a wide signed value to OUT_W bits (OUT_W <= 63).
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int out_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  // Reverse the low `bits` bits of `v`.
  function automatic logic [15:0] bitrev(input logic [15:0] v, input int bits);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < 16; i++)
      if (i < bits) r[i] = v[bits - 1 - i];
    return r;
  endfunction

endpackage
