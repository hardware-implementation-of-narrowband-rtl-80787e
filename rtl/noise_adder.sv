// noise_adder: adds a noise sample to a signal sample, saturating.
//
// One instance per real component: two add the AWGN to the real and imaginary
// parts of the filtered spectrum, one adds the impulsive noise to the
// time-domain output. When the sum leaves the W-bit range it is clipped to
// the nearest end instead of wrapping (this design's choice).
//
// Timing: registered, out_valid/sum one clock after in_valid.
module noise_adder
  import plc_pkg::*;
#(
  parameter int W = FFT_DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] signal,
  input  logic signed [W-1:0] noise,
  output logic                out_valid,
  output logic signed [W-1:0] sum
);
  logic signed [W:0] s;
  assign s = (W+1)'(signal) + (W+1)'(noise);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        sum <= W'(sat_s(64'(s), W));
    end
  end
endmodule
