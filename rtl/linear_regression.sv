// linear_regression: converts a raw ADC code into the voltage it stands for.
//
// The ADC produces a code per step without regard to the signal's real value;
// this block maps code x to y = (x * LR_MUL) >> LR_SHIFT, a signed 4.14
// fixed-point voltage (1 sign bit, 3 integer bits, 14 fraction bits), and
// truncates toward zero. With the defaults (5/16 = 0.3125) a code step is
// 5 V / 2^18 = 19.07 uV, and y is that voltage times 2^14: codes 1..10 give
// 0,0,0,1,1,1,2,2,2,3, the conversion table the design follows. The 4.14
// format and the table are from the design description; the straight-line
// form with a power-of-two divider and the rounding by truncation are this
// design's choice (the printed straight-line equation does not reproduce the
// table, the table was followed).
//
// With the defaults the largest result is 81919 (5.0 V), so the sign bit of
// out_y is always 0; it is kept for the signed 4.14 format.
//
// Interface: in_valid/in_code in, out_valid/out_y one clock later.
// Reset is asynchronous, active low.
module linear_regression
  import plc_pkg::*;
#(
  parameter int IN_W     = ADC_W,
  parameter int OUT_W    = LR_W,
  parameter int LR_MUL   = 5,
  parameter int LR_SHIFT = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in_code,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_y
);
  localparam int MW = IN_W + 8;

  logic [MW-1:0] prod;
  assign prod = MW'(in_code) * MW'(LR_MUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_y <= OUT_W'(prod >> LR_SHIFT);
    end
  end
endmodule
