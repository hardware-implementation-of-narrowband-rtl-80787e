// parallel_to_serial: turns each output sample into a 24-clock serial write
// to a dual 16-bit DAC (LTC2752-style SPI: CS/LD, SCK, SDI).
//
// The 4.14 fixed-point sample y is converted to a 16-bit unipolar DAC code,
// code = clamp(y * DAC_GAIN / 2^DAC_SHIFT, 0, 65535); the defaults
// (0.8 = 65536 / (5 * 2^14)) map 0..5 V to the code range, the inverse of the
// front end's 5 V / 2^18 per ADC code, so an ADC code x comes back as x / 4.
// The 24-bit word {CMD, ADDR, code} is shifted out MSB first: CS/LD falls,
// SDI changes while SCK is low and the DAC samples it on the SCK rising edge,
// and after the 24th bit CS/LD rises, which loads and updates the DAC. SCK
// runs at clk / (2*CLK_DIV). The 24 clocks per 16-bit conversion are the
// design's figure; the command/address values, the gain, the clamping and
// the one-word holding register are this design's choices.
//
// Interface: in_valid/in_data accept a sample on any clock. A sample that
// arrives while a word is being sent waits in a one-word holding register;
// one that finds that register full too is dropped and pulses `overrun`.
// `busy` is high while a word is being sent.
module parallel_to_serial
  import plc_pkg::*;
#(
  parameter int       IN_W      = FFT_DW,
  parameter int       DAC_GAIN  = 52429,
  parameter int       DAC_SHIFT = 16,
  parameter int       CLK_DIV   = 1,
  parameter logic [3:0] CMD     = 4'b0011,
  parameter logic [3:0] ADDR    = 4'b0000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   dac_cs_ld,
  output logic                   dac_sck,
  output logic                   dac_sdi,
  output logic                   busy,
  output logic                   overrun
);
  localparam int NB = DAC_BITS;
  localparam int PW = IN_W + 18;
  localparam int CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  function automatic logic [DAC_W-1:0] to_code(input logic signed [IN_W-1:0] y);
    logic signed [PW-1:0] p;
    p = (PW'(y) * PW'(DAC_GAIN)) >>> DAC_SHIFT;
    if (p < 0)                          return '0;
    else if (p > PW'((1 << DAC_W) - 1)) return '1;
    else                                return DAC_W'(p);
  endfunction

  typedef enum logic [1:0] {IDLE, LOW, HIGH, DONE} state_t;
  state_t state;

  logic [NB-1:0]    shreg;
  logic [4:0]       bits_left;
  logic [CW-1:0]    div;
  logic             pend_valid;
  logic [DAC_W-1:0] pend_code;

  wire tick = (div == CW'(CLK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      shreg      <= '0;
      bits_left  <= '0;
      div        <= '0;
      pend_valid <= 1'b0;
      pend_code  <= '0;
      dac_cs_ld  <= 1'b1;
      dac_sck    <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      // SPI rule the DAC relies on: SCK stays low while CS/LD is high
      a_sck_low_when_idle: assert (!(dac_cs_ld && dac_sck));
      overrun <= 1'b0;
      div     <= (state == IDLE || tick) ? '0 : div + CW'(1);
      // accept a new sample into the holding register
      if (in_valid) begin
        if (pend_valid && !(state == IDLE)) overrun <= 1'b1;
        else begin
          pend_valid <= 1'b1;
          pend_code  <= to_code(in_data);
        end
      end
      case (state)
        IDLE: if (pend_valid) begin
          shreg      <= {CMD, ADDR, pend_code};
          bits_left  <= 5'(NB);
          dac_cs_ld  <= 1'b0;
          dac_sck    <= 1'b0;
          state      <= LOW;
          if (!in_valid) pend_valid <= 1'b0;
          else pend_code <= to_code(in_data);
        end
        LOW: if (tick) begin
          dac_sck   <= 1'b1;
          bits_left <= bits_left - 5'd1;
          state     <= HIGH;
        end
        HIGH: if (tick) begin
          dac_sck <= 1'b0;
          shreg   <= {shreg[NB-2:0], 1'b0};
          state   <= (bits_left == 5'd0) ? DONE : LOW;
        end
        DONE: if (tick) begin
          dac_cs_ld <= 1'b1;
          state     <= IDLE;
        end
      endcase
    end
  end

  assign dac_sdi = shreg[NB-1];
  assign busy    = (state != IDLE);
endmodule
