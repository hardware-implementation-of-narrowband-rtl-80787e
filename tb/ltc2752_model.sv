// ltc2752_model: behavioural model of the serial input of a dual 16-bit DAC
// (LTC2752-style 24-bit SPI word {command, address, code}), for testbenches.
//
// While cs_ld is low, SDI is shifted in on every SCK rising edge. When cs_ld
// rises the last 24 bits received are taken as one write: `word_cnt`
// increments and `cmd`, `addr`, `code` and `bits` (the number of SCK rising
// edges seen in that frame) are updated. Not synthesizable intent: a model.
module ltc2752_model (
  input  logic        cs_ld,
  input  logic        sck,
  input  logic        sdi,
  output logic [3:0]  cmd,
  output logic [3:0]  addr,
  output logic [15:0] code,
  output int          bits,
  output int          word_cnt
);
  logic [23:0] sh = '0;
  int          n  = 0;

  initial begin
    cmd      = '0;
    addr     = '0;
    code     = '0;
    bits     = 0;
    word_cnt = 0;
  end

  always @(posedge sck) begin
    if (!cs_ld) begin
      sh <= {sh[22:0], sdi};
      n  <= n + 1;
    end
  end

  always @(negedge cs_ld) n <= 0;

  always @(posedge cs_ld) begin
    cmd      <= sh[23:20];
    addr     <= sh[19:16];
    code     <= sh[15:0];
    bits     <= n;
    word_cnt <= word_cnt + 1;
  end
endmodule
