// sd_serializer: two's complement word -> most-significant-digit-first
// radix-2 signed-digit (SD) stream.
//
// A W-bit two's complement word b is already a signed-digit number: its MSB
// has weight -2^(W-1), so it becomes digit -1 (or 0), and every other set
// bit becomes digit +1. No arithmetic is needed; the word is shifted out
// MSB first, one digit per clock, so the stream can feed MSDF (online)
// operators. Digit encoding (dwt_pkg): 2'b01 = +1, 2'b00 = 0, 2'b10 = -1.
//
// Interface: load a word when ready is high (ready is high when idle and on
// the clock of the last digit, so words can follow back to back). Digits
// appear from the clock after load, W clocks long, with dig_first on the
// first and dig_last on the last. Read as an integer, MS digit first, the
// stream equals the word.
module sd_serializer
  import dwt_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] word,
  output logic                ready,
  output logic                dig_valid,
  output logic                dig_first,
  output logic                dig_last,
  output sd_digit_t           digit
);

  localparam int CW = $clog2(W + 1);
  logic [W-1:0]  sh;
  logic [CW-1:0] cnt;       // digits still to send, including the current one

  assign dig_valid = (cnt != '0);
  assign dig_first = (cnt == CW'(W));
  assign dig_last  = (cnt == CW'(1));
  assign ready     = (cnt == '0) || dig_last;

  always_comb begin
    if (!dig_valid || !sh[W-1]) digit = SD_ZERO;
    else if (dig_first)         digit = SD_NEG;
    else                        digit = SD_POS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= '0;
      cnt <= '0;
    end else if (load && ready) begin
      sh  <= word;
      cnt <= CW'(W);
    end else if (dig_valid) begin
      sh  <= sh << 1;
      cnt <= cnt - 1'b1;
    end
  end

endmodule
