// sd_deserializer: MSDF radix-2 signed-digit stream -> two's complement word.
//
// Accumulates acc = 2*acc + digit over `len` digits (run-time, 1..ND),
// starting afresh at dig_first, and presents the integer value of the digit
// string as an (ND+1)-bit two's complement word (an ND-digit SD number lies
// in [-(2^ND-1), 2^ND-1]). The subtraction of the negative digits happens in
// the accumulator adder as the digits arrive, so the word is ready the clock
// after its last digit (word_valid for one clock). Digits outside a word
// (before the next dig_first) are ignored.
module sd_deserializer
  import dwt_pkg::*;
#(
  parameter int ND = 16,
  parameter int CW = $clog2(ND + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dig_valid,
  input  logic               dig_first,
  input  logic [CW-1:0]      len,        // digits per word, 1..ND
  input  sd_digit_t          digit,
  output logic               word_valid,
  output logic signed [ND:0] word
);

  logic signed [ND:0] acc, nxt;
  logic [CW-1:0]      cnt;      // digits received in this word
  logic signed [1:0]  dv;

  always_comb begin
    dv  = (digit == SD_POS) ? 2'sd1 : (digit == SD_NEG) ? -2'sd1 : 2'sd0;
    nxt = (dig_first ? '0 : (acc <<< 1)) + (ND+1)'(dv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; word <= '0; word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (dig_valid && (dig_first || cnt != '0)) begin
        acc <= nxt;
        cnt <= dig_first ? CW'(1) : cnt + 1'b1;
        if ((dig_first && len == CW'(1)) || (!dig_first && cnt == len - 1'b1)) begin
          word       <= nxt;
          word_valid <= 1'b1;
          cnt        <= '0;
        end
      end
    end
  end

endmodule
