// tb_sd_deserializer: random SD digit strings (including all -1 and all +1);
// the word must equal sum d_k 2^(ND-1-k) and be valid the clock after the
// last digit.
module tb_sd_deserializer;
  import dwt_pkg::*;
  localparam int ND = 12;
  logic clk = 0, rst_n = 0, dig_valid = 0, dig_first = 0;
  sd_digit_t digit = SD_ZERO;
  logic word_valid;
  logic signed [ND:0] word;
  int checks = 0, failures = 0;

  logic [3:0] len = 4'(ND);
  sd_deserializer #(.ND(ND)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      e = 0;
      for (int k = 0; k < ND; k++) begin
        int dv = (i == 0) ? -1 : (i == 1) ? 1 : int'($urandom_range(0, 2)) - 1;
        e = 2 * e + dv;
        dig_valid = 1; dig_first = (k == 0); digit = sd_encode(dv);
        @(posedge clk); #1;
        dig_valid = 0;
        checks++;
        if (word_valid != (k == ND - 1)) failures++;
        if (k == ND - 1 && longint'(word) != e) begin
          failures++; $display("word %0d expected %0d", word, e);
        end
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
