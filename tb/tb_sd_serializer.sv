// tb_sd_serializer: random words, loaded back to back and with gaps; the
// digit stream read as an integer must equal the word, with first/last
// flags on the right digits and W digits per word.
module tb_sd_serializer;
  import dwt_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [W-1:0] word = '0;
  logic ready, dig_valid, dig_first, dig_last;
  sd_digit_t digit;
  int checks = 0, failures = 0;

  sd_serializer #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [W-1:0] sent [$];
  // collector
  longint acc; int nd;
  always @(posedge clk) if (rst_n && dig_valid) begin
    if (dig_first) begin acc = 0; nd = 0; end
    acc = 2 * acc + sd_value(digit);
    nd++;
    if (dig_last) begin
      checks++;
      if (sent.size() == 0 || nd != W || acc != longint'(sent[0])) begin
        failures++;
        $display("word %0d digits %0d, expected %0d", acc, nd, sent.size() ? sent[0] : 0);
      end
      if (sent.size()) void'(sent.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic signed [W-1:0] wv;
      wv = (i == 0) ? W'(-32768) : (i == 1) ? W'(32767) : W'($urandom);
      while (!ready) begin @(posedge clk); #1; end
      load = 1; word = wv;
      sent.push_back(wv);
      @(posedge clk); #1;
      load = 0;
      if ($urandom_range(0, 1)) repeat ($urandom_range(1, 20)) begin @(posedge clk); #1; end
    end
    repeat (W + 3) @(posedge clk);
    checks++;
    if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
