// tb_dwt_split: random sample stream with idle gaps and line starts; every
// pair must be (even, odd) of its line and appear the clock after the odd one.
module tb_dwt_split;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, x_valid = 0, x_first = 0;
  logic signed [W-1:0] x = '0, s, d;
  logic pair_valid;
  int checks = 0, failures = 0;

  dwt_split #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] ev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a stray odd sample from a broken line must be dropped by the next x_first
    #1 x_valid = 1; x_first = 0; x = 16'sd77; @(posedge clk); #1;
    for (int ln = 0; ln < 40; ln++) begin
      automatic int len = 2 * $urandom_range(1, 10);
      for (int i = 0; i < len; i++) begin
        repeat ($urandom_range(0, 1)) begin
          x_valid = 0; @(posedge clk); #1;
          checks++; if (pair_valid) failures++;
        end
        x_valid = 1; x_first = (i == 0); x = W'($urandom);
        @(posedge clk);
        #1;
        x_valid = 0;
        if (i % 2 == 0) ev = x;
        checks++;
        if (i % 2 == 1) begin
          if (!pair_valid || s !== ev || d !== x) begin
            failures++;
            $display("line %0d sample %0d: valid=%0b s=%0d d=%0d exp %0d %0d", ln, i, pair_valid, s, d, ev, x);
          end
        end else if (pair_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
