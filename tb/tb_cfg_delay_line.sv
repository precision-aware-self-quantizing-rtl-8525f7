// tb_cfg_delay_line: random data and random tap changes; q must equal the
// input of `delay` enabled clocks ago (or the current input for delay 0).
module tb_cfg_delay_line;
  localparam int DW = 8, MAXD = 20, SW = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic [SW-1:0] delay = '0;
  logic [DW-1:0] d = '0, q;
  int checks = 0, failures = 0;

  cfg_delay_line #(.DW(DW), .MAX_DELAY(MAXD), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] hist [$];   // hist[0] = most recent enabled input
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < MAXD; i++) hist.push_front('0);
    for (int i = 0; i < 3000; i++) begin
      logic [DW-1:0] e;
      if (i % 50 == 0) delay = SW'($urandom_range(0, MAXD));
      en = ($urandom_range(0, 4) != 0);
      d = DW'($urandom);
      #1;
      e = (delay == 0) ? d : hist[delay - 1];
      checks++;
      if (q !== e) begin failures++; $display("delay %0d: q=%0d exp %0d", delay, q, e); end
      @(posedge clk); #1;
      if (en) begin hist.push_front(d); void'(hist.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
