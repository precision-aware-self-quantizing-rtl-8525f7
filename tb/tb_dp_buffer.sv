// tb_dp_buffer: random simultaneous reads and writes against an associative
// array; a read returns the word as it was before a write in the same clock.
module tb_dp_buffer;
  localparam int W = 28, DEPTH = 200, AW = 8;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [int];

  dp_buffer #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    logic exp_v;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1; waddr <= AW'(a); wdata <= W'($urandom); @(posedge clk);
      model[a] = wdata;
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int wa = $urandom_range(0, DEPTH - 1), ra = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 3) == 0) ra = wa;
      we <= $urandom_range(0, 1); waddr <= AW'(wa); wdata <= W'($urandom);
      re <= 1; raddr <= AW'(ra);
      #1;
      exp_q = model[ra];
      @(posedge clk);
      #1;
      if (we) model[wa] = wdata;
      checks++;
      if (rdata !== exp_q) begin
        failures++; $display("read %0d: %h exp %h", ra, rdata, exp_q);
      end
    end
    // re low holds the last read word
    exp_v = 1'b1; exp_q = rdata;
    re <= 0; raddr <= AW'(0); @(posedge clk); #1;
    checks++; if (rdata !== exp_q) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
