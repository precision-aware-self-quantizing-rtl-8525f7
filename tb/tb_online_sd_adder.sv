// tb_online_sd_adder: frames of L digits (last two zero), sent back to back;
// the output frame read as an integer must equal (X + Y) / 4 exactly. The
// first output digit of a frame must come one clock after the first input.
module tb_online_sd_adder;
  import dwt_pkg::*;
  localparam int L = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  sd_digit_t x = SD_ZERO, y = SD_ZERO, z;
  logic out_valid, out_first;
  int checks = 0, failures = 0;

  online_sd_adder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];
  longint acc; int nd = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_first) begin acc = 0; nd = 0; end
    acc = 2 * acc + sd_value(z);
    nd++;
    if (nd == L) begin
      checks++;
      if (exp_q.size() == 0 || acc != exp_q[0]) begin
        failures++; $display("sum %0d expected %0d", acc, exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    longint xs, ys;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      xs = 0; ys = 0;
      for (int k = 0; k < L; k++) begin
        int xv, yv;
        xv = (k >= L - 2) ? 0 : (f == 0) ? -1 : (f == 1) ? 1 : int'($urandom_range(0, 2)) - 1;
        yv = (k >= L - 2) ? 0 : (f == 0) ? -1 : (f == 1) ? 1 : int'($urandom_range(0, 2)) - 1;
        xs = 2 * xs + xv; ys = 2 * ys + yv;
        in_valid = 1; in_first = (k == 0); x = sd_encode(xv); y = sd_encode(yv);
        @(posedge clk); #1;
        if (k == 0) begin
          checks++;
          if (!(out_valid && out_first)) failures++;
        end
      end
      exp_q.push_back((xs + ys) / 4);
      if (f % 7 == 0) begin in_valid = 0; repeat (3) @(posedge clk); #1; end
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
