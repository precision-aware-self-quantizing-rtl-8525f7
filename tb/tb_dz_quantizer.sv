// tb_dz_quantizer: random values, step exponents and levels against integer
// division (which rounds toward zero) by the step 2^max(0, step_shift-level+1).
module tb_dz_quantizer;
  localparam int W = 28;
  logic quant;
  logic [4:0] step_shift;
  logic [2:0] level;
  logic signed [W-1:0] y, q;
  int checks = 0, failures = 0, n_dead = 0;

  dz_quantizer #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint yy, step, e;
    int sh;
    for (int i = 0; i < 4000; i++) begin
      quant = ($urandom_range(0, 3) != 0);
      step_shift = 5'($urandom_range(0, 20));
      level = 3'($urandom_range(1, 4));
      yy = longint'($signed($urandom_range(0, 1 << 24))) - (1 << 23);
      if (i < 8) yy = (i % 2) ? -longint'(i) : longint'(i);   // near zero
      y = W'(yy);
      #1;
      sh = int'(step_shift) - int'(level) + 1;
      if (sh < 0) sh = 0;
      step = longint'(1) << sh;
      e = quant ? yy / step : yy;
      if (quant && e == 0 && yy != 0) n_dead++;
      checks++;
      if (longint'(q) != e) begin
        failures++;
        $display("y=%0d shift=%0d level=%0d quant=%0b: q=%0d exp %0d", yy, step_shift, level, quant, q, e);
      end
    end
    checks++;
    if (n_dead == 0) failures++;   // the dead zone must have been exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
