// tb_iteration_table: checks the per-level digit-count table against a
// model array. After reset every level must read the default; then random
// writes (including out-of-range levels, which must be ignored) are
// interleaved with reads of every level (the read is combinational).
module tb_iteration_table;
  localparam int MAXL = 4, LW = 3, CW = 6, DEF = 48;
  localparam int WATCHDOG = 10000;

  logic clk = 0, rst_n = 0, we = 0;
  logic [LW-1:0] wlevel = '0, rlevel = '0;
  logic [CW-1:0] wlen = '0, rlen;
  int model [MAXL];
  int checks = 0, failures = 0;

  iteration_table #(.MAX_LEVELS(MAXL), .LW(LW), .CW(CW), .DEFAULT_LEN(DEF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int l = 0; l < 8; l++) begin
      automatic int exp = (l >= 1 && l <= MAXL) ? model[l - 1] : model[MAXL - 1];
      rlevel = LW'(l);
      #1;
      checks++;
      if (int'(rlen) != exp) begin
        failures++;
        $display("level %0d reads %0d, expected %0d", l, rlen, exp);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < MAXL; i++) model[i] = DEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      we = 1'b1;
      wlevel = LW'($urandom_range(0, 7));
      wlen = CW'($urandom_range(0, 63));
      @(posedge clk);
      if (wlevel >= 1 && wlevel <= MAXL) model[wlevel - 1] = int'(wlen);
      #1 we = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
