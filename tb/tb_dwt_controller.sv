// tb_dwt_controller: runs the controller alone with a stand-in for the
// splitter and core (a pair result two clocks after the odd sample, tagged
// with a running pair number). Checks the full read-address sequence
// (row and column passes, both banks, symmetric extension), every write
// (address, data tag, final flag, level), x_first, and done.
module tb_dwt_controller;
  import dwt_pkg::*;
  localparam int ROWS = 12, COLS = 16, MAXL = 3, LV = 2, W = 28;
  localparam int AW = $clog2(2 * ROWS * COLS);
  localparam int BANK = ROWS * COLS;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] levels = 3'(LV);
  logic busy, done, rd_en, x_valid, x_first, c_valid = 0;
  logic allow_even = 1'b1, allow_odd = 1'b1;
  logic [AW-1:0] rd_addr, wr_addr;
  logic signed [W-1:0] c_s = '0, c_d = '0, wr_data;
  logic wr_en, wr_final;
  logic [2:0] wr_level;
  pass_t pass;
  int checks = 0, failures = 0;

  dwt_controller #(.W(W), .ROWS(ROWS), .COLS(COLS), .MAX_LEVELS(MAXL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int addr; int data; bit fin; int lvl; } wr_t;
  int  exp_rd [$];
  bit  exp_first [$];
  wr_t exp_wr [$];

  function automatic int mir(int i, int n);
    return (i < 0) ? -i : (i > n - 1) ? 2 * (n - 1) - i : i;
  endfunction

  // expected sequences
  initial begin
    automatic int r_l = ROWS, c_l = COLS, p = 0;
    for (int l = 1; l <= LV; l++) begin
      for (int ps = 0; ps < 2; ps++) begin
        automatic int nl = ps ? c_l : r_l, n = ps ? r_l : c_l;
        for (int ln = 0; ln < nl; ln++) begin
          for (int j = 0; j < n + 8; j++) begin
            automatic int idx = mir(j - 4, n);
            exp_rd.push_back(ps ? BANK + idx * COLS + ln : ln * COLS + idx);
            exp_first.push_back(j == 0);
          end
          for (int q = 0; q < n / 2 + 4; q++, p++) begin
            if (q >= 4) begin
              automatic int k = q - 4;
              automatic wr_t ws, wd;
              ws.addr = ps ? k * COLS + ln : BANK + ln * COLS + k;
              wd.addr = ps ? (n / 2 + k) * COLS + ln : BANK + ln * COLS + n / 2 + k;
              ws.data = 2 * p; wd.data = 2 * p + 1;
              ws.fin = ps && (ln >= c_l / 2 || l == LV);
              wd.fin = ps;
              ws.lvl = l; wd.lvl = l;
              exp_wr.push_back(ws); exp_wr.push_back(wd);
            end
          end
        end
      end
      r_l /= 2; c_l /= 2;
    end
  end

  // stand-in for splitter + core
  int pair_no = 0, nsamp = 0;
  logic v1 = 0;
  logic signed [W-1:0] t1;
  always @(posedge clk) begin
    c_valid <= v1; c_s <= t1; c_d <= t1 + 1;
    v1 <= 0;
    if (x_valid) begin
      if (x_first) nsamp = 0;
      if (nsamp % 2 == 1) begin v1 <= 1; t1 <= W'(2 * pair_no); pair_no++; end
      nsamp++;
    end
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      checks++;
      if (exp_rd.size() == 0 || rd_addr != AW'(exp_rd[0])) begin
        failures++;
        if (failures < 10) $display("read %0d, expected %0d", rd_addr, exp_rd.size() ? exp_rd[0] : -1);
      end
      if (exp_rd.size()) void'(exp_rd.pop_front());
    end
    if (x_valid) begin
      checks++;
      if (exp_first.size() == 0 || x_first != exp_first[0]) begin
        failures++;
        if (failures < 10) $display("x_first %0b at %0t", x_first, $time);
      end
      if (exp_first.size()) void'(exp_first.pop_front());
    end
    if (wr_en) begin
      checks++;
      if (exp_wr.size() == 0 || wr_addr != AW'(exp_wr[0].addr) || wr_data != W'(exp_wr[0].data) ||
          wr_final != exp_wr[0].fin || int'(wr_level) != exp_wr[0].lvl) begin
        failures++;
        if (failures < 10 && exp_wr.size())
          $display("write %0d <= %0d fin %0b lvl %0d, expected %0d <= %0d fin %0b lvl %0d", wr_addr, wr_data,
                   wr_final, wr_level, exp_wr[0].addr, exp_wr[0].data, exp_wr[0].fin, exp_wr[0].lvl);
      end
      if (exp_wr.size()) void'(exp_wr.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (exp_rd.size() != 0 || exp_wr.size() != 0) begin
      failures++;
      $display("%0d reads and %0d writes missing", exp_rd.size(), exp_wr.size());
    end
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
