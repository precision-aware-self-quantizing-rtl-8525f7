// tb_dwt2d_top_full: the end-to-end test at the default size (480 x 640
// image, up to four levels), with the processor at its default parameters.
// Loads a synthetic image through the host port, runs a multilevel
// transform, reads the quantization indices back and compares each with the
// real-arithmetic reference (dwt_ref_pkg) quantized the same way: an index
// may differ by one where the fixed-point value lies next to a bin edge, and
// at least 90% must match exactly. A second run with a different number of
// levels and step checks the run-time configuration; a third run uses the
// digit-serial core (one level, 48 digits), and a fourth uses it for two
// levels with 44 digits at level 1 and 48 at level 2. The number of clocks from start
// to done is checked against the controller's schedule (bit-parallel: N + 13
// clocks per line of length N; digit-serial: (N+8)/2 frames of n_l clocks,
// n_l the level's digit count, per line plus a bounded drain). Each
// mechanism (row pass, column pass, symmetric extension at both ends,
// quantized write, unquantized LL write, level recursion, run-time
// reconfiguration, digit-serial words and bubble frames, change of digit
// count between levels) is counted and must occur.
module tb_dwt2d_top_full;
  import dwt_ref_pkg::*;
  localparam int ROWS = 480, COLS = 640;
  localparam int LV_A = 4, SH_A = dwt_pkg::FRAC_B + 2;  // run A: 4 levels, step 4.0 at level 1
  localparam int LV_B = 2, SH_B = dwt_pkg::FRAC_B;      // run B: 2 levels, step 1.0 at level 1
  localparam int LEN_C = 48, LEN_E = 44;                // digit-serial word lengths
  localparam int W = dwt_pkg::DATA_W, FB = dwt_pkg::FRAC_B;
  localparam int AW = $clog2(2 * ROWS * COLS);
  localparam longint WATCHDOG = 64'd40_000_000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] levels = '0;
  logic [4:0] step_shift = '0;
  logic busy, done;
  logic ds_mode = 0;
  logic it_we = 0;
  logic [2:0] it_level = '0;
  logic [5:0] it_len = '0;
  dwt_pkg::pass_t pass;
  logic host_we = 0, host_re = 0;
  logic [AW-1:0] host_waddr = '0, host_raddr = '0;
  logic signed [W-1:0] host_wdata = '0, host_rdata;

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_row_lines = 0, n_col_lines = 0, n_ext_left = 0, n_ext_right = 0;
  int n_quant = 0, n_ll_pass = 0, n_level_up = 0, n_reconfig = 0;
  int n_ds_words = 0, n_ds_bubbles = 0, n_prec_change = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitor
  always @(posedge clk) if (rst_n) begin
    if (dut.ds_out_valid) n_ds_words++;
    if (busy && dut.mode_q && dut.ds_restart && dut.len_lvl != dut.u_ds_core.len_q) n_prec_change++;
    if (dut.ds_ready && !dut.ds_valid) n_ds_bubbles++;
    if (dut.u_ctrl.line_done) begin
      if (dut.u_ctrl.pass == dwt_pkg::PASS_ROW) n_row_lines++; else n_col_lines++;
    end
    if (dut.u_ctrl.rd_en && dut.u_ctrl.i_ext < 0) n_ext_left++;
    if (dut.u_ctrl.rd_en && dut.u_ctrl.i_ext > $signed({2'b00, dut.u_ctrl.n_len}) - 1) n_ext_right++;
    if (dut.buf_we && busy && dut.wr_final && dut.u_quant.sh != 0) n_quant++;
    if (dut.buf_we && busy && !dut.wr_final && dut.pass == dwt_pkg::PASS_COL) n_ll_pass++;
    if (dut.u_ctrl.line_done && dut.u_ctrl.pass == dwt_pkg::PASS_COL &&
        dut.u_ctrl.line + 1 == dut.u_ctrl.n_lines && dut.u_ctrl.wr_level < dut.u_ctrl.levels_q)
      n_level_up++;
  end

  function automatic int pix(int r, int c);
    return (r * 7 + c * 3 + ((r * c) % 17) * 5 + (c % 5) * 9) % 256;
  endfunction

  task automatic load_image();
    for (int a = 0; a < ROWS * COLS; a++) begin
      host_we <= 1; host_waddr <= AW'(a);
      host_wdata <= W'(pix(a / COLS, a % COLS) * (1 << FB));
      @(posedge clk);
    end
    host_we <= 0;
    @(posedge clk);
  endtask

  function automatic longint expected_clocks(int lv);
    longint t = 0;
    int r = ROWS, c = COLS;
    for (int l = 1; l <= lv; l++) begin
      t += longint'(r) * (c + 13) + longint'(c) * (r + 13);
      r /= 2; c /= 2;
    end
    return t;
  endfunction

  // digit-serial schedule: lower bound and allowed drain per line
  function automatic longint ds_frames_clocks(int lv, int len1, int len_rest);
    longint t = 0;
    int r = ROWS, c = COLS, len;
    for (int l = 1; l <= lv; l++) begin
      len = (l == 1) ? len1 : len_rest;
      t += longint'(r) * ((c + 8) / 2) * len + longint'(c) * ((r + 8) / 2) * len;
      r /= 2; c /= 2;
    end
    return t;
  endfunction

  function automatic longint ds_lines(int lv);
    longint n = 0;
    int r = ROWS, c = COLS;
    for (int l = 1; l <= lv; l++) begin
      n += r + c; r /= 2; c /= 2;
    end
    return n;
  endfunction

  // load the digit count of level 1 and of the levels above it
  task automatic load_iterations(int len1, int len_rest);
    for (int l = 1; l <= 4; l++) begin
      it_we <= 1; it_level <= 3'(l); it_len <= 6'(l == 1 ? len1 : len_rest);
      @(posedge clk);
    end
    it_we <= 0;
  endtask

  task automatic run_and_check(int lv, int sh, bit ds, int len, int len_rest);
    real img [];
    longint t0, t1, exp_clk;
    int exact = 0, lvl, shl;
    longint qr, qh, diff;
    img = new[ROWS * COLS];
    for (int a = 0; a < ROWS * COLS; a++) img[a] = real'(pix(a / COLS, a % COLS));
    dwt2d(img, ROWS, COLS, lv);

    load_image();
    if (ds) load_iterations(len, len_rest);
    levels <= 3'(lv); step_shift <= 5'(sh); start <= 1;
    ds_mode <= ds;
    @(posedge clk);
    start <= 0;
    t0 = $time / 10;
    @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("busy did not rise"); end
    while (!done) @(posedge clk);
    t1 = $time / 10;
    exp_clk = ds ? ds_frames_clocks(lv, len, len_rest) : expected_clocks(lv);
    checks++;
    diff = (t1 - t0) - exp_clk;
    if (diff < 0 || diff > (ds ? ds_lines(lv) * (3 * (len > len_rest ? len : len_rest) + 20) : 4)) begin
      failures++;
      $display("levels=%0d: %0d clocks, schedule says %0d", lv, t1 - t0, exp_clk);
    end
    @(posedge clk);
    // read back: the word addressed before a clock edge is on host_rdata after it
    for (int a = 0; a < ROWS * COLS; a++) begin
      host_re <= 1; host_raddr <= AW'(a);
      @(posedge clk);
      #1;
      begin
        int p = a, r = a / COLS, c = a % COLS;
        lvl = level_of(r, c, ROWS, COLS, lv);
        shl = (sh + 1 - lvl > 0) ? sh + 1 - lvl : 0;
        qr = dz_index(img[p], shl, FB);
        qh = longint'(host_rdata);
        checks++;
        if (qh == qr) exact++;
        else if (qh - qr > 1 || qr - qh > 1) begin
          failures++;
          if (failures < 20)
            $display("(%0d,%0d) level %0d: index %0d, reference %0d (%f)", r, c, lvl, qh, qr, img[p]);
        end
      end
    end
    host_re <= 0;
    checks++;
    if (exact * 10 < ROWS * COLS * 9) begin
      failures++;
      $display("only %0d of %0d indices exact", exact, ROWS * COLS);
    end
    $display("%s levels=%0d step_shift=%0d digits=%0d/%0d: %0d clocks, %0d/%0d indices exact",
             ds ? "digit-serial" : "bit-parallel", lv, sh, len, len_rest, t1 - t0, exact, ROWS * COLS);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_and_check(LV_A, SH_A, 0, 0, 0);
    n_reconfig++;
    run_and_check(LV_B, SH_B, 0, 0, 0);
    n_reconfig++;
    run_and_check(1, SH_B, 1, LEN_C, LEN_C);
    run_and_check(2, SH_A, 1, LEN_E, LEN_C);
    $display("row lines %0d, column lines %0d, left ext %0d, right ext %0d, quantized %0d, LL kept %0d, level steps %0d, reconfigs %0d",
             n_row_lines, n_col_lines, n_ext_left, n_ext_right, n_quant, n_ll_pass, n_level_up, n_reconfig);
    $display("digit-serial words %0d, bubble frames %0d, precision changes %0d",
             n_ds_words, n_ds_bubbles, n_prec_change);
    checks++; if (n_prec_change == 0) failures++;
    checks++; if (n_ds_words == 0) failures++;
    checks++; if (n_ds_bubbles == 0) failures++;
    checks++; if (n_row_lines == 0) failures++;
    checks++; if (n_col_lines == 0) failures++;
    checks++; if (n_ext_left == 0) failures++;
    checks++; if (n_ext_right == 0) failures++;
    checks++; if (n_quant == 0) failures++;
    checks++; if (n_ll_pass == 0) failures++;
    checks++; if (n_level_up == 0) failures++;
    checks++; if (n_reconfig == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
