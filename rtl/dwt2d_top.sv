// dwt2d_top: multilevel 2-D 9/7 DWT processor with self-quantizing output.
//
// Blocks: a dual-port buffer holding two images (raw / intermediate /
// final), the controller that runs row and column passes over a run-time
// number of levels, the sample splitter, two interchangeable 1-D cores
// (the bit-parallel flipping-structure core and the digit-serial core,
// selected per run), and the dead-zone quantizer on the write path, which turns every
// final coefficient into its quantization index as it is written. No
// separate quantization pass follows the transform.
//
// Use: while busy is low, load the image into bank 0 through the host write
// port (address r*COLS + c, value in the data format: FRAC_B fractional
// bits). Pulse start with levels (1..MAX_LEVELS) and step_shift (log2 of the
// quantization step at level 1, in LSBs of the data format; the step halves
// with each further level). done pulses when the transform is complete;
// then read the coefficient indices from bank 0 through the host read port
// (one clock read latency). Subband layout is dyadic: at level L the LL
// region is the top-left (ROWS>>L) x (COLS>>L) block, HL to its right, LH
// below it, HH diagonal. ROWS>>(levels-1) and COLS>>(levels-1) must be even
// and at least 6.
//
// Core choice (sampled with start): ds_mode = 0 uses the bit-parallel core,
// one sample per clock, about sum over levels of R_l*(C_l+13) + C_l*(R_l+13)
// clocks. ds_mode = 1 uses the digit-serial core with n_l digits per word
// at level l (W..DS_LMAX), taken from the iteration table, which the host
// writes while idle (it_we/it_level/it_len; every entry is DS_LMAX after
// reset): one sample pair per n_l clocks, so roughly n_l/2 times slower;
// the output LSB is 2^(W+13-n_l) data LSBs for s and 2^(W+10-n_l) for d, so
// fewer digits give less precision in less time on the same hardware. Both cores
// feed the same quantizer and buffer. The choice between a fixed
// bit-parallel core and a run-time-configurable digit-serial one is the
// document's; offering both behind one controller is this design's own.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int W          = DATA_W,
  parameter int ROWS       = 480,
  parameter int COLS       = 640,
  parameter int MAX_LEVELS = 4,
  parameter int LW         = 3,
  parameter int SW         = 5,
  parameter int AW         = $clog2(2 * ROWS * COLS),
  parameter int DS_LMAX    = 48,
  parameter int DS_LW      = $clog2(DS_LMAX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LW-1:0]       levels,
  input  logic [SW-1:0]       step_shift,
  input  logic                ds_mode,
  // digit-serial iterations per level, written while idle
  input  logic                it_we,
  input  logic [LW-1:0]       it_level,
  input  logic [DS_LW-1:0]    it_len,
  output logic                busy,
  output logic                done,
  output pass_t               pass,
  // host access to the buffer while idle
  input  logic                host_we,
  input  logic [AW-1:0]       host_waddr,
  input  logic signed [W-1:0] host_wdata,
  input  logic                host_re,
  input  logic [AW-1:0]       host_raddr,
  output logic signed [W-1:0] host_rdata
);

  logic                rd_en, x_valid, x_first;
  logic [AW-1:0]       rd_addr;
  logic                pair_valid, c_valid;
  logic signed [W-1:0] sp_s, sp_d, c_s, c_d;
  logic                wr_en, wr_final;
  logic [AW-1:0]       wr_addr;
  logic signed [W-1:0] wr_data, q_data;
  logic [LW-1:0]       wr_level;

  logic                buf_we, buf_re;
  logic [AW-1:0]       buf_waddr, buf_raddr;
  logic [W-1:0]        buf_wdata, buf_rdata;
  logic [SW-1:0]       step_q;

  logic                mode_q;
  logic [DS_LW-1:0]    len_lvl;
  logic [LW-1:0]       lvl_seen;
  logic                ds_restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= '0; mode_q <= 1'b0;
    end else if (start && !busy) begin
      step_q <= step_shift; mode_q <= ds_mode;
    end
  end

  // Digit count of the level being computed. When the level changes, the
  // digit-serial core is stopped for one clock (no read is issued in it)
  // and restarts with the new count; all results of the previous level have
  // been written by then.
  iteration_table #(.MAX_LEVELS(MAX_LEVELS), .LW(LW), .CW(DS_LW),
                    .DEFAULT_LEN(DS_LMAX)) u_iter (
    .clk, .rst_n, .we(it_we && !busy), .wlevel(it_level), .wlen(it_len),
    .rlevel(wr_level), .rlen(len_lvl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lvl_seen <= LW'(1);
    else        lvl_seen <= wr_level;
  end
  assign ds_restart = (wr_level != lvl_seen);

  // Digit-serial core: runs while busy in ds_mode. The even sample of a
  // pair is read 3 clocks and the odd one 2 clocks before the frame starts,
  // so the splitter presents the pair exactly on in_ready.
  logic                ds_ready, ds_valid, ds_out_valid;
  logic [DS_LW-1:0]    ds_pos;
  logic signed [DS_LMAX:0] ds_s, ds_d;
  logic                allow_even, allow_odd;
  logic                bp_valid;
  logic signed [W-1:0] bp_s, bp_d;

  assign allow_even = !mode_q || (!ds_restart && ds_pos == len_lvl - DS_LW'(3));
  assign allow_odd  = !mode_q || (!ds_restart && ds_pos == len_lvl - DS_LW'(2));
  assign ds_valid   = pair_valid && mode_q;

  dwt_controller #(.W(W), .ROWS(ROWS), .COLS(COLS), .MAX_LEVELS(MAX_LEVELS),
                   .LW(LW), .AW(AW)) u_ctrl (
    .clk, .rst_n, .start(start && !busy), .levels, .busy, .done,
    .allow_even, .allow_odd,
    .rd_en, .rd_addr, .x_valid, .x_first,
    .c_valid, .c_s, .c_d,
    .wr_en, .wr_addr, .wr_data, .wr_final, .wr_level,
    .pass
  );

  dwt_split #(.W(W)) u_split (
    .clk, .rst_n, .x_valid, .x_first, .x(buf_rdata),
    .pair_valid, .s(sp_s), .d(sp_d)
  );

  dwt97_bp_core #(.W(W)) u_core (
    .clk, .rst_n, .in_valid(pair_valid && !mode_q), .s_in(sp_s), .d_in(sp_d),
    .out_valid(bp_valid), .s_out(bp_s), .d_out(bp_d)
  );

  ds_dwt97_core #(.WI(W), .LMAX(DS_LMAX), .F(24), .LW(DS_LW)) u_ds_core (
    .clk, .rst_n, .run(busy && mode_q && !ds_restart), .len(len_lvl),
    .in_ready(ds_ready), .frame_pos(ds_pos), .in_valid(ds_valid),
    .s_in(sp_s), .d_in(sp_d),
    .out_valid(ds_out_valid), .s_out(ds_s), .d_out(ds_d)
  );

  // Bring the digit-serial results to the data format (truncation).
  always_comb begin
    if (mode_q) begin
      c_valid = ds_out_valid;
      c_s     = W'(ds_s >>> (DS_LMAX - W - 13));
      c_d     = W'(ds_d >>> (DS_LMAX - W - 10));
    end else begin
      c_valid = bp_valid;
      c_s     = bp_s;
      c_d     = bp_d;
    end
  end

  dz_quantizer #(.W(W), .SW(SW), .LW(LW)) u_quant (
    .quant(wr_final), .step_shift(step_q), .level(wr_level),
    .y(wr_data), .q(q_data)
  );

  // Port ownership: the controller while busy, the host otherwise.
  always_comb begin
    buf_we    = busy ? wr_en   : host_we;
    buf_waddr = busy ? wr_addr : host_waddr;
    buf_wdata = busy ? q_data  : host_wdata;
    buf_re    = busy ? rd_en   : host_re;
    buf_raddr = busy ? rd_addr : host_raddr;
  end

  dp_buffer #(.W(W), .DEPTH(2 * ROWS * COLS), .AW(AW)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .re(buf_re), .raddr(buf_raddr), .rdata(buf_rdata)
  );

  assign host_rdata = buf_rdata;

endmodule
