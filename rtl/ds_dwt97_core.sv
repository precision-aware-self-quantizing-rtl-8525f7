// ds_dwt97_core: digit-serial 1-D 9/7 wavelet transform (flipping structure)
// in radix-2 signed-digit online arithmetic.
//
// Words travel as frames of `len` digits, most significant digit first, one
// digit per clock; `len` (the number of iterations) is set at run time and
// sets the precision: every operator works on exactly `len` digits and
// drops what falls beyond the frame. Each clock-`len` frame takes one even
// and one odd input sample (two's complement, serialised into SD digits)
// and yields one low-pass and one high-pass coefficient, converted back to
// two's complement.
//
// Datapath: the flipping structure of the bit-parallel core, built from
// online adders (output = (x+y)/4 of the frame, delay 1 clock), online
// constant multipliers (output = x*C/2^K, delay 1 clock), word delays z^-1
// (configurable delay lines tapped at `len`), and digit delays. The binary
// point is tracked per node as a scale exponent; a right shift by m digits
// (the >>4 and >>1 of the structure, and the alignment of adder operands)
// is either a relabelling of that exponent or a delay of m digits with the
// first m digits of the frame forced to zero, so no variable shifter is
// needed. Node offsets (clock of the first digit after the input frame) and
// scale exponents r (real value = frame integer * 2^(r + WI - len)):
//   s, d, s_q, d_q: 0/0   D2: 1/2   D0: 1/1 -> 1/2   D3: 2/4
//   D1: 1/1 -> 3/2   D4: 3/2   D5: 4/4   D6: 3/5 -> 5/5   D7: 5/5
//   D9: 6/7   D8: 5/5 -> 7/8   D10: 7/8   D11: 8/10
//   s: 9/13   d: 7/10 -> 9/10
// so the datapath is nine digit stages deep. Both results are deserialised
// and aligned to LMAX digits:
//   low-pass  = s_out * 2^(WI - LMAX + 13), high-pass = d_out * 2^(WI - LMAX + 10)
// in units of the input LSB. With m the index of a frame, the word produced
// from frame m is the coefficient pair of index m-2 (as in the bit-parallel
// core); it appears len + 10 clocks after in_ready of frame m.
//
// Interface: hold run high to operate; len (WI..LMAX, at least 12) is
// sampled on the clock run rises. in_ready pulses at the start of every
// frame; s_in/d_in/in_valid are taken on that clock. Frames always run;
// a frame taken with in_valid low is a bubble and yields no out_valid.
// out_valid pulses once per real frame with s_out/d_out. frame_pos lets a
// feeder time its reads so that a pair is ready on in_ready. The
// document's iteration table (a digit count per operator) is reduced here
// to one digit count for all operators.
module ds_dwt97_core
  import dwt_pkg::*;
#(
  parameter int WI   = 16,              // input word width
  parameter int LMAX = 40,              // longest frame (iterations)
  parameter int F    = 20,              // constant / residual fraction bits
  parameter int LW   = $clog2(LMAX + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  logic [LW-1:0]         len,
  output logic                  in_ready,
  output logic [LW-1:0]         frame_pos,   // digit position in the frame
  input  logic                  in_valid,    // s_in/d_in hold a real pair
  input  logic signed [WI-1:0]  s_in,
  input  logic signed [WI-1:0]  d_in,
  output logic                  out_valid,
  output logic signed [LMAX:0]  s_out,
  output logic signed [LMAX:0]  d_out
);

  logic          run_q;
  logic [LW-1:0] len_q, pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; len_q <= LW'(LMAX); pos <= '0;
    end else begin
      run_q <= run;
      if (run && !run_q) begin
        len_q <= len;
        pos   <= '0;
      end else if (run_q) begin
        pos <= (pos == len_q - 1'b1) ? '0 : pos + 1'b1;
      end
    end
  end

  assign in_ready  = run_q && (pos == '0);
  assign frame_pos = run_q ? pos : '0;

  // Which frames carried a real pair: the word of frame m comes out during
  // frame m+1 (len > 10), after in_ready of m+1 has shifted the flags.
  logic flag_cur, flag_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_cur <= 1'b0; flag_prev <= 1'b0;
    end else if (!run_q) begin
      flag_cur <= 1'b0; flag_prev <= 1'b0;
    end else if (in_ready) begin
      flag_cur <= in_valid; flag_prev <= flag_cur;
    end
  end

  // The datapath is held in reset while not running, so each run starts
  // from empty word delays and online-operator state (the reset comes
  // from a flop, never from a combinational path).
  logic dp_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dp_rst_n <= 1'b0;
    else        dp_rst_n <= run;
  end

  // first digit of a frame at offset tau
  logic [9:0] fa;
  always_comb
    for (int t = 0; t < 10; t++) fa[t] = run_q && (pos == LW'(t + 1));

  // ---- serialisers ------------------------------------------------------
  sd_digit_t s_dig, d_dig;
  logic      unused_s_rdy, unused_s_v, unused_s_f, unused_s_l;
  logic      unused_d_rdy, unused_d_v, unused_d_f, unused_d_l;
  sd_serializer #(.W(WI)) u_ser_s (.clk, .rst_n(dp_rst_n), .load(in_ready), .word(s_in),
    .ready(unused_s_rdy), .dig_valid(unused_s_v), .dig_first(unused_s_f),
    .dig_last(unused_s_l), .digit(s_dig));
  sd_serializer #(.W(WI)) u_ser_d (.clk, .rst_n(dp_rst_n), .load(in_ready), .word(d_in),
    .ready(unused_d_rdy), .dig_valid(unused_d_v), .dig_first(unused_d_f),
    .dig_last(unused_d_l), .digit(d_dig));

  // ---- word delays (z^-1) ----------------------------------------------
  sd_digit_t s_q, d_q, d3_q, d5_q, d9_q;
  sd_digit_t D0, D0d, D0s, D1, D1d, D1s, D2, D3, D4, D5, D6, D6d, D7, D8, D8d, D8s;
  sd_digit_t D9, D10, D11, s_dig_o, d_dig_o, d_dig_od;

  cfg_delay_line #(.DW(2), .MAX_DELAY(LMAX)) u_zs  (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(len_q), .d(s_dig), .q(s_q));
  cfg_delay_line #(.DW(2), .MAX_DELAY(LMAX)) u_zd  (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(len_q), .d(d_dig), .q(d_q));
  cfg_delay_line #(.DW(2), .MAX_DELAY(LMAX)) u_zd3 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(len_q), .d(D3),    .q(d3_q));
  cfg_delay_line #(.DW(2), .MAX_DELAY(LMAX)) u_zd5 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(len_q), .d(D5),    .q(d5_q));
  cfg_delay_line #(.DW(2), .MAX_DELAY(LMAX)) u_zd9 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(len_q), .d(D9),    .q(d9_q));

  // ---- digit delays for alignment ---------------------------------------
  cfg_delay_line #(.DW(2), .MAX_DELAY(1)) u_dl0 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(1'd1), .d(D0), .q(D0d));
  cfg_delay_line #(.DW(2), .MAX_DELAY(3)) u_dl1 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(2'd3), .d(D1), .q(D1d));
  cfg_delay_line #(.DW(2), .MAX_DELAY(2)) u_dl6 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(2'd2), .d(D6), .q(D6d));
  cfg_delay_line #(.DW(2), .MAX_DELAY(5)) u_dl8 (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(3'd5), .d(D8), .q(D8d));
  cfg_delay_line #(.DW(2), .MAX_DELAY(2)) u_dlo (.clk, .rst_n(dp_rst_n), .en(run_q), .delay(2'd2), .d(d_dig_o), .q(d_dig_od));

  // right shifts in the frame: leading digits forced to zero
  assign D0s = fa[1] ? SD_ZERO : D0d;                          // >>1 at offset 1
  assign D1s = fa[3] ? SD_ZERO : D1d;                          // >>1 at offset 3
  assign D8s = (fa[7] || fa[8] || fa[9]) ? SD_ZERO : D8d;      // >>3 at offset 7

  // ---- operators ----------------------------------------------------------
  logic unused_v [14];
  logic unused_f [14];

  // 1st lifting step
  online_sd_adder u_a2  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[0]), .x(s_dig), .y(s_q),
                         .out_valid(unused_v[0]), .out_first(unused_f[0]), .z(D2));
  online_sd_mult #(.C(C0_R), .F(F)) u_m0 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[0]), .x(d_q),
                         .out_valid(unused_v[1]), .out_first(unused_f[1]), .p(D0));
  online_sd_adder u_a3  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[1]), .x(D0s), .y(D2),
                         .out_valid(unused_v[2]), .out_first(unused_f[2]), .z(D3));
  online_sd_mult #(.C(C1_R), .F(F)) u_m1 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[0]), .x(s_q),
                         .out_valid(unused_v[3]), .out_first(unused_f[3]), .p(D1));
  online_sd_adder u_a4  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[2]), .x(D3), .y(d3_q),
                         .out_valid(unused_v[4]), .out_first(unused_f[4]), .z(D4));
  online_sd_adder u_a5  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[3]), .x(D1s), .y(D4),
                         .out_valid(unused_v[5]), .out_first(unused_f[5]), .z(D5));
  // 2nd lifting step
  online_sd_mult #(.C(C2_R), .F(F)) u_m2 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[2]), .x(d3_q),
                         .out_valid(unused_v[6]), .out_first(unused_f[6]), .p(D6));
  online_sd_adder u_a7  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[4]), .x(D5), .y(d5_q),
                         .out_valid(unused_v[7]), .out_first(unused_f[7]), .z(D7));
  online_sd_adder u_a9  (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[5]), .x(D6d), .y(D7),
                         .out_valid(unused_v[8]), .out_first(unused_f[8]), .z(D9));
  online_sd_mult #(.C(C3_R), .F(F)) u_m3 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[4]), .x(d5_q),
                         .out_valid(unused_v[9]), .out_first(unused_f[9]), .p(D8));
  online_sd_adder u_a10 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[6]), .x(D9), .y(d9_q),
                         .out_valid(unused_v[10]), .out_first(unused_f[10]), .z(D10));
  online_sd_adder u_a11 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[7]), .x(D8s), .y(D10),
                         .out_valid(unused_v[11]), .out_first(unused_f[11]), .z(D11));
  // scaling
  online_sd_mult #(.C(C5_R), .F(F)) u_m5 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[8]), .x(D11),
                         .out_valid(unused_v[12]), .out_first(unused_f[12]), .p(s_dig_o));
  online_sd_mult #(.C(C4_R), .F(F)) u_m4 (.clk, .rst_n(dp_rst_n), .in_valid(run_q), .in_first(fa[6]), .x(D9),
                         .out_valid(unused_v[13]), .out_first(unused_f[13]), .p(d_dig_o));

  // ---- back to two's complement -------------------------------------------
  logic               s_wv, d_wv;
  logic signed [LMAX:0] s_word, d_word;
  sd_deserializer #(.ND(LMAX), .CW(LW)) u_des_s (.clk, .rst_n(dp_rst_n), .dig_valid(run_q), .dig_first(fa[9]),
                         .len(len_q), .digit(s_dig_o), .word_valid(s_wv), .word(s_word));
  sd_deserializer #(.ND(LMAX), .CW(LW)) u_des_d (.clk, .rst_n(dp_rst_n), .dig_valid(run_q), .dig_first(fa[9]),
                         .len(len_q), .digit(d_dig_od), .word_valid(d_wv), .word(d_word));

  assign out_valid = s_wv && d_wv && flag_prev;
  assign s_out     = s_word <<< (LW'(LMAX) - len_q);
  assign d_out     = d_word <<< (LW'(LMAX) - len_q);

endmodule
