// dwt_controller: sequencing of the multilevel 2-D transform.
//
// The 2-D transform of one level is a 1-D transform of every row of the
// current low-low (LL) region followed by a 1-D transform of every column;
// the next level repeats this on the LL quarter, up to `levels` levels (set at
// run time, sampled at start). The buffer holds two images: the row pass
// reads bank 0 and writes bank 1, the column pass reads bank 1 and writes
// bank 0, so all final coefficients end up in bank 0 in the usual dyadic
// layout (low half of a line first, high half after it).
//
// Per line of length N the controller reads N+8 samples, one per clock: the
// line itself with four samples of whole-sample symmetric extension at each
// end (x[-i] = x[i], x[N-1+i] = x[N-1-i]). The core needs exactly four on
// each side for the two lifting steps. Of the N/2+4 coefficient pairs that
// come back, the first four are warm-up and are dropped; pair k is written as
// s -> position k and d -> position N/2+k of the line, the d one clock after
// the s (one write port). The next line starts when the last write is done.
//
// Written words are flagged final (to be quantized) when they will not be
// transformed again: every high-pass output of a column pass, the low-pass
// outputs of the column pass in the right half (HL), and LL at the last
// level. The level number goes with them to pick the step.
//
// Timing: rd_en at clock t gives x_valid at t+1 (synchronous buffer); with
// the bit-parallel core the output for a pair arrives at t+3 after the read
// of its odd sample. Reads are paced by allow_even / allow_odd (tied high
// for the bit-parallel core, one pair per frame for the digit-serial core);
// the write side simply follows the core's result strobes. busy is high from
// the clock after start until done pulses.
module dwt_controller
  import dwt_pkg::*;
#(
  parameter int W          = DATA_W,
  parameter int ROWS       = 480,
  parameter int COLS       = 640,
  parameter int MAX_LEVELS = 4,
  parameter int LW         = 3,
  parameter int AW         = $clog2(2 * ROWS * COLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LW-1:0]       levels,     // 1..MAX_LEVELS
  output logic                busy,
  output logic                done,
  // read pacing: reads of even / odd line samples are only issued when allowed
  input  logic                allow_even,
  input  logic                allow_odd,
  // buffer read side
  output logic                rd_en,
  output logic [AW-1:0]       rd_addr,
  output logic                x_valid,    // buffer data valid this clock
  output logic                x_first,    // ... and it is the first of a line
  // 1-D core results
  input  logic                c_valid,
  input  logic signed [W-1:0] c_s,
  input  logic signed [W-1:0] c_d,
  // buffer write side
  output logic                wr_en,
  output logic [AW-1:0]       wr_addr,
  output logic signed [W-1:0] wr_data,
  output logic                wr_final,   // coefficient is final: quantize
  output logic [LW-1:0]       wr_level,
  // status
  output pass_t               pass
);

  localparam int BANK = ROWS * COLS;
  localparam int DIMW = $clog2((ROWS > COLS ? ROWS : COLS) + 16);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic [LW-1:0]   levels_q;
  logic [DIMW-1:0] rows_l, cols_l;     // size of the current LL region
  logic [DIMW-1:0] line;               // current row / column
  logic [DIMW-1:0] j;                  // samples read in this line
  logic [DIMW-1:0] out_cnt;            // coefficient pairs received
  logic            pend;               // d word waiting for the write port
  logic [AW-1:0]   pend_addr;
  logic signed [W-1:0] pend_data;
  logic            pend_final;

  logic [DIMW-1:0] n_len, n_lines, half;
  logic            feeding, line_done;
  logic signed [DIMW+1:0] i_ext, i_mir;  // i_mir is in [0, N-1] by construction

  // Address of element idx of line ln in the pass's layout.
  function automatic logic [AW-1:0] elem(pass_t p, logic [DIMW-1:0] ln,
                                         logic [DIMW-1:0] idx);
    if (p == PASS_ROW) return AW'(ln) * AW'(COLS) + AW'(idx);
    else               return AW'(idx) * AW'(COLS) + AW'(ln);
  endfunction

  always_comb begin
    n_len   = (pass == PASS_ROW) ? cols_l : rows_l;
    n_lines = (pass == PASS_ROW) ? rows_l : cols_l;
    half    = n_len >> 1;
    feeding = (state == S_RUN) && (j < n_len + DIMW'(8));
    line_done = (state == S_RUN) && !feeding && (out_cnt == half + DIMW'(4)) && !pend;
    // symmetric extension
    i_ext = $signed({2'b00, j}) - 4;
    if (i_ext < 0)
      i_mir = -i_ext;
    else if (i_ext > $signed({2'b00, n_len}) - 1)
      i_mir = 2 * ($signed({2'b00, n_len}) - 1) - i_ext;
    else
      i_mir = i_ext;
    rd_en   = feeding && (j[0] ? allow_odd : allow_even);
    rd_addr = elem(pass, line, DIMW'(i_mir)) + ((pass == PASS_ROW) ? AW'(0) : AW'(BANK));
    busy    = (state == S_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; levels_q <= LW'(1); rows_l <= '0; cols_l <= '0;
      line <= '0; j <= '0; out_cnt <= '0; pass <= PASS_ROW; wr_level <= LW'(1);
      pend <= 1'b0; pend_addr <= '0; pend_data <= '0; pend_final <= 1'b0;
      x_valid <= 1'b0; x_first <= 1'b0; done <= 1'b0;
      wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0; wr_final <= 1'b0;
    end else begin
      done    <= 1'b0;
      wr_en   <= 1'b0;
      x_valid <= rd_en;
      x_first <= rd_en && (j == '0);
      case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          levels_q <= (levels == '0) ? LW'(1) :
                      (levels > LW'(MAX_LEVELS)) ? LW'(MAX_LEVELS) : levels;
          rows_l   <= DIMW'(ROWS);
          cols_l   <= DIMW'(COLS);
          pass     <= PASS_ROW;
          wr_level <= LW'(1);
          line     <= '0; j <= '0; out_cnt <= '0; pend <= 1'b0;
        end
        S_RUN: begin
          if (rd_en) j <= j + 1'b1;
          // write side: pending high-pass word first, then a new pair
          if (pend) begin
            wr_en    <= 1'b1;
            wr_addr  <= pend_addr;
            wr_data  <= pend_data;
            wr_final <= pend_final;
            pend     <= 1'b0;
          end
          if (c_valid) begin
            out_cnt <= out_cnt + 1'b1;
            if (out_cnt >= DIMW'(4)) begin
              wr_en    <= 1'b1;
              wr_addr  <= elem(pass, line, out_cnt - DIMW'(4))
                          + ((pass == PASS_ROW) ? AW'(BANK) : AW'(0));
              wr_data  <= c_s;
              wr_final <= (pass == PASS_COL) &&
                          ((line >= (cols_l >> 1)) || (wr_level == levels_q));
              pend      <= 1'b1;
              pend_addr <= elem(pass, line, half + out_cnt - DIMW'(4))
                           + ((pass == PASS_ROW) ? AW'(BANK) : AW'(0));
              pend_data <= c_d;
              pend_final <= (pass == PASS_COL);
            end
          end
          if (line_done) begin
            j <= '0; out_cnt <= '0;
            if (line + 1'b1 < n_lines) begin
              line <= line + 1'b1;
            end else if (pass == PASS_ROW) begin
              line <= '0; pass <= PASS_COL;
            end else if (wr_level < levels_q) begin
              line <= '0; pass <= PASS_ROW;
              wr_level <= wr_level + 1'b1;
              rows_l <= rows_l >> 1;
              cols_l <= cols_l >> 1;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The single write port can take one word per clock: a new pair never
  // arrives while the previous high-pass word is still waiting.
  assert property (@(posedge clk) disable iff (!rst_n) !(pend && c_valid));

endmodule
