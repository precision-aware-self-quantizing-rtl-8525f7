// iteration_table: number of digit-serial iterations (digits per word) for
// each decomposition level.
//
// The digit-serial core trades precision for time through the number of
// digits it computes per word. Deeper levels need more precision, since the
// quantization step halves per level while the low band grows, so each
// level has its own entry. The table is a small register file: the host
// writes an entry (level 1..MAX_LEVELS, digit count) through we/wlevel/wlen
// while the processor is idle, and the processor reads the entry of the
// level it is working on through rlevel/rlen (combinational read). After
// reset every entry holds DEFAULT_LEN. Levels outside 1..MAX_LEVELS are
// ignored on write and read as the last entry.
//
// Holding the digit counts in a run-time table indexed by level follows the
// architecture this design is based on; that table has an entry per
// operator and is filled by an offline error analysis. Here one count per
// level serves all operators, and the contents come from the host (own
// choice).
module iteration_table #(
  parameter int MAX_LEVELS  = 4,
  parameter int LW          = 3,
  parameter int CW          = 6,
  parameter int DEFAULT_LEN = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [LW-1:0] wlevel,
  input  logic [CW-1:0] wlen,
  input  logic [LW-1:0] rlevel,
  output logic [CW-1:0] rlen
);

  localparam int IW = (MAX_LEVELS > 1) ? $clog2(MAX_LEVELS) : 1;

  logic [CW-1:0] entry [MAX_LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_LEVELS; i++) entry[i] <= CW'(DEFAULT_LEN);
    end else if (we && wlevel >= LW'(1) && wlevel <= LW'(MAX_LEVELS)) begin
      entry[IW'(wlevel - LW'(1))] <= wlen;
    end
  end

  always_comb begin
    rlen = entry[MAX_LEVELS - 1];
    for (int i = 0; i < MAX_LEVELS; i++)
      if (rlevel == LW'(i + 1)) rlen = entry[i];
  end

endmodule
