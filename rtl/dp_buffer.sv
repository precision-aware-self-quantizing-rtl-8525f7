// dp_buffer: dual-port data buffer.
//
// One write port and one read port that work in the same clock, so the
// transform can read a line while it writes results. It holds the raw image,
// the intermediate row-transformed data and the final coefficients. Reads are
// synchronous: rdata shows mem[raddr] one clock after re was
// high. No reset of the contents (a memory macro has none); a read of the
// address being written returns the old word.
module dp_buffer #(
  parameter int W     = dwt_pkg::DATA_W,
  parameter int DEPTH = 2 * 480 * 640,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
