// cfg_delay_line: run-time configurable delay element.
//
// A chain of MAX_DELAY registers shifts on every enabled clock; a
// multiplexer taps the chain after `delay` stages, so one fixed chain serves
// as a shift register of any length from 0 (combinational pass-through) to
// MAX_DELAY. This is how a digit-serial datapath delays a whole word when
// the number of digits per word changes at run time with the target
// precision and level: the chain is sized for the longest word and the tap
// follows the configuration. The chain resets to zero.
module cfg_delay_line #(
  parameter int DW        = 2,
  parameter int MAX_DELAY = 32,
  parameter int SW        = $clog2(MAX_DELAY + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [SW-1:0] delay,     // 0 .. MAX_DELAY
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);

  logic [DW-1:0] chain [MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) chain[i] <= '0;
    end else if (en) begin
      chain[0] <= d;
      for (int i = 1; i < MAX_DELAY; i++) chain[i] <= chain[i-1];
    end
  end

  always_comb begin
    q = d;
    for (int i = 1; i <= MAX_DELAY; i++)
      if (delay == SW'(i)) q = chain[i-1];
  end

endmodule
