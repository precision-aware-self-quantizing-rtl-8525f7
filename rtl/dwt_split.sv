// dwt_split: splits a serial sample stream x_i into even/odd pairs.
//
// The first sample of every line (x_first high) is taken as even. Each even
// sample is held until its odd partner arrives; the pair (s, d) is then
// presented with pair_valid for one clock, so a stream of one sample per
// clock becomes one pair every two clocks. Outputs are registered: the pair
// appears the clock after its odd sample. Lines must have an even length
// (the controller always feeds an even number of samples per line).
module dwt_split #(
  parameter int W = dwt_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic                x_first,   // first (even) sample of a line
  input  logic signed [W-1:0] x,
  output logic                pair_valid,
  output logic signed [W-1:0] s,         // even sample
  output logic signed [W-1:0] d          // odd sample
);

  logic                have_even;
  logic signed [W-1:0] even_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_even  <= 1'b0;
      even_q     <= '0;
      pair_valid <= 1'b0;
      s          <= '0;
      d          <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (x_valid) begin
        if (x_first || !have_even) begin
          even_q    <= x;
          have_even <= 1'b1;
        end else begin
          s          <= even_q;
          d          <= x;
          pair_valid <= 1'b1;
          have_even  <= 1'b0;
        end
      end
    end
  end

endmodule
