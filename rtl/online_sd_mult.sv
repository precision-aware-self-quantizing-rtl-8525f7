// online_sd_mult: online (MSDF) multiplication of an SD digit stream by a
// constant, one output digit per input digit.
//
// The constant C is normalised to Cs = C / 2^K with |Cs| <= 1/2; the K
// extra integer digits of the product are accounted for by the caller as a
// change of binary point (in a digit-serial datapath, by delay elements).
// Residual recurrence, with R = 0 at in_first:
//   R' = 2 R + Cs * x_j,   p_j = +1 if R' >= 1/2, -1 if R' < -1/2, else 0,
//   R  = R' - p_j
// keeps |R| <= 1/2 and |R'| <= 3/2, so the output digits p_j satisfy
// sum p_j 2^-j = Cs * sum x_j 2^-j - R 2^-j: the product is exact up to one
// half of the last digit, and the online delay is 0. Cs is held with F
// fractional bits (rounded). Output registered: p_j appears the clock after
// x_j.
module online_sd_mult
  import dwt_pkg::*;
#(
  parameter real C = 0.5,
  parameter int  F = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_first,
  input  sd_digit_t x,
  output logic      out_valid,
  output logic      out_first,
  output sd_digit_t p
);

  // smallest K with |C| / 2^K <= 1/2
  function automatic int norm_shift(real c);
    real a = (c < 0.0) ? -c : c;
    int  k = 0;
    while (a > 0.5) begin
      a = a / 2.0;
      k++;
    end
    return k;
  endfunction

  localparam int  K    = norm_shift(C);
  localparam int  RW   = F + 3;                       // sign + 2 integer bits
  localparam real CS_R = C / (2.0 ** K);
  localparam logic signed [RW-1:0] CS   = RW'(longint'(CS_R * (2.0 ** F)));
  localparam logic signed [RW-1:0] HALF = RW'(longint'(1) << (F - 1));

  logic signed [RW-1:0] r_q, r_base, r_new, r_next;
  logic signed [1:0]    pd;

  always_comb begin
    r_base = in_first ? '0 : r_q;
    case (x)
      SD_POS:  r_new = (r_base <<< 1) + CS;
      SD_NEG:  r_new = (r_base <<< 1) - CS;
      default: r_new = (r_base <<< 1);
    endcase
    if (r_new >= HALF)       pd = 2'sd1;
    else if (r_new < -HALF)  pd = -2'sd1;
    else                     pd = 2'sd0;
    r_next = r_new - (RW'(pd) <<< F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0; out_valid <= 1'b0; out_first <= 1'b0; p <= SD_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        r_q       <= r_next;
        out_first <= in_first;
        p         <= sd_encode(int'(pd));
      end
    end
  end

  // the residual must stay within [-1/2, 1/2]
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (r_next <= HALF && r_next >= -HALF));

endmodule
