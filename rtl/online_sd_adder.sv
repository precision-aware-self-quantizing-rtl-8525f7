// online_sd_adder: radix-2 signed-digit online (MSDF) adder, online delay 2.
//
// Adds two SD digit streams without carry propagation. Per digit position j:
//   1) x_j + y_j = 2 t_j + v_j      with t_j in {-1,0,1}, v_j in {-1,0}
//   2) v_j + t_{j+1} = 2 u_j + w_j  with u_j in {-1,0},   w_j in {0,1}
//   3) z_j = w_j + u_{j+1}          in {-1,0,1}
// so output digit z_j needs inputs down to position j+2 (online delay 2);
// the sum starts two positions higher (z_{-1}, z_0) than the operands.
// State (v of the previous position, w of the one before) restarts at
// in_first.
//
// Frame view: for words of L digits whose last two digits are zero, the
// L output digits of a frame, read as an integer MS digit first, equal
// (X + Y) / 4 exactly, where X and Y are the operands read the same way.
// With non-zero last digits the result is truncated to the frame (the
// document's "subset of digits" error term). Output registered: out digit
// for input clock c appears at c+1.
module online_sd_adder
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      in_first,
  input  sd_digit_t x,
  input  sd_digit_t y,
  output logic      out_valid,
  output logic      out_first,
  output sd_digit_t z
);

  logic signed [2:0] sum, t, v, r, u, w, zz, v_prev, w_prev;
  logic              v_q, w_q;      // v_prev = -v_q, w_prev = w_q

  always_comb begin
    sum = 3'(sd_value(x)) + 3'(sd_value(y));
    case (sum)
      3'sd2:   begin t = 3'sd1;  v = 3'sd0;  end
      3'sd1:   begin t = 3'sd1;  v = -3'sd1; end
      -3'sd1:  begin t = 3'sd0;  v = -3'sd1; end
      -3'sd2:  begin t = -3'sd1; v = 3'sd0;  end
      default: begin t = 3'sd0;  v = 3'sd0;  end
    endcase
    v_prev = (in_first || !v_q) ? 3'sd0 : -3'sd1;
    w_prev = (in_first || !w_q) ? 3'sd0 : 3'sd1;
    r = v_prev + t;                  // in {-2..1}
    u = (r < 0) ? -3'sd1 : 3'sd0;
    w = r - 2 * u;                   // in {0,1}
    zz = w_prev + u;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; w_q <= 1'b0;
      out_valid <= 1'b0; out_first <= 1'b0; z <= SD_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_q       <= (v != 0);
        w_q       <= (w != 0);
        out_first <= in_first;
        z         <= sd_encode(int'(zz));
      end
    end
  end

endmodule
