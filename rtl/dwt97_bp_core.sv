// dwt97_bp_core: bit-parallel 1-D 9/7 wavelet transform, flipping structure.
//
// Each valid cycle takes one even sample s_in = x[2m] and one odd sample
// d_in = x[2m+1] and produces one low-pass (s_out) and one high-pass (d_out)
// coefficient. The datapath follows the flipping structure of the 9/7
// lifting scheme: two lifting steps, each with a constant multiplier on the
// delayed even/odd sample, two adders and a one-sample delay (z^-1) in the
// feedback path; right shifts by 4, 1 and 1 undo the power-of-two factors
// folded into C1, C2 and C3; C5 scales the low-pass and C4 the high-pass
// output. Node names D0..D11 are those of the flipping-structure diagram.
//
// With m the index of the pair entering, the combinational results are
// s[m-2] and d[m-2]; they are registered, so s_out/d_out/out_valid appear one
// clock after in_valid with a lag of two sample pairs. The caller extends a
// line symmetrically by four samples at each end and drops the first four
// output pairs of a line (see dwt_controller).
//
// Arithmetic: every internal node has the same format (DATA_W bits, FRAC_B
// fractional); products are truncated toward minus infinity by dropping
// LSBs, as the document does for internal paths. The document optimises a
// separate width per node; one common width is this design's simplification.
// All state is reset to zero. Registers only advance when in_valid is high.
module dwt97_bp_core
  import dwt_pkg::*;
#(
  parameter int W   = DATA_W,
  parameter int CW  = COEF_W,
  parameter int CFB = COEF_FB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] s_in,      // even sample s_i^0
  input  logic signed [W-1:0] d_in,      // odd sample d_i^0
  output logic                out_valid,
  output logic signed [W-1:0] s_out,     // low-pass coefficient
  output logic signed [W-1:0] d_out      // high-pass coefficient
);

  // Constant multiply, product truncated back to the data format.
  function automatic logic signed [W-1:0] cmul(logic signed [W-1:0] a,
                                               logic signed [CW-1:0] c);
    logic signed [W+CW-1:0] p;
    p = a * c;
    return W'(p >>> CFB);
  endfunction

  // z^-1 elements.
  logic signed [W-1:0] s0_q;   // even sample, 1st step
  logic signed [W-1:0] d0_q;   // odd sample, 1st step
  logic signed [W-1:0] d3_q;   // D3 feedback, 1st step / odd input of 2nd step
  logic signed [W-1:0] d5_q;   // D5, even input of 2nd step
  logic signed [W-1:0] d9_q;   // D9 feedback, 2nd step

  logic signed [W-1:0] D0, D1, D2, D3, D4, D5, D6, D7, D8, D9, D10, D11;
  logic signed [W-1:0] s_res, d_res;

  always_comb begin
    // 1st lifting step
    D2  = s_in + s0_q;
    D0  = cmul(d0_q, CW'(C0));
    D3  = D0 + D2;                    // d1/alpha
    D1  = cmul(s0_q, CW'(C1));
    D4  = (D3 + d3_q) >>> 4;
    D5  = D1 + D4;                    // s1/(16 alpha beta)
    // 2nd lifting step
    D6  = cmul(d3_q, CW'(C2));
    D7  = (D5 + d5_q) >>> 1;
    D9  = D6 + D7;                    // d2/(32 alpha beta gamma)
    D8  = cmul(d5_q, CW'(C3));
    D10 = (D9 + d9_q) >>> 1;
    D11 = D8 + D10;                   // s2/(64 alpha beta gamma delta)
    // scaling
    s_res = cmul(D11, CW'(C5));
    d_res = cmul(D9, CW'(C4));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q <= '0; d0_q <= '0; d3_q <= '0; d5_q <= '0; d9_q <= '0;
      s_out <= '0; d_out <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s0_q  <= s_in;
        d0_q  <= d_in;
        d3_q  <= D3;
        d5_q  <= D5;
        d9_q  <= D9;
        s_out <= s_res;
        d_out <= d_res;
      end
    end
  end

endmodule
