// tb_dwt97_bp_core: checks the 1-D flipping-structure core two ways.
// 1) Bit-exact against the flipping-structure equations evaluated on whole
//    arrays (same truncating fixed-point arithmetic, no pipeline registers).
// 2) Within a tolerance against the textbook 9/7 lifting steps in real
//    arithmetic (alpha..delta, then zeta / 1/zeta), which shares nothing with
//    the flipped constants. Also checks the one-clock output latency.
module tb_dwt97_bp_core;
  import dwt_pkg::*;
  localparam int W = DATA_W;
  localparam int M = 200;             // sample pairs
  localparam real SC = real'(1 << FRAC_B);
  localparam real TOL = 0.125;  // constant rounding + truncation

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] s_in = '0, d_in = '0;
  logic out_valid;
  logic signed [W-1:0] s_out, d_out;
  int checks = 0, failures = 0;

  dwt97_bp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  logic signed [W-1:0] S [M], D [M];
  // bit-exact array model
  logic signed [W-1:0] A [M], B [M], Cc [M], E [M], rs [M], rd [M];
  // real lifting model
  real s0 [M+1], d0 [M+1], d1 [M+1], s1 [M+1], d2 [M+1], s2 [M+1];

  function automatic logic signed [W-1:0] mulc(logic signed [W-1:0] a, logic signed [COEF_W-1:0] c);
    logic signed [W+COEF_W-1:0] p;
    p = a * c;
    return W'(p >>> COEF_FB);
  endfunction

  function automatic logic signed [W-1:0] at(ref logic signed [W-1:0] arr [M], input int i);
    return (i < 0) ? '0 : arr[i];
  endfunction

  function automatic real rat(ref real arr [M+1], input int i);
    return (i < 0 || i > M) ? 0.0 : arr[i];
  endfunction

  initial begin
    int t, n;
    real sr, dr;
    for (int i = 0; i < M; i++) begin
      S[i] = W'($signed($urandom_range(0, 2*255*(1 << FRAC_B))) - 255*(1 << FRAC_B));
      D[i] = W'($signed($urandom_range(0, 2*255*(1 << FRAC_B))) - 255*(1 << FRAC_B));
    end
    for (t = 0; t < M; t++) begin
      A[t]  = mulc(at(D, t-1), C0) + S[t] + at(S, t-1);
      B[t]  = mulc(at(S, t-1), C1) + ((A[t] + at(A, t-1)) >>> 4);
      Cc[t] = mulc(at(A, t-1), C2) + ((B[t] + at(B, t-1)) >>> 1);
      E[t]  = mulc(at(B, t-1), C3) + ((Cc[t] + at(Cc, t-1)) >>> 1);
      rs[t] = mulc(E[t], C5);
      rd[t] = mulc(Cc[t], C4);
    end
    for (n = 0; n <= M; n++) begin
      s0[n] = (n < M) ? real'(S[n]) / SC : 0.0;
      d0[n] = (n < M) ? real'(D[n]) / SC : 0.0;
    end
    for (n = 0; n <= M; n++) d1[n] = d0[n] + ALPHA * (s0[n] + rat(s0, n+1));
    for (n = 0; n <= M; n++) s1[n] = s0[n] + BETA  * (d1[n] + rat(d1, n-1));
    for (n = 0; n <= M; n++) d2[n] = d1[n] + GAMMA * (s1[n] + rat(s1, n+1));
    for (n = 0; n <= M; n++) s2[n] = s1[n] + DELTA * (d2[n] + rat(d2, n-1));

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (t = 0; t < M; t++) begin
      // gaps of 0..2 idle clocks between pairs must not disturb anything
      repeat ($urandom_range(0, 2)) begin
        in_valid <= 0; @(posedge clk);
        checks++; #1; if (out_valid !== 1'b0) failures++;
      end
      in_valid <= 1; s_in <= S[t]; d_in <= D[t];
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing at pair %0d", t); end
      checks++;
      if (s_out !== rs[t] || d_out !== rd[t]) begin
        failures++;
        $display("pair %0d: got s=%0d d=%0d exp s=%0d d=%0d", t, s_out, d_out, rs[t], rd[t]);
      end
      if (t >= 4) begin  // after the warm-up pairs
        sr = ZETA * s2[t-2];
        dr = d2[t-2] / ZETA;
        checks++;
        if ((real'(s_out)/SC - sr) > TOL || (sr - real'(s_out)/SC) > TOL ||
            (real'(d_out)/SC - dr) > TOL || (dr - real'(d_out)/SC) > TOL) begin
          failures++;
          $display("pair %0d: real ref s=%f d=%f got s=%f d=%f", t, sr, dr,
                   real'(s_out)/SC, real'(d_out)/SC);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
