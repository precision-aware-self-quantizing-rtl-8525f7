// tb_ds_dwt97_core: digit-serial core against the textbook 9/7 lifting
// steps in real arithmetic. Two runs: len = 40 digits (tight tolerance) and
// len = 32 digits (tolerance 1.0, as the output LSB grows from 2^-11 to
// 2^-3), showing the run-time precision switch. Also checks that exactly
// one word pair comes out per frame and the output latency.
module tb_ds_dwt97_core;
  import dwt_ref_pkg::*;
  localparam int WI = 16, LMAX = 40, LW = 6;
  localparam int M = 120;

  logic clk = 0, rst_n = 0, run = 0;
  logic [LW-1:0] len = LW'(LMAX);
  logic in_ready, out_valid, in_valid = 1'b1;
  logic [LW-1:0] frame_pos;
  logic signed [WI-1:0] s_in = '0, d_in = '0;
  logic signed [LMAX:0] s_out, d_out;
  int checks = 0, failures = 0, n_runs = 0;

  ds_dwt97_core #(.WI(WI), .LMAX(LMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real S [M], D [M], d1 [M+1], s1 [M+1], d2 [M+1], s2 [M+1];

  function automatic real at(ref real a [M+1], input int i);
    return (i < 0 || i > M) ? 0.0 : a[i];
  endfunction
  function automatic real ab(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic one_run(int l, real tol);
    int k = 0, kin = 0;
    longint t_in [$];
    real sr, dr, sh, dh, maxe = 0.0;
    for (int i = 0; i < M; i++) begin
      S[i] = real'($urandom_range(0, 8000)) - 4000.0;
      D[i] = real'($urandom_range(0, 8000)) - 4000.0;
    end
    for (int n = 0; n <= M; n++) d1[n] = ((n < M) ? D[n] : 0.0) + ALPHA * (((n < M) ? S[n] : 0.0) + ((n + 1 < M) ? S[n + 1] : 0.0));
    for (int n = 0; n <= M; n++) s1[n] = ((n < M) ? S[n] : 0.0) + BETA * (d1[n] + at(d1, n - 1));
    for (int n = 0; n <= M; n++) d2[n] = d1[n] + GAMMA * (s1[n] + at(s1, n + 1));
    for (int n = 0; n <= M; n++) s2[n] = s1[n] + DELTA * (d2[n] + at(d2, n - 1));
    len = LW'(l);
    run = 1;
    while (k < M) begin
      @(posedge clk);
      #1;
      if (in_ready && kin < M) begin
        s_in = WI'(longint'(S[kin])); d_in = WI'(longint'(D[kin]));
        t_in.push_back($time / 10);
        kin++;
      end
      if (out_valid) begin
        checks++;
        // latency: word k appears len + 10 clocks after frame k was taken
        if (($time / 10) - t_in[k] != longint'(l + 10)) begin
          failures++;
          $display("latency %0d", ($time / 10) - t_in[k]);
        end
        if (k >= 4) begin
          sh = real'(s_out) * (2.0 ** (WI - LMAX + 13));
          dh = real'(d_out) * (2.0 ** (WI - LMAX + 10));
          sr = ZETA * s2[k - 2];
          dr = d2[k - 2] / ZETA;
          if (ab(sh - sr) > maxe) maxe = ab(sh - sr);
          if (ab(dh - dr) > maxe) maxe = ab(dh - dr);
          checks++;
          if (ab(sh - sr) > tol || ab(dh - dr) > tol) begin
            failures++;
            if (failures < 10) $display("len %0d word %0d: s %f (ref %f) d %f (ref %f)", l, k, sh, sr, dh, dr);
          end
        end
        k++;
      end
    end
    run = 0;
    repeat (3) @(posedge clk);
    #1;
    n_runs++;
    $display("len %0d: %0d words, largest error %f input LSBs", l, k, maxe);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    one_run(40, 0.05);
    one_run(32, 1.0);
    checks++;
    if (n_runs != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
