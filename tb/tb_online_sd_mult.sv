// tb_online_sd_mult: two instances, C0 = 1/alpha (K = 1) and C5 (K = 3).
// For random L-digit operands X the output frame P (read as an integer)
// must satisfy |P - Cs*X| <= 1/2, Cs = C/2^K rounded to F fraction bits as
// computed here, and P must start one clock after X.
module tb_online_sd_mult;
  import dwt_pkg::*;
  localparam int L = 16, F = 16;
  localparam real CA = -0.6304636206, CB = 2.421021152;
  localparam int KA = 1, KB = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  sd_digit_t x = SD_ZERO, pa, pb;
  logic va, fa, vb, fb;
  int checks = 0, failures = 0;

  online_sd_mult #(.C(CA), .F(F)) dut_a (.clk, .rst_n, .in_valid, .in_first, .x,
                                         .out_valid(va), .out_first(fa), .p(pa));
  online_sd_mult #(.C(CB), .F(F)) dut_b (.clk, .rst_n, .in_valid, .in_first, .x,
                                         .out_valid(vb), .out_first(fb), .p(pb));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real csa, csb;
  initial begin
    csa = real'(longint'(CA / (2.0 ** KA) * (2.0 ** F))) / (2.0 ** F);
    csb = real'(longint'(CB / (2.0 ** KB) * (2.0 ** F))) / (2.0 ** F);
  end

  longint xq [$];
  longint acca, accb; int nd = 0;
  always @(posedge clk) if (rst_n && va) begin
    real ea, eb;
    if (fa) begin acca = 0; accb = 0; nd = 0; end
    acca = 2 * acca + sd_value(pa);
    accb = 2 * accb + sd_value(pb);
    nd++;
    if (nd == L && xq.size()) begin
      ea = real'(acca) - csa * real'(xq[0]);
      eb = real'(accb) - csb * real'(xq[0]);
      checks++;
      if (ea > 0.5 || ea < -0.5 || eb > 0.5 || eb < -0.5) begin
        failures++;
        $display("X=%0d: PA=%0d (%f) PB=%0d (%f)", xq[0], acca, csa * real'(xq[0]), accb, csb * real'(xq[0]));
      end
      void'(xq.pop_front());
    end
  end

  initial begin
    longint xs;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      xs = 0;
      for (int k = 0; k < L; k++) begin
        int xv = (f == 0) ? -1 : (f == 1) ? 1 : int'($urandom_range(0, 2)) - 1;
        xs = 2 * xs + xv;
        in_valid = 1; in_first = (k == 0); x = sd_encode(xv);
        @(posedge clk); #1;
        if (k == 0) begin
          checks++;
          if (!(va && fa && vb && fb)) failures++;
        end
      end
      xq.push_back(xs);
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (xq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
