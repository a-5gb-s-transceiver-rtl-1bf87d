// tb_zc_phase_det: self-checking test of the zero-crossing phase detector.
// Random 10-bit sample words (with runs of small values to make crossings
// near sample points) are applied cycle by cycle. For every pair of
// consecutive samples (the first pair uses the previous cycle's last
// sample) the reference finds a sign change, places it by
// q = floor((8|a| + S) / (2S)), S = |a| + |b|, and expects phase
// (4*(m-1) + q) mod 8.
`timescale 1ps/1ps
module tb_zc_phase_det;
  logic clk = 0;
  logic signed [9:0] y [16];
  logic zc_valid [16];
  logic [2:0] ph [16];
  int checks = 0, failures = 0, n_zc = 0;
  int prev;

  zc_phase_det #(.YW(10), .NP(16)) dut (.*);
  always #800 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++) y[i] = 10'sd5;
    prev = 5;
    @(posedge clk); #1;
    for (int it = 0; it < 500; it++) begin
      for (int i = 0; i < 16; i++)
        y[i] = (it % 3 == 0) ? 10'($urandom_range(0, 20)) - 10'sd10
                             : 10'($urandom_range(0, 400)) - 10'sd200;
      #1;
      for (int m = 0; m < 16; m++) begin
        automatic int a = (m == 0) ? prev : int'(y[m-1]);
        automatic int b = int'(y[m]);
        automatic bit zc = (a >= 0) != (b >= 0);
        automatic int ma = (a < 0) ? -a : a;
        automatic int mb = (b < 0) ? -b : b;
        checks++;
        if (zc_valid[m] !== zc) begin failures++; $display("valid m=%0d a=%0d b=%0d", m, a, b); end
        if (zc) begin
          automatic int q = (8 * ma + ma + mb) / (2 * (ma + mb));
          automatic int e = (4 * (m - 1) + q + 64) % 8;
          n_zc++;
          checks++;
          if (int'(ph[m]) != e) begin failures++; $display("ph m=%0d a=%0d b=%0d got %0d exp %0d", m, a, b, ph[m], e); end
        end
      end
      prev = int'(y[15]);
      @(posedge clk); #1;
    end
    $display("crossings checked: %0d", n_zc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
