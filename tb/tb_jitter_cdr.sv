// tb_jitter_cdr: sinusoidal-jitter workload for the feed-forward CDR.
// The data edges of a random bit sequence are moved by sinusoidal jitter
// while the sampling clock stays ideal, in the spirit of a jitter-tolerance
// measurement. Four points are run, each for 6 000 back-end cycles at the
// CDR's default parameters: 1 MHz / 2.0 UIpp, 3 MHz / 0.6 UIpp,
// 10 MHz / 0.3 UIpp and 50 MHz / 0.2 UIpp. These amplitudes are this
// test's own choice of moderate stress, not a measured tolerance. The
// equalized signal is modelled as linear transitions between bit centres
// (+-60 codes plus +-4 codes of noise). After 1 000 output words of
// settling, every received bit must equal the transmitted one.
`timescale 1ps/1ps
module tb_jitter_cdr;
  import xcvr_pkg::*;
  localparam int NBIT = 60000;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  logic signed [9:0] y [16];
  logic [16:0] rxdo;
  rxvalid_e rxvalid;
  logic rxcko;
  logic [10:0] ph_av;
  slip_e slip;
  logic [4:0] n_zc;
  int checks = 0, failures = 0;

  ff_cdr dut (.*);
  always #800 clk = ~clk;

  bit txb [NBIT];
  real fj, aj;               // jitter frequency (Hz) and amplitude (UIpp)
  int n_samp = 0, cyc = 0;
  bit run = 0;

  function automatic real wave(real uu);
    real c = uu - 0.5;
    int k = int'($floor(c));
    real f = c - k;
    real l0 = txb[k] ? 60.0 : -60.0;
    real l1 = txb[k + 1] ? 60.0 : -60.0;
    return l0 + (l1 - l0) * f;
  endfunction

  always @(negedge clk) if (run) begin
    for (int i = 0; i < 16; i++) begin
      real t, u, v;
      t = n_samp * 100.0e-12;                       // sample time
      u = 4.3 + n_samp * 0.5 - 0.5 * aj * $sin(2.0 * PI * fj * t);
      v = wave(u) + ($urandom_range(0, 8) - 4.0);
      y[i] <= 10'(int'(v));
      n_samp++;
    end
    cyc++;
  end

  bit rxb[$];
  int nwords = 0;
  always @(posedge rxcko) if (rst_n && run) begin
    nwords++;
    if (nwords > 1000 && rxvalid != RXV_NONE)
      for (int i = 0; i < 15 + int'(rxvalid); i++) rxb.push_back(rxdo[i]);
  end

  task automatic one_point(real f, real a);
    int off, errs;
    fj = f; aj = a;
    for (int i = 0; i < NBIT; i++) txb[i] = 1'($urandom);
    n_samp = 0; cyc = 0; nwords = 0; rxb.delete();
    for (int i = 0; i < 16; i++) y[i] = 0;
    rst_n = 0;
    #3000 rst_n = 1;
    run = 1;
    wait (cyc == 6000);
    run = 0;
    off = -1; errs = 0;
    for (int o = 0; o < 20000 && off < 0; o++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 64; i++) if (rxb[i] != txb[o + i]) begin ok = 0; break; end
      if (ok) off = o;
    end
    checks++;
    if (off < 0) begin failures++; $display("%0.0f MHz: no alignment found", f / 1e6); end
    else begin
      for (int i = 0; i < rxb.size(); i++) begin
        checks++;
        if (rxb[i] != txb[off + i]) begin failures++; errs++; end
      end
      $display("SJ %0.0f MHz %0.1f UIpp: %0d bits, %0d errors", f / 1e6, a, rxb.size(), errs);
    end
  endtask

  initial begin
    #1;
    one_point(1.0e6, 2.0);
    one_point(3.0e6, 0.6);
    one_point(10.0e6, 0.3);
    one_point(50.0e6, 0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
