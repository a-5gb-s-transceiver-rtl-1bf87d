// tb_ssc_cdr: spread-spectrum workload for the feed-forward CDR.
// Transmitter and receiver clocks are each modulated with a 30 kHz
// triangular profile from 0 to -5000 ppm, independently: the receiver's
// profile runs half a period behind the transmitter's (the worst case), so
// the relative frequency offset sweeps from about -5000 to +5000 ppm. The
// equalized signal is modelled as linear transitions between bit centres (+-60 codes plus
// +-4 codes of noise) sampled twice per receiver UI. One full modulation
// period (33.3 us, about 20 800 back-end cycles, 167 000 bits) is run at the
// CDR's default parameters; after the first 2 000 output words every
// received bit must match the transmitted sequence, and both slip
// directions must occur.
`timescale 1ps/1ps
module tb_ssc_cdr;
  import xcvr_pkg::*;
  localparam int NBIT = 180000;
  localparam real FMOD = 30.0e3;              // modulation frequency
  localparam real DEV  = -5000.0e-6;          // modulation depth
  localparam real TCYC = 1.6e-9;              // nominal back-end cycle
  localparam int  NCYC = 20900;
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
  real u, t_s;
  int cyc = 0;

  // triangular profile 0 .. DEV, period 1/FMOD, phase in periods
  function automatic real ssc_profile(real t, real ph);
    real x = t * FMOD + ph;
    x = x - $floor(x);
    return (x < 0.5) ? DEV * 2.0 * x : DEV * 2.0 * (1.0 - x);
  endfunction

  function automatic real wave(real uu);
    real c = uu - 0.5;
    int k = int'($floor(c));
    real f = c - k;
    real l0 = txb[k] ? 60.0 : -60.0;
    real l1 = txb[k + 1] ? 60.0 : -60.0;
    return l0 + (l1 - l0) * f;
  endfunction

  real dmin = 1.0, dmax = -1.0;
  always @(negedge clk) begin
    for (int i = 0; i < 16; i++) begin
      real v, ftx, frx, d;
      v = wave(u) + ($urandom_range(0, 8) - 4.0);
      y[i] <= 10'(int'(v));
      ftx = 1.0 + ssc_profile(t_s, 0.0);
      frx = 1.0 + ssc_profile(t_s, -0.5);
      d = ftx / frx - 1.0;
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
      u   = u + 0.5 * ftx / frx;              // data UIs per receiver sample
      t_s = t_s + TCYC / 16.0 / frx;          // receiver sample period
    end
    cyc++;
  end

  bit rxb[$];
  int nwords = 0, nslip_f = 0, nslip_s = 0;
  always @(posedge clk) if (rst_n) begin
    if (slip == SLIP_FASTER) nslip_f++;
    if (slip == SLIP_SLOWER) nslip_s++;
  end
  always @(posedge rxcko) if (rst_n) begin
    nwords++;
    if (nwords > 2000 && rxvalid != RXV_NONE)
      for (int i = 0; i < 15 + int'(rxvalid); i++) rxb.push_back(rxdo[i]);
  end

  initial begin
    for (int i = 0; i < NBIT; i++) txb[i] = 1'($urandom);
    u = 4.0 + ($urandom_range(0, 999) / 1000.0);
    t_s = 0.0;
    for (int i = 0; i < 16; i++) y[i] = 0;
    #1 rst_n = 0;
    #3000 rst_n = 1;
    wait (cyc == NCYC);
    begin
      int off, errs;
      off = -1; errs = 0;
      for (int o = 0; o < 40000 && off < 0; o++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 64; i++) if (rxb[i] != txb[o + i]) begin ok = 0; break; end
        if (ok) off = o;
      end
      checks++;
      if (off < 0) begin failures++; $display("no alignment found"); end
      else begin
        for (int i = 0; i < rxb.size(); i++) begin
          checks++;
          if (rxb[i] != txb[off + i]) begin
            failures++; errs++;
            if (errs < 5) $display("bit %0d wrong", i);
          end
        end
        $display("received %0d bits over one 30 kHz period, %0d errors", rxb.size(), errs);
      end
    end
    $display("relative offset swept %0.0f .. %0.0f ppm; slips faster=%0d slower=%0d",
             dmin * 1e6, dmax * 1e6, nslip_f, nslip_s);
    checks += 2;
    if (nslip_f == 0) failures++;
    if (nslip_s == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
