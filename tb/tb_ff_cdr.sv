// tb_ff_cdr: end-to-end test of the feed-forward CDR on a synthetic
// equalized signal.
// A random bit sequence is turned into a waveform with linear transitions
// between bit centres (amplitude +-60 codes, plus small random noise) and
// sampled twice per nominal UI with a frequency offset: first the data runs
// 0.5 % faster than the sampling clock, then 0.5 % slower (the range of the
// spread-spectrum profile the CDR is specified for), starting at a random
// phase. The bits on rxdo/rxvalid are concatenated and, after 200 output
// words of settling, must reproduce the transmitted sequence without a
// single error, gap or duplicate. Both slip directions and all three
// RXVALID widths must occur.
`timescale 1ps/1ps
module tb_ff_cdr;
  import xcvr_pkg::*;
  localparam int NBIT = 40000;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] y [16];
  logic [16:0] rxdo;
  rxvalid_e rxvalid;
  logic rxcko;
  logic [10:0] ph_av;
  slip_e slip;
  logic [4:0] n_zc;
  int checks = 0, failures = 0;

  ff_cdr #(.YW(10), .NP(16), .PF(8), .G1_SH(2), .G2_SH(4)) dut (.*);
  always #800 clk = ~clk;

  bit txb [NBIT];
  real u, delta;
  int cyc = 0;

  function automatic real wave(real uu);
    // levels at bit centres k + 0.5, linear in between
    real c = uu - 0.5;
    int k = int'($floor(c));
    real f = c - k;
    real l0 = txb[k] ? 60.0 : -60.0;
    real l1 = txb[k + 1] ? 60.0 : -60.0;
    return l0 + (l1 - l0) * f;
  endfunction

  // drive a new sample word every cycle
  always @(negedge clk) begin
    for (int i = 0; i < 16; i++) begin
      real v;
      v = wave(u) + ($urandom_range(0, 8) - 4.0);
      y[i] <= 10'(int'(v));
      u = u + 0.5 * (1.0 + delta);
    end
    cyc++;
    if (cyc == 2500) delta = -0.005;
  end

  // collect received bits
  bit rxb[$];
  int nwords = 0, nslip_f = 0, nslip_s = 0, nv [4];
  always @(posedge clk) if (rst_n) begin
    if (slip == SLIP_FASTER) nslip_f++;
    if (slip == SLIP_SLOWER) nslip_s++;
  end
  always @(posedge rxcko) if (rst_n) begin
    nwords++;
    nv[rxvalid]++;
    if (nwords > 200 && rxvalid != RXV_NONE)
      for (int i = 0; i < 15 + int'(rxvalid); i++) rxb.push_back(rxdo[i]);
  end

  initial begin
    for (int i = 0; i < NBIT; i++) txb[i] = 1'($urandom);
    u = 4.0 + ($urandom_range(0, 999) / 1000.0);
    delta = 0.005;
    for (int i = 0; i < 16; i++) y[i] = 0;
    #3000 rst_n = 1;
    wait (cyc == 4800);
    begin
      int off, errs;
      off = -1; errs = 0;
      // align: find where the first 64 received bits sit in the sequence
      for (int o = 0; o < 4000 && off < 0; o++) begin
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
        $display("received %0d bits, %0d errors", rxb.size(), errs);
      end
    end
    $display("slips faster=%0d slower=%0d widths 15/16/17 = %0d/%0d/%0d", nslip_f, nslip_s, nv[0], nv[1], nv[2]);
    checks += 5;
    if (nslip_f == 0) failures++;
    if (nslip_s == 0) failures++;
    if (nv[0] == 0) failures++;
    if (nv[1] == 0) failures++;
    if (nv[2] == 0) failures++;
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
