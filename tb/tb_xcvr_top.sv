// tb_xcvr_top: end-to-end test of the transceiver core at its default
// parameters, transmitter looped back to the receiver through behavioural
// models of the analog parts.
// Transmit: random 16-bit words on txdin/txcki (312.5 MHz); the serial
// streams tx_main/tx_post (5 Gb/s) are turned into driver levels with
// 3.5 dB de-emphasis, level = 0.834*d[n] - 0.166*d[n-1] (d = +-1).
// Channel: linear transitions between bit centres, scaled to 0.2 V, plus
// inter-symbol interference x(t) = v(t) + 0.8 v(t - UI/2) + 0.4 v(t - UI).
// ADC: four slices clocked at 2.5 GHz, slice k sampling k quarter periods
// after the clock edge, 800 mV full scale in 32 levels, delivered as
// thermometer codes <0>..<32>. The ADC clock is first 0.4 % faster than the
// transmit bit clock and then 0.4 % slower, so the data looks slower and
// then faster than the receiver.
// Checks: after settling, the bits on rxdo/rxvalid must equal the
// transmitted bit sequence without error, gap or duplicate; the CMA must
// have moved C1 below 0 and raised C0 from their reset values (4, 0). Each
// mechanism must occur at least once: transmit FIFO underrun at start-up,
// de-emphasis (tx_post differing from tx_main), both slip directions, and
// RXVALID widths 15, 16 and 17, and the gearbox's almost-full flow-control
// flag (the gearbox is read whenever it holds a word).
`timescale 1ps/1fs
module tb_xcvr_top;
  import xcvr_pkg::*;
  logic rst_n = 1;   // falls at 1 ps: the asynchronous resets need an edge
  logic txcki = 0, tx_bitclk = 0, rx_clk_adc = 0;
  logic [15:0] txdin;
  logic tx_main, tx_post, tx_underrun;
  logic [32:0] adc_therm [4];
  logic cma_en = 1;
  logic [8:0] cma_d = 9'd64;
  logic [16:0] rxdo;
  rxvalid_e rxvalid;
  logic rxcko;
  logic gb_rd_en, gb_dvalid, gb_almost_full, gb_overflow;
  logic [15:0] gb_dout;
  assign gb_rd_en = gb_dvalid;
  logic signed [4:0] c0, c1;
  logic [10:0] ph_av;
  slip_e slip;
  int checks = 0, failures = 0;

  xcvr_top dut (.*);

  // clocks
  real t_adc = 400.0 * (1.0 - 0.004);
  always #1600 txcki = ~txcki;
  initial begin #37; forever #100 tx_bitclk = ~tx_bitclk; end
  initial begin #150; forever #(t_adc / 2.0) rx_clk_adc = ~rx_clk_adc; end

  // transmit data
  always @(posedge txcki) txdin <= 16'($urandom);

  // record the serial streams
  localparam int MAXB = 200000;
  real lev [MAXB];
  bit  dbit [MAXB];
  int  nb = 0, n_under = 0, n_deemph = 0;
  realtime tb0 = -1;
  always @(negedge tx_bitclk) if (rst_n && nb < MAXB) begin
    if (tb0 < 0) tb0 = $realtime - 100.0;
    dbit[nb] = tx_main;
    lev[nb]  = 0.834 * (tx_main ? 1.0 : -1.0) - 0.166 * (tx_post ? 1.0 : -1.0);
    if (tx_main != tx_post) n_deemph++;
    nb++;
  end
  always @(posedge tx_bitclk) if (rst_n && tx_underrun) n_under++;

  // channel and ADC comparator arrays
  function automatic real vline(real u);
    real c, f;
    int k;
    c = u - 0.5;
    k = int'($floor(c));
    f = c - k;
    if (k < 0 || k + 1 >= nb) return 0.0;
    return lev[k] + (lev[k + 1] - lev[k]) * f;
  endfunction

  always @(posedge rx_clk_adc) begin
    for (int k = 0; k < 4; k++) begin
      real ts, u, x;
      int code;
      ts = $realtime + k * t_adc / 4.0 - 20000.0;     // 20 ns channel delay
      u  = (tb0 < 0) ? -10.0 : (ts - tb0) / 200.0;
      x  = 0.2 * (vline(u) + 0.8 * vline(u - 0.5) + 0.4 * vline(u - 1.0));
      code = int'($floor((x + 0.4) / 0.025));
      if (code < 0) code = 0;
      if (code > 31) code = 31;
      for (int i = 1; i < 32; i++) adc_therm[k][i] <= (i <= code);
      adc_therm[k][0]  <= (x > -0.4);
      adc_therm[k][32] <= (x >= 0.4);
    end
  end

  // receive side
  bit rxb[$];
  int n_af = 0, nwords = 0, nslip_f = 0, nslip_s = 0, nv [4], nbk = 0;
  always @(posedge dut.clk_bk) if (rst_n) begin
    nbk++;
    if (slip == SLIP_FASTER) nslip_f++;
    if (slip == SLIP_SLOWER) nslip_s++;
    if (nbk == 5000) t_adc = 400.0 * (1.0 + 0.004);
  end
  always @(posedge rxcko) if (rst_n) begin
    nwords++;
    nv[rxvalid]++;
    if (gb_almost_full) n_af++;
    if (nwords > 1500 && rxvalid != RXV_NONE)
      for (int i = 0; i < 15 + int'(rxvalid); i++) rxb.push_back(rxdo[i]);
  end

  initial begin
    for (int k = 0; k < 4; k++) adc_therm[k] = '0;
    #1 rst_n = 0;
    #5000 rst_n = 1;
    wait (nbk == 9000);
    begin
      int off, errs;
      off = -1; errs = 0;
      for (int o = 0; o < nb - 64 && off < 0; o++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 64; i++) if (rxb[i] != dbit[o + i]) begin ok = 0; break; end
        if (ok) off = o;
      end
      checks++;
      if (off < 0) begin failures++; $display("no alignment found"); end
      else begin
        for (int i = 0; i < rxb.size() && off + i < nb; i++) begin
          checks++;
          if (rxb[i] != dbit[off + i]) begin
            failures++; errs++;
            if (errs < 5) $display("bit %0d wrong", i);
          end
        end
        $display("received %0d bits after settling, %0d errors", rxb.size(), errs);
      end
    end
    $display("taps C0=%0d C1=%0d", c0, c1);
    $display("underruns=%0d deemphasised bits=%0d slips faster=%0d slower=%0d widths 15/16/17=%0d/%0d/%0d",
             n_under, n_deemph, nslip_f, nslip_s, nv[0], nv[1], nv[2]);
    $display("gearbox almost-full words=%0d overflow=%0b", n_af, gb_overflow);
    checks += 10;
    if (n_af == 0) begin failures++; $display("gearbox never almost full"); end
    if (!(c1 < 0)) begin failures++; $display("C1 not adapted"); end
    if (!(c0 > 4)) begin failures++; $display("C0 not adapted"); end
    if (n_under == 0) begin failures++; $display("no FIFO underrun"); end
    if (n_deemph == 0) begin failures++; $display("no de-emphasis"); end
    if (nslip_f == 0) begin failures++; $display("no faster slip"); end
    if (nslip_s == 0) begin failures++; $display("no slower slip"); end
    if (nv[0] == 0) begin failures++; $display("no 15-bit word"); end
    if (nv[1] == 0) begin failures++; $display("no 16-bit word"); end
    if (nv[2] == 0) begin failures++; $display("no 17-bit word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
