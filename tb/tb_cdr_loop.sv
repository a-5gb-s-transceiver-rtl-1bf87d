// tb_cdr_loop: self-checking test of the CDR's second-order averaging loop.
// Part 1 applies random crossing patterns and compares ph_av and slip each
// cycle with a reference model written from the loop equations (signed
// modulo-1UI error, average by division, F += avg/4, P += F/16,
// ph_av = P + F mod 1 UI). Part 2 feeds crossings whose phase drifts by
// -0.04 UI per cycle (data 0.5 % faster than the sampling clock) and then
// +0.04 UI per cycle, and checks that the loop follows (error below 1/8 UI
// after settling) and reports slips in the right direction at the expected
// rate (one per 25 cycles, counted after 300 cycles of settling).
`timescale 1ps/1ps
module tb_cdr_loop;
  import xcvr_pkg::*;
  localparam int PF = 8, PW = 11, ONE = 1 << PW;
  logic clk = 0, rst_n = 0;
  logic zc_valid [16];
  logic [2:0] ph [16];
  logic [PW-1:0] ph_av;
  slip_e slip;
  logic [4:0] n_zc;
  int checks = 0, failures = 0;

  cdr_loop #(.NP(16), .PF(PF), .G1_SH(2), .G2_SH(4)) dut (.*);
  always #800 clk = ~clk;

  int F, P, PH, SL;
  function automatic int wrap(int v); return ((v % ONE) + ONE) % ONE; endfunction
  function automatic int sdiv(int a, int b);  // truncating division
    return (a >= 0) ? a / b : -((-a) / b);
  endfunction

  task automatic model();
    int sum = 0, cnt = 0, avg, nph, d;
    for (int m = 0; m < 16; m++) if (zc_valid[m]) begin
      int e = wrap((int'(ph[m]) << PF) - PH);
      if (e >= ONE / 2) e -= ONE;
      sum += e; cnt++;
    end
    avg = (cnt == 0) ? 0 : sdiv(sum, cnt);
    F = F + (avg >>> 2);
    P = wrap(P + (F >>> 4));
    nph = wrap(P + F);
    d = nph - PH;
    SL = (d > ONE / 2) ? 1 : ((d < -ONE / 2) ? 2 : 0);
    PH = nph;
  endtask

  real true_ph;
  int n_fast, n_slow;
  initial begin
    for (int m = 0; m < 16; m++) begin zc_valid[m] = 0; ph[m] = 0; end
    F = 0; P = 0; PH = 0; SL = 0;
    #2000 rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      for (int m = 0; m < 16; m++) begin
        zc_valid[m] = ($urandom_range(0, 3) == 0);
        ph[m] = (it < 700) ? 3'($urandom_range(2, 4)) : 3'($urandom);
      end
      @(posedge clk); model(); #1;
      checks += 2;
      if (int'(ph_av) != PH) begin failures++; $display("it %0d ph_av %0d exp %0d", it, ph_av, PH); end
      if (int'(slip) != SL) begin failures++; $display("it %0d slip %0d exp %0d", it, slip, SL); end
    end
    // part 2: frequency offset in both directions
    for (int dir = 0; dir < 2; dir++) begin
      real rate;
      rate = (dir == 0) ? -0.04 : 0.04;
      n_fast = 0; n_slow = 0;
      true_ph = real'(ph_av) / ONE;
      for (int it = 0; it < 1000; it++) begin
        @(negedge clk);
        true_ph = true_ph + rate;
        if (true_ph < 0) true_ph += 1.0;
        if (true_ph >= 1.0) true_ph -= 1.0;
        for (int m = 0; m < 16; m++) begin
          zc_valid[m] = (m % 4 == 1);
          ph[m] = 3'(int'($floor(true_ph * 8 + 0.5)) % 8);
        end
        @(posedge clk); #1;
        if (it >= 300 && slip == SLIP_FASTER) n_fast++;
        if (it >= 300 && slip == SLIP_SLOWER) n_slow++;
        if (it > 300 && it % 10 == 0) begin
          real err;
          err = real'(ph_av) / ONE - true_ph;
          if (err > 0.5) err -= 1.0;
          if (err < -0.5) err += 1.0;
          checks++;
          if (err > 0.125 || err < -0.125) begin failures++; $display("dir %0d it %0d tracking error %f F=%0d avg=%0d ph=%0d phav=%0d", dir, it, err, dut.f_q, dut.avg, ph[1], ph_av); end
        end
      end
      $display("dir %0d: slips faster=%0d slower=%0d", dir, n_fast, n_slow);
      checks++;
      if (dir == 0 && !(n_fast >= 27 && n_fast <= 29 && n_slow == 0)) failures++;
      if (dir == 1 && !(n_slow >= 27 && n_slow <= 29 && n_fast == 0)) failures++;
    end
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
