// tb_cma_channel: equalizer workload - FFE with CMA adaptation behind a
// lossy channel, in the conditions of the published adaptation example:
// 2^7-1 PRBS at 5 Gb/s, 0.8 Vppd transmit swing with 3.5 dB de-emphasis, a
// channel with 15 dB loss at 2.5 GHz and taps starting at (C0, C1) = (4, 0).
// Behavioural analog models (this test's own): the channel is a single
// real pole placed so that its loss at 2.5 GHz is 15 dB; the analog
// equalizer adds 6 dB of high-frequency boost as x + (x - lowpass(x)) with
// its corner at 1 GHz; the ADC quantizes 800 mVpp into 32 levels at two
// samples per UI. Signals are integrated 32 steps per UI.
// The ffe and cma_adapt blocks run at their default sizes (MU_SH = 10)
// with d = 64. The test checks that C1 becomes negative and C0 grows, as
// in the example, and that the equalized eye opens: at the better of the
// two sample phases, the smallest |y| over the last 2 000 cycles must be
// larger than over the first 200 cycles and above 16 codes.
`timescale 1ps/1ps
module tb_cma_channel;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  logic [4:0] samples [16];
  logic signed [4:0] c0, c1;
  logic signed [9:0] y [16];
  logic signed [4:0] s0 [16], s1 [16];
  logic [3:0] sel;
  int checks = 0, failures = 0;

  ffe u_ffe (.clk, .samples, .c0, .c1, .y, .s0, .s1);
  cma_adapt u_cma (.clk, .rst_n, .adapt_en(1'b1), .d(9'd64), .y, .s0, .s1, .sel, .c0, .c1);
  always #800 clk = ~clk;

  // transmitter + channel + analog equalizer state
  bit lfsr [7];
  bit prev_bit = 0;
  real ch = 0.0, lp = 0.0;
  real a_ch, a_lp;
  int  step = 0;

  function automatic bit prbs7();
    bit nb = lfsr[6] ^ lfsr[5];
    for (int i = 6; i > 0; i--) lfsr[i] = lfsr[i-1];
    lfsr[0] = nb;
    return nb;
  endfunction

  // advance the analog chain by one UI (32 steps), returning the two
  // samples taken at steps 0 and 16
  real cur_level;
  task automatic one_ui(output real sa, output real sb);
    bit b = prbs7();
    cur_level = 0.4 * (0.834 * (b ? 1.0 : -1.0) - 0.166 * (prev_bit ? 1.0 : -1.0));
    prev_bit = b;
    for (int k = 0; k < 32; k++) begin
      real eq;
      ch = ch + a_ch * (cur_level - ch);
      lp = lp + a_lp * (ch - lp);
      eq = ch + (ch - lp);
      if (k == 8)  sa = eq;
      if (k == 24) sb = eq;
    end
  endtask

  function automatic logic [4:0] adc(real v);
    int c = int'($floor((v + 0.4) / 0.025));
    if (c < 0) c = 0;
    if (c > 31) c = 31;
    return 5'(c);
  endfunction

  int cyc = 0;
  int min_early [2], min_late [2];
  always @(negedge clk) begin
    for (int u = 0; u < 8; u++) begin
      real sa, sb;
      one_ui(sa, sb);
      samples[2 * u]     <= adc(sa);
      samples[2 * u + 1] <= adc(sb);
    end
    cyc++;
  end
  always @(posedge clk) if (rst_n && cyc > 3) begin
    for (int n = 0; n < 16; n++) begin
      int m;
      m = (y[n] < 0) ? -int'(y[n]) : int'(y[n]);
      if (cyc < 200 && m < min_early[n % 2]) min_early[n % 2] = m;
      if (cyc >= 18000 && m < min_late[n % 2]) min_late[n % 2] = m;
    end
  end

  initial begin
    real fc, dt;
    for (int i = 0; i < 7; i++) lfsr[i] = 1'b1;
    for (int i = 0; i < 16; i++) samples[i] = 5'd16;
    // pole for 15 dB at 2.5 GHz: |H| = 1/sqrt(1+(f/fc)^2)
    fc = 2.5e9 / $sqrt($pow(10.0, 1.5) - 1.0);
    dt = 200.0e-12 / 32.0;
    a_ch = 1.0 - $exp(-2.0 * PI * fc * dt);
    a_lp = 1.0 - $exp(-2.0 * PI * 1.0e9 * dt);
    min_early[0] = 999; min_early[1] = 999; min_late[0] = 999; min_late[1] = 999;
    #1 rst_n = 0;
    #3000 rst_n = 1;
    wait (cyc == 20000);
    $display("channel pole %0.0f MHz; taps (C0,C1) = (%0d,%0d)", fc / 1e6, c0, c1);
    $display("smallest |y| at the two phases: first 200 cycles %0d/%0d, last 2000 cycles %0d/%0d",
             min_early[0], min_early[1], min_late[0], min_late[1]);
    begin
      int e, l;
      e = (min_early[0] > min_early[1]) ? min_early[0] : min_early[1];
      l = (min_late[0] > min_late[1]) ? min_late[0] : min_late[1];
      checks += 4;
      if (!(c1 < 0)) begin failures++; $display("C1 did not become negative"); end
      if (!(c0 > 4)) begin failures++; $display("C0 did not grow"); end
      if (!(l > e)) begin failures++; $display("eye did not open further"); end
      if (!(l > 16)) begin failures++; $display("eye not open"); end
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
