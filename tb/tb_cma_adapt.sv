// tb_cma_adapt: self-checking test of the sign-sign CMA tap update.
// Part 1 drives random FFE outputs, tap inputs and target d, and follows the
// two coefficient accumulators with an independent model:
//   acc_k -= sgn(y) * sgn(y*y - d*d) * S_k  of the selected sample,
// saturated, coefficient = floor(acc / 2^MU_SH); c0/c1 are compared every
// cycle. Part 2 checks that adapt_en = 0 freezes the taps. Part 3 closes
// the loop through a small behavioural FFE and a channel with half-UI ISI
// (x[n] = a[n] + 0.5 a[n-1], binary a = +-4) and checks that C1 turns
// negative and the CMA cost falls, as in the published adaptation example
// that starts at (C0, C1) = (4, 0).
`timescale 1ps/1ps
module tb_cma_adapt;
  localparam int MU = 4;
  logic clk = 0, rst_n = 0, adapt_en = 0;
  logic [8:0] d;
  logic signed [9:0] y [16];
  logic signed [4:0] s0 [16], s1 [16];
  logic [3:0] sel;
  logic signed [4:0] c0, c1;
  int checks = 0, failures = 0;

  cma_adapt #(.B(5), .CW(5), .YW(10), .NP(16), .MU_SH(MU), .C0_INIT(4), .C1_INIT(0)) dut (.*);
  always #800 clk = ~clk;

  function automatic int sg(int v); return (v > 0) ? 1 : (v < 0 ? -1 : 0); endfunction
  function automatic int fdiv(int a, int sh); return (a >= 0) ? (a >> sh) : -((-a + (1 << sh) - 1) >> sh); endfunction

  int a0, a1, sref;
  real cost_early, cost_late;

  task automatic step_model();
    automatic int e = sg(int'(y[sref])) * sg(int'(y[sref]) * int'(y[sref]) - int'(d) * int'(d));
    if (adapt_en) begin
      a0 -= e * int'(s0[sref]);
      a1 -= e * int'(s1[sref]);
      if (a0 > 255) a0 = 255; if (a0 < -256) a0 = -256;
      if (a1 > 255) a1 = 255; if (a1 < -256) a1 = -256;
    end
    sref = (sref + 1) % 16;
  endtask

  always @(posedge clk) if (rst_n) step_model();

  initial begin
    for (int i = 0; i < 16; i++) begin y[i] = 0; s0[i] = 0; s1[i] = 0; end
    d = 9'd40;
    a0 = 4 << MU; a1 = 0; sref = 0;
    #2000 rst_n = 1;
    // part 1: random stimulus against the model
    adapt_en = 1;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        y[i]  = 10'($urandom_range(0, 160)) - 10'sd80;
        s0[i] = 5'($urandom); s1[i] = 5'($urandom);
      end
      if (it % 50 == 0) d = 9'($urandom_range(10, 70));
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(c0) != fdiv(a0, MU) || int'(c1) != fdiv(a1, MU)) begin
        failures++; $display("it %0d c=(%0d,%0d) exp (%0d,%0d)", it, c0, c1, fdiv(a0, MU), fdiv(a1, MU));
      end
    end
    // part 2: frozen
    adapt_en = 0;
    for (int it = 0; it < 50; it++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) y[i] = 10'($urandom_range(0, 160)) - 10'sd80;
      @(posedge clk); #1;
      checks++;
      if (int'(c0) != fdiv(a0, MU) || int'(c1) != fdiv(a1, MU)) begin failures++; $display("taps moved while frozen"); end
    end
    // part 3: closed loop from reset values
    rst_n = 0; #10 rst_n = 1;
    adapt_en = 1; d = 9'd40;
    cost_early = 0; cost_late = 0;
    begin
      int aprev = 4;
      for (int it = 0; it < 3000; it++) begin
        @(negedge clk);
        for (int i = 0; i < 16; i++) begin
          automatic int a = ($urandom_range(0, 1) != 0) ? 4 : -4;
          automatic int xs = a + aprev / 2;
          automatic int xp;
          s1[i] = (i == 0) ? s0[15] : s0[i-1];
          s0[i] = 5'(xs);
          aprev = a;
        end
        for (int i = 0; i < 16; i++) begin
          automatic int v = int'(c0) * int'(s0[i]) + int'(c1) * int'(s1[i]);
          y[i] = 10'(v);
          if (it < 200) cost_early += (v * v - 1600.0) ** 2;
          if (it >= 2800) cost_late += (v * v - 1600.0) ** 2;
        end
      end
    end
    checks++;
    if (!(c1 < 0)) begin failures++; $display("C1 did not turn negative: %0d", c1); end
    checks++;
    if (!(cost_late < 0.9 * cost_early)) begin failures++; $display("cost %f -> %f", cost_early, cost_late); end
    $display("closed loop: C0=%0d C1=%0d cost %0.3g -> %0.3g", c0, c1, cost_early / 3200, cost_late / 3200);
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
