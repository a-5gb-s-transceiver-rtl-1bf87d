// tb_ffe: self-checking test of the 16-way 2-tap FFE.
// Random ADC codes and random signed coefficients are applied each cycle;
// one clock later every output must equal C0*(x[n]-16) + C1*(x[n-1]-16),
// saturated to 10 bits, where x[-1] is the last code of the previous cycle.
// Full-scale codes with extreme coefficients exercise the saturation.
`timescale 1ps/1ps
module tb_ffe;
  logic clk = 0;
  logic [4:0] samples [16];
  logic signed [4:0] c0, c1;
  logic signed [9:0] y [16];
  logic signed [4:0] s0 [16], s1 [16];
  int checks = 0, failures = 0, n_sat = 0;

  ffe #(.B(5), .CW(5), .YW(10), .NP(16)) dut (.*);
  always #800 clk = ~clk;

  int exp_y [16];
  int last_code;
  initial begin
    last_code = 16;
    for (int i = 0; i < 16; i++) samples[i] = 5'd16;
    c0 = 0; c1 = 0;
    @(posedge clk); #1;
    for (int it = 0; it < 400; it++) begin
      automatic int prev = last_code;
      for (int i = 0; i < 16; i++)
        samples[i] = (it % 7 == 3) ? 5'd0 : 5'($urandom_range(0, 31));
      c0 = (it % 7 == 3) ? -5'sd16 : 5'($urandom);
      c1 = (it % 7 == 3) ? -5'sd16 : 5'($urandom);
      for (int i = 0; i < 16; i++) begin
        automatic int xc = int'(samples[i]) - 16;
        automatic int xp = ((i == 0) ? prev : int'(samples[i-1])) - 16;
        automatic int v = int'(c0) * xc + int'(c1) * xp;
        if (v > 511) begin v = 511; n_sat++; end
        if (v < -512) begin v = -512; n_sat++; end
        exp_y[i] = v;
      end
      last_code = samples[15];
      @(posedge clk); #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(y[i]) != exp_y[i]) begin failures++; $display("it %0d y[%0d]=%0d exp %0d", it, i, y[i], exp_y[i]); end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
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
