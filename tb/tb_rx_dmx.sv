// tb_rx_dmx: self-checking test of the 4:16 demultiplexer.
// Slice k of ADC clock t carries the value (4t + k) mod 32, so the 16
// samples of each word must be consecutive; the back-end clock must run at
// a quarter of the ADC clock, and each word must hold the 16 samples of one
// group (first sample 16 on from the previous word's, modulo 32).
`timescale 1ps/1ps
module tb_rx_dmx;
  logic clk_adc = 0, rst_n = 0, clk_bk;
  logic [4:0] adc_code [4];
  logic [4:0] samples [16];
  logic [4:0] prev0;
  int checks = 0, failures = 0, t = 0, nb = 0;
  realtime last_rise = 0;

  rx_dmx #(.B(5), .NA(4), .NP(16)) dut (.clk_adc, .rst_n, .adc_code, .samples, .clk_bk);
  always #200 clk_adc = ~clk_adc;

  always @(posedge clk_adc) begin
    for (int k = 0; k < 4; k++) adc_code[k] <= 5'((4 * t + k) % 32);
    t <= t + 1;
  end

  always @(posedge clk_bk) begin
    if (nb > 1) begin
      checks++;
      if ($realtime - last_rise != 1600) begin failures++; $display("clk_bk period %0t", $realtime - last_rise); end
      checks++;
      if (samples[0] !== 5'(prev0 + 5'd16)) begin failures++; $display("word starts at %0d after %0d", samples[0], prev0); end
      for (int i = 1; i < 16; i++) begin
        checks++;
        if (samples[i] !== 5'(samples[0] + 5'(i))) begin failures++; $display("sample %0d = %0d", i, samples[i]); end
      end
    end
    last_rise = $realtime;
    prev0 = samples[0];
    nb++;
  end

  initial begin
    for (int k = 0; k < 4; k++) adc_code[k] = '0;
    #1000 rst_n = 1;
    wait (nb == 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
