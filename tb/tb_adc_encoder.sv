// tb_adc_encoder: self-checking test of the thermometer -> Gray -> binary
// encoder. Every level 0..31 is applied as a clean thermometer code (with
// the range-end comparators <0> and <32> set as the input would set them);
// the registered code must equal the level one clock later and the Gray
// output must equal level ^ (level >> 1).
`timescale 1ps/1ps
module tb_adc_encoder;
  logic clk = 0;
  logic [32:0] therm;
  logic [4:0] gray, code;
  int checks = 0, failures = 0;

  adc_encoder #(.B(5), .NCMP(33)) dut (.clk, .therm, .gray, .code);
  always #200 clk = ~clk;

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int lv = 0; lv < 32; lv++) begin
        automatic int l = (rep == 1) ? 31 - lv : (rep > 1 ? $urandom_range(0, 31) : lv);
        for (int i = 0; i < 33; i++) therm[i] = (i <= l);
        therm[0]  = 1'b1;
        therm[32] = (l == 31) && (rep == 3);
        #1;
        checks++;
        if (gray !== 5'(l ^ (l >> 1))) begin failures++; $display("gray %b for %0d", gray, l); end
        @(posedge clk); #1;
        checks++;
        if (code !== 5'(l)) begin failures++; $display("code %0d for %0d", code, l); end
      end
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
