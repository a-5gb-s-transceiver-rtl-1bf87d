// tb_width_dmx: self-checking test of the data-width controller.
// Random 7/8/9-bit groups are fed at the 625 MHz rate, paired so that each
// pair sums to 15, 16 or 17 bits. At every rising edge of rxcko the
// output word must hold the pair's bits, first group in the low positions,
// and RXVALID must be 00/01/10 for 15/16/17 bits. The rxcko period must be
// two input clocks, and each of the three widths must occur.
`timescale 1ps/1ps
module tb_width_dmx;
  import xcvr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [8:0] bits;
  logic [3:0] nbits;
  logic [16:0] rxdo;
  rxvalid_e rxvalid;
  logic rxcko;
  int checks = 0, failures = 0, cnt = 0, nw [3];
  int exp_w[$], exp_v[$];
  realtime last_r = 0;

  width_dmx #(.NB(9), .OW(17)) dut (.*);
  always #800 clk = ~clk;

  // stimulus: change on negedge; the first group of a pair is the one
  // presented while rxcko is low
  int first_n, first_b;
  bit have_first = 0;
  always @(negedge clk) if (rst_n) begin
    if (!rxcko) begin
      first_n = $urandom_range(7, 9);
      first_b = $urandom_range(0, (1 << first_n) - 1);
      nbits <= 4'(first_n);
      bits  <= 9'(first_b | ($urandom << first_n));
      have_first = 1;
    end else if (have_first) begin
      int n2, b2, tot;
      n2 = (first_n == 7) ? $urandom_range(8, 9) : (first_n == 9 ? $urandom_range(7, 8) : $urandom_range(7, 9));
      b2 = $urandom_range(0, (1 << n2) - 1);
      nbits <= 4'(n2);
      bits  <= 9'(b2 | ($urandom << n2));
      tot = first_n + n2;
      exp_w.push_back(first_b | (b2 << first_n));
      exp_v.push_back(tot - 15);
    end
  end

  always @(posedge rxcko) if (rst_n) begin
    if (cnt > 1) begin
      checks++;
      if ($realtime - last_r != 3200) begin failures++; $display("rxcko period %0t", $realtime - last_r); end
    end
    last_r = $realtime;
    if (exp_w.size() > 0) begin
      automatic int w = exp_w.pop_front();
      automatic int v = exp_v.pop_front();
      automatic int mask = (1 << (15 + v)) - 1;
      checks += 2;
      nw[v]++;
      if (int'(rxvalid) != v) begin failures++; $display("rxvalid %0d exp %0d", rxvalid, v); end
      if ((int'(rxdo) & mask) != w) begin failures++; $display("rxdo %h exp %h", rxdo, w); end
    end
    cnt++;
  end

  initial begin
    bits = '0; nbits = 4'd8;
    #2000 rst_n = 1;
    wait (cnt == 1000);
    for (int v = 0; v < 3; v++) begin
      checks++;
      if (nw[v] == 0) begin failures++; $display("width %0d never seen", 15 + v); end
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
