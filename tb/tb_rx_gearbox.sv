// tb_rx_gearbox: self-checking test of the 15/16/17-to-16 bit width
// converter. Random words with random RXVALID codes (including 11, no
// data) go in every clock; the consumer pops at random when a word is
// available. A bit queue is the reference: dout must be its oldest 16 bits,
// level its length and almost_full its length >= 48. A phase with the
// consumer stalled forces the buffer to overflow: the words that do not fit
// must be dropped whole and the sticky overflow flag must rise.
`timescale 1ps/1ps
module tb_rx_gearbox;
  import xcvr_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [16:0] rxdo;
  rxvalid_e rxvalid;
  logic rd_en;
  logic [15:0] dout;
  logic dvalid, almost_full, overflow;
  logic [6:0] level;
  int checks = 0, failures = 0, n_af = 0, n_drop = 0;
  bit q[$];
  bit stall = 0;

  rx_gearbox #(.DEPTH(64), .AFULL(48)) dut (.*);
  always #1600 clk = ~clk;

  initial begin
    rxdo = '0; rxvalid = RXV_NONE; rd_en = 0;
    #1 rst_n = 0;
    #2000 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int n;
      @(negedge clk);
      stall = (it >= 1000 && it < 1040);
      rxdo = 17'($urandom);
      case ($urandom_range(0, 9))
        0: rxvalid = RXV_NONE;
        1, 2: rxvalid = RXV_15;
        3, 4: rxvalid = RXV_17;
        default: rxvalid = RXV_16;
      endcase
      rd_en = dvalid && !stall && ($urandom_range(0, 9) != 0);
      #1;
      // compare the combinational outputs with the reference
      checks += 3;
      if (int'(level) != q.size()) begin failures++; $display("it %0d level %0d exp %0d", it, level, q.size()); end
      if (dvalid != (q.size() >= 16)) begin failures++; $display("dvalid"); end
      if (almost_full != (q.size() >= 48)) begin failures++; $display("almost_full"); end
      if (almost_full) n_af++;
      if (dvalid) begin
        logic [15:0] e;
        for (int i = 0; i < 16; i++) e[i] = q[i];
        checks++;
        if (dout !== e) begin failures++; $display("it %0d dout %h exp %h", it, dout, e); end
      end
      // reference update at the coming edge
      n = (rxvalid == RXV_NONE) ? 0 : 15 + int'(rxvalid);
      if (q.size() + n > 64 + (rd_en ? 16 : 0)) n_drop++;
      else for (int i = 0; i < n; i++) q.push_back(rxdo[i]);
      if (rd_en) for (int i = 0; i < 16; i++) void'(q.pop_front());
    end
    checks += 3;
    if (n_drop == 0) begin failures++; $display("no overflow exercised"); end
    if (!overflow) begin failures++; $display("overflow flag not set"); end
    if (n_af == 0) begin failures++; $display("almost_full never seen"); end
    $display("drops=%0d almost_full cycles=%0d", n_drop, n_af);
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
