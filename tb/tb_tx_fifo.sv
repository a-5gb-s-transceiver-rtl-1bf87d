// tb_tx_fifo: self-checking test of the asynchronous transmit FIFO.
// Writer and reader run on unrelated clocks (3.2 ns and 3.7 ns) with random
// enables; every word read must equal the oldest word written (checked
// against a queue), full and empty must never be violated, and the FIFO must
// have reached full at least once and empty at least once after traffic.
`timescale 1ps/1ps
module tb_tx_fifo;
  localparam int W = 16, AW = 3;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en, rd_en, want_w = 0, want_r = 0, full, empty;
  assign wr_en = want_w && !full;
  assign rd_en = want_r && !empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0, n_full = 0, n_read = 0;
  logic [W-1:0] q[$];

  tx_fifo #(.W(W), .AW(AW)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full,
                                 .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty);

  always #1600 wclk = ~wclk;
  always #1850 rclk = ~rclk;

  // writer: bursts faster than the reader in the first half, slower later
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) q.push_back(wdata);
    if (full) n_full++;
    want_w <= ($urandom_range(0, 99) < (n_read < 300 ? 90 : 30));
    wdata <= W'($urandom);
  end
  always @(posedge rclk) if (rst_n) begin
    if (rd_en && !empty) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("read with no word written"); end
      else begin
        automatic logic [W-1:0] e = q.pop_front();
        if (rdata !== e) begin failures++; $display("data %h exp %h", rdata, e); end
      end
      n_read++;
    end
    want_r <= ($urandom_range(0, 99) < 70);
  end

  initial begin
    #10000 rst_n = 1;
    wait (n_read >= 600);
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
