// tb_tx_serializer: self-checking test of the 16:1 serializer.
// A queue stands in for the FIFO and is sometimes left empty. Each popped
// word (or a zero word on underrun) must appear LSB first on tx_main over
// the following 16 bit clocks, tx_post must be tx_main delayed by one bit
// across word boundaries, and words must be taken exactly every 16 clocks.
`timescale 1ps/1ps
module tb_tx_serializer;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] fifo_data;
  logic fifo_empty, fifo_rd, word_tick, underrun, tx_main, tx_post;
  int checks = 0, failures = 0, n_under = 0, n_words = 0;
  logic [W-1:0] src[$];
  logic exp_bits[$];
  logic prev_bit = 1'b0;
  int last_tick = -1, cyc = 0;

  tx_serializer #(.W(W)) dut (.*);

  assign fifo_empty = (src.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : src[0];

  always #100 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (word_tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != W) begin failures++; $display("word period %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      for (int i = 0; i < W; i++) exp_bits.push_back(fifo_empty ? 1'b0 : src[0][i]);
      if (fifo_empty) n_under++;
      else begin src.pop_front(); n_words++; end
      if ($urandom_range(0, 9) != 0) src.push_back(W'($urandom));
    end
  end

  always @(negedge clk) if (rst_n && exp_bits.size() > 0 && last_tick >= 0 && cyc > last_tick - W) begin
    automatic logic e = exp_bits.pop_front();
    checks++;
    if (tx_main !== e || tx_post !== prev_bit) begin
      failures++;
      $display("bit main %b exp %b post %b exp %b", tx_main, e, tx_post, prev_bit);
    end
    prev_bit = e;
  end

  initial begin
    src.push_back(16'hA5C3);
    #1000 rst_n = 1;
    wait (n_words >= 200);
    checks++;
    if (n_under == 0) begin failures++; $display("no underrun exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
