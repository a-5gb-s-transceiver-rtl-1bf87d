// tx_serializer: 16-to-1 transmit multiplexer with the two data paths that
// feed the 2-tap FIR output driver.
// Every 16 bit-clock cycles a divide-by-16 counter (the transmit "Fdiv")
// loads the next 16-bit word from the FIFO. Two 1:16 shift registers then
// send it out one bit per cycle, LSB first: the main path carries d[n], the
// second path carries the same word shifted by one bit, d[n-1], whose first
// bit is the last bit of the previous word held in a flop ("FF"). The analog
// driver subtracts a scaled d[n-1] from d[n] to de-emphasise (nominally
// 3.5 dB); that driver is outside this module.
// Interface: clk is the serial bit clock (one edge per 200 ps bit); the real
// circuit uses the PLL's 4-phase 2.5 GHz clock, which this single-rate model
// replaces. fifo_rd pops the FIFO head word fifo_data when fifo_empty is low
// at a word boundary; word_tick marks that boundary. If the FIFO is empty at
// a boundary the serializer sends an all-zero word and pulses underrun.
// From the description: 16:1 multiplexing, two paths, the FF and the divider.
// This design's choices: LSB-first order, single-rate clocking, zero fill on
// underrun.
module tx_serializer #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] fifo_data,
  input  logic         fifo_empty,
  output logic         fifo_rd,
  output logic         word_tick,
  output logic         underrun,
  output logic         tx_main,    // d[n]
  output logic         tx_post     // d[n-1]
);
  logic [$clog2(W)-1:0] cnt;
  logic [W-1:0] main_sr, post_sr;
  logic         last_bit;          // bit W-1 of the word last loaded
  logic [W-1:0] next_word;

  assign word_tick = (cnt == ($clog2(W))'(W-1));
  assign fifo_rd   = word_tick && !fifo_empty;
  assign next_word = fifo_empty ? '0 : fifo_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      main_sr  <= '0;
      post_sr  <= '0;
      last_bit <= 1'b0;
      underrun <= 1'b0;
    end else begin
      cnt      <= cnt + 1'b1;
      underrun <= 1'b0;
      if (word_tick) begin
        main_sr  <= next_word;
        post_sr  <= {next_word[W-2:0], last_bit};
        last_bit <= next_word[W-1];
        underrun <= fifo_empty;
      end else begin
        main_sr <= main_sr >> 1;
        post_sr <= post_sr >> 1;
      end
    end
  end

  assign tx_main = main_sr[0];
  assign tx_post = post_sr[0];
endmodule
