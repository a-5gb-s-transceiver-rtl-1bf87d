// width_dmx: data-width controller and 2:1 demultiplexer at the CDR output.
// The data pick-up logic delivers 7, 8 or 9 bits per 625 MHz cycle. Two
// consecutive cycles are packed into one 312.5 MHz word of 15, 16 or 17
// bits, the first cycle's bits in the low positions, and RXVALID says how
// many are valid: 00 -> RXDO[14:0], 01 -> RXDO[15:0], 10 -> RXDO[16:0].
// Because ph_av moves far less than a UI per cycle, at most one slip of a
// given direction falls into a pair, so the sum stays in 15..17; a pair
// summing to 14 or 18 is flagged by an assertion and reported as 11 (no
// valid data).
// Interface: clk 625 MHz. rxcko is the divided-by-2 output clock (the
// "Fdiv" next to the CDR); rxdo and rxvalid change on its falling edge, so
// they are stable at its rising edge. Latency: the word appears with the
// clock edge after the second cycle's bits.
// From the description: 7/8/9-bit words, 15/16/17-bit output at
// 312.5 MHz, the RXVALID encoding. This design's choices: bit order within
// the word and the output clock phase.
module width_dmx
  import xcvr_pkg::*;
#(
  parameter int unsigned NB = UI_PER_CYC + 1,
  parameter int unsigned OW = RXD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NB-1:0] bits,
  input  logic [3:0]    nbits,
  output logic [OW-1:0] rxdo,
  output rxvalid_e      rxvalid,
  output logic          rxcko
);
  logic [NB-1:0] first_bits;
  logic [3:0]    first_n;
  logic [4:0]    total;
  logic [2*NB-1:0] packed_w;
  logic          primed;      // a first half has been captured since reset

  assign total    = 5'(first_n) + 5'(nbits);
  assign packed_w = (2*NB)'(first_bits & NB'((1 << first_n) - 1))
                  | ((2*NB)'(bits & NB'((1 << nbits) - 1)) << first_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxcko      <= 1'b0;
      first_bits <= '0;
      first_n    <= '0;
      rxdo       <= '0;
      rxvalid    <= RXV_NONE;
      primed     <= 1'b0;
    end else begin
      rxcko <= ~rxcko;
      if (!rxcko) begin
        first_bits <= bits;
        first_n    <= nbits;
        primed     <= 1'b1;
      end else begin
        rxdo <= OW'(packed_w);
        unique case (total)
          5'd15:   rxvalid <= RXV_15;
          5'd16:   rxvalid <= RXV_16;
          5'd17:   rxvalid <= RXV_17;
          default: rxvalid <= RXV_NONE;
        endcase
      end
    end
  end

  a_width_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                     (rxcko && primed) |-> (total inside {[15:17]}));
endmodule
