// rx_gearbox: receive-side width converter of the PHY logic.
// The CDR hands over 15, 16 or 17 valid bits per 312.5 MHz word (RXVALID
// 00/01/10) because it inserts or removes a bit on every phase slip. This
// block appends the valid bits of each word to a bit buffer and, whenever
// at least 16 bits are buffered and the consumer asks (rd_en), delivers the
// oldest 16 as a fixed-width word. In the long run the CDR delivers as many
// bits as the far-end transmitter sends, so when that transmitter runs
// faster than the local clock the buffer fills; almost_full is the
// flow-control signal with which the PHY layer must then drop or defer
// data (for instance skip symbols) so that the buffer never overflows.
// Bits that would not fit are dropped and counted in the sticky overflow.
// Interface: clk is RXCKO; rxdo/rxvalid are taken every clock. dout is the
// head word, valid while dvalid is high; rd_en pops it in the same clock.
// level is the number of buffered bits.
// From the description: conversion of 15/16/17-bit words into fixed 16-bit
// words through a FIFO, and PHY flow control against overflow. This
// design's choices: the bit-buffer structure, its depth and the
// almost-full threshold.
module rx_gearbox
  import xcvr_pkg::*;
#(
  parameter int unsigned DEPTH = 64,   // buffer bits
  parameter int unsigned AFULL = 48    // almost-full threshold in bits
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RXD_W-1:0] rxdo,
  input  rxvalid_e         rxvalid,
  input  logic             rd_en,
  output logic [15:0]      dout,
  output logic             dvalid,
  output logic             almost_full,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] bitbuf;
  logic [LW-1:0]    n_in;
  logic             pop, drop;

  always_comb begin
    unique case (rxvalid)
      RXV_15:  n_in = LW'(15);
      RXV_16:  n_in = LW'(16);
      RXV_17:  n_in = LW'(17);
      default: n_in = '0;
    endcase
  end

  assign dvalid      = (level >= LW'(16));
  assign dout        = bitbuf[15:0];
  assign pop         = rd_en && dvalid;
  assign drop        = (32'(level) + 32'(n_in) > DEPTH + (pop ? 16 : 0));
  assign almost_full = (level >= LW'(AFULL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitbuf   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      automatic logic [DEPTH+RXD_W-1:0] ext;
      automatic logic [RXD_W-1:0] din;
      automatic logic [LW-1:0] lvl;
      din = rxdo & RXD_W'((1 << n_in) - 1);
      ext = (DEPTH+RXD_W)'(bitbuf) | ((DEPTH+RXD_W)'(drop ? '0 : din) << level);
      lvl = level + (drop ? '0 : n_in);
      if (pop) begin
        ext = ext >> 16;
        lvl = lvl - LW'(16);
      end
      bitbuf <= DEPTH'(ext);
      level  <= lvl;
      if (drop) overflow <= 1'b1;
    end
  end

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                        rd_en |-> dvalid);
endmodule
