// tx_fifo: transmit-side clock-domain-crossing FIFO.
// The user's 16-bit words arrive on TXDIN with the external 312.5 MHz clock
// TXCKI; the serializer reads them in the transmit clock domain that the
// divider derives from the PLL. The two clocks have the same nominal rate
// but an unknown phase, so this is an asynchronous FIFO: binary pointers in
// each domain, Gray-coded copies passed through two-flop synchronizers, full
// and empty computed from the synchronized Gray pointers.
// Interface: write side (wclk, wrst_n, wr_en, wdata, full), read side
// (rclk, rrst_n, rd_en, rdata, empty). rdata is the head word, valid while
// empty is low; rd_en pops it. A write while full and a read while empty are
// ignored (and flagged by assertions). Latency write-to-visible is the
// synchronizer delay, 2-3 read clocks.
// The block is named in the transmitter diagram; depth, the Gray-pointer
// scheme and the show-ahead read are this design's choices.
module tx_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = 3     // depth = 2**AW
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray;  // read pointer seen in write domain
  logic [AW:0] rq1_wgray, rq2_wgray;  // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      full  <= 1'b0;
    end else begin
      wbin  <= wbin_nxt;
      wgray <= bin2gray(wbin_nxt);
      full  <= (bin2gray(wbin_nxt) ==
                {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
    end
  end
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) {wq2_rgray, wq1_rgray} <= '0;
    else         {wq2_rgray, wq1_rgray} <= {wq1_rgray, rgray};
  end

  // Read domain
  logic [AW:0] rbin_nxt;
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      empty <= 1'b1;
    end else begin
      rbin  <= rbin_nxt;
      rgray <= bin2gray(rbin_nxt);
      empty <= (bin2gray(rbin_nxt) == rq2_wgray);
    end
  end
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) {rq2_wgray, rq1_wgray} <= '0;
    else         {rq2_wgray, rq1_wgray} <= {rq1_wgray, wgray};
  end
  assign rdata = mem[rbin[AW-1:0]];

  // The producer must respect full; the consumer must respect empty.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n)
                                  !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n)
                                   !(rd_en && empty));
endmodule
