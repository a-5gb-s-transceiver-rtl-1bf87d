// ff_cdr: feed-forward clock and data recovery of the receiver back-end.
// Phase tracking and data decision are done on numbers: the sampling clock
// is never moved. The zero-crossing phase detector turns the 16 equalized
// samples of each 625 MHz cycle into instantaneous crossing phases; the
// second-order loop averages them into ph_av and reports phase slips; the
// data pick-up logic slices the sample nearest the eye centre ph_av + 0.5 UI
// and emits 7, 8 or 9 bits; the width controller packs two cycles into a
// 15/16/17-bit word at 312.5 MHz with RXVALID.
// Interface: clk 625 MHz back-end clock, rst_n async reset, y the 10-bit
// FFE outputs. rxdo/rxvalid/rxcko are the receive pins; ph_av, slip and n_zc
// are brought out for observation. Latency from y to rxdo: 2-4 clocks.
// The structure follows the CDR diagram; the sub-blocks list their own
// choices.
module ff_cdr
  import xcvr_pkg::*;
#(
  parameter int unsigned YW    = FFE_W,
  parameter int unsigned NP    = N_PAR,
  parameter int unsigned PF    = 8,
  parameter int unsigned G1_SH = 2,
  parameter int unsigned G2_SH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] y [NP],
  output logic [RXD_W-1:0]     rxdo,
  output rxvalid_e             rxvalid,
  output logic                 rxcko,
  output logic [PH_B+PF-1:0]   ph_av,
  output slip_e                slip,
  output logic [$clog2(NP+1)-1:0] n_zc
);
  logic            zc_valid [NP];
  logic [PH_B-1:0] ph [NP];
  logic [UI_PER_CYC:0] bits;
  logic [3:0]      nbits;

  zc_phase_det #(.YW(YW), .NP(NP)) u_pd (
    .clk, .y, .zc_valid, .ph);

  cdr_loop #(.NP(NP), .PF(PF), .G1_SH(G1_SH), .G2_SH(G2_SH)) u_loop (
    .clk, .rst_n, .zc_valid, .ph, .ph_av, .slip, .n_zc);

  data_pick #(.YW(YW), .NP(NP), .PF(PF)) u_pick (
    .clk, .rst_n, .y, .ph_av, .slip, .bits, .nbits);

  width_dmx #(.NB(UI_PER_CYC + 1), .OW(RXD_W)) u_wdmx (
    .clk, .rst_n, .bits, .nbits, .rxdo, .rxvalid, .rxcko);
endmodule
