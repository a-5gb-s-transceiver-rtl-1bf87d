// xcvr_top: digital core of a 5 Gb/s serial transceiver whose receiver
// samples the line with a free-running clock and recovers timing and data
// entirely in arithmetic.
// Transmit: 16-bit words on TXDIN/TXCKI (312.5 MHz) pass an asynchronous
// FIFO into the PLL's clock domain and are serialized 16:1 into a main bit
// stream and a one-bit-delayed copy for the 2-tap de-emphasis driver.
// Receive: four interleaved 5-bit flash ADC slices (comparator arrays
// outside this module) deliver thermometer codes at 2.5 GHz each; per-slice
// encoders make binary codes, a 4:16 demultiplexer forms 16-sample words at
// 625 MHz (two samples per UI), a half-UI 2-tap FFE equalizes them with taps
// adapted by sign-sign CMA, and the feed-forward CDR outputs 15/16/17-bit
// words with RXVALID at 312.5 MHz on RXCKO. A PHY-side gearbox turns those
// into fixed 16-bit words and raises almost-full for flow control.
// Clocks: txcki (write side of the TX FIFO), tx_bitclk (one edge per
// transmitted bit, standing for the PLL's 4-phase 2.5 GHz clock), rx_clk_adc
// (2.5 GHz ADC clock, common to the four slices in this model). The 625 MHz
// back-end clock and RXCKO are divided inside. rst_n is an asynchronous
// reset for all domains.
// Analog parts (PLL, output driver, continuous-time equalizer, comparator
// arrays and reference ladder) are not part of this module: their digital
// signals are ports. Connections follow the transceiver block diagram; the
// port-level splits (tx_main/tx_post, adc_therm) are this design's choices.
module xcvr_top
  import xcvr_pkg::*;
#(
  parameter int unsigned FIFO_AW = 3,
  parameter int unsigned MU_SH   = 10,
  parameter int unsigned PF      = 8,
  parameter int unsigned G1_SH   = 2,
  parameter int unsigned G2_SH   = 4
) (
  input  logic                rst_n,
  // transmitter
  input  logic                txcki,
  input  logic [TX_W-1:0]     txdin,
  input  logic                tx_bitclk,
  output logic                tx_main,
  output logic                tx_post,
  output logic                tx_underrun,
  // receiver analog front-end
  input  logic                rx_clk_adc,
  input  logic [32:0]         adc_therm [N_ADC],
  // adaptation control
  input  logic                cma_en,
  input  logic [FFE_W-2:0]    cma_d,
  // receive pins
  output logic [RXD_W-1:0]    rxdo,
  output rxvalid_e            rxvalid,
  output logic                rxcko,
  // PHY-side fixed-width receive words (clocked by rxcko)
  input  logic                gb_rd_en,
  output logic [15:0]         gb_dout,
  output logic                gb_dvalid,
  output logic                gb_almost_full,
  output logic                gb_overflow,
  // observation
  output logic signed [COEF_W-1:0] c0,
  output logic signed [COEF_W-1:0] c1,
  output logic [PH_B+PF-1:0]  ph_av,
  output slip_e               slip
);
  // ---------------- transmitter ----------------
  logic [TX_W-1:0] fifo_data;
  logic            fifo_empty, fifo_full, fifo_rd;
  logic            word_tick;

  tx_fifo #(.W(TX_W), .AW(FIFO_AW)) u_txfifo (
    .wclk(txcki), .wrst_n(rst_n), .wr_en(!fifo_full), .wdata(txdin),
    .full(fifo_full),
    .rclk(tx_bitclk), .rrst_n(rst_n), .rd_en(fifo_rd), .rdata(fifo_data),
    .empty(fifo_empty));

  tx_serializer #(.W(TX_W)) u_ser (
    .clk(tx_bitclk), .rst_n, .fifo_data, .fifo_empty, .fifo_rd, .word_tick,
    .underrun(tx_underrun), .tx_main, .tx_post);

  // ---------------- receiver ----------------
  logic [ADC_B-1:0] adc_code [N_ADC];
  logic [ADC_B-1:0] gray_unused [N_ADC];

  for (genvar k = 0; k < N_ADC; k++) begin : g_adc
    adc_encoder #(.B(ADC_B), .NCMP(33)) u_enc (
      .clk(rx_clk_adc), .therm(adc_therm[k]), .gray(gray_unused[k]),
      .code(adc_code[k]));
  end

  logic [ADC_B-1:0] samples [N_PAR];
  logic             clk_bk;

  rx_dmx #(.B(ADC_B), .NA(N_ADC), .NP(N_PAR)) u_dmx (
    .clk_adc(rx_clk_adc), .rst_n, .adc_code, .samples, .clk_bk);

  logic signed [FFE_W-1:0] y  [N_PAR];
  logic signed [ADC_B-1:0] s0 [N_PAR];
  logic signed [ADC_B-1:0] s1 [N_PAR];
  logic [$clog2(N_PAR)-1:0] cma_sel;

  ffe #(.B(ADC_B), .CW(COEF_W), .YW(FFE_W), .NP(N_PAR)) u_ffe (
    .clk(clk_bk), .samples, .c0, .c1, .y, .s0, .s1);

  cma_adapt #(.B(ADC_B), .CW(COEF_W), .YW(FFE_W), .NP(N_PAR),
              .MU_SH(MU_SH)) u_cma (
    .clk(clk_bk), .rst_n, .adapt_en(cma_en), .d(cma_d), .y, .s0, .s1,
    .sel(cma_sel), .c0, .c1);

  logic [$clog2(N_PAR+1)-1:0] n_zc;

  ff_cdr #(.YW(FFE_W), .NP(N_PAR), .PF(PF), .G1_SH(G1_SH), .G2_SH(G2_SH)) u_cdr (
    .clk(clk_bk), .rst_n, .y, .rxdo, .rxvalid, .rxcko, .ph_av, .slip, .n_zc);

  logic [6:0] gb_level;

  rx_gearbox #(.DEPTH(64), .AFULL(48)) u_gearbox (
    .clk(rxcko), .rst_n, .rxdo, .rxvalid, .rd_en(gb_rd_en), .dout(gb_dout),
    .dvalid(gb_dvalid), .almost_full(gb_almost_full), .overflow(gb_overflow),
    .level(gb_level));
endmodule
