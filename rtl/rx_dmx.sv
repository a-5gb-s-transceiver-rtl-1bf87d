// rx_dmx: 4:16 demultiplexer between the interleaved ADCs and the digital
// back-end, with the back-end clock divider.
// Four ADC slices each deliver a 5-bit code per 2.5 GHz clock; together they
// sample the line at 10 GS/s, two samples per unit interval. Over four ADC
// clocks the demultiplexer collects 16 consecutive samples and hands them
// to the back-end as one word per 625 MHz cycle. Sample order in the word:
// sample 4*c + k is ADC slice k in ADC clock c of the group, so index 0 is
// the oldest sample and 15 the newest.
// Interface: clk_adc is the ADC clock, adc_code[k] the (registered) code of
// slice k. samples is updated on the clk_adc edge that completes a group.
// clk_bk is the divided-by-4 back-end clock (625 MHz); its rising edge comes
// two ADC clocks after samples changes, so samples is stable around it.
// From the description: 4:16 DMX, 5b x 16 at 625 MHz, the divider. This
// design's choices: the sample order and the placement of the clk_bk edge.
module rx_dmx
  import xcvr_pkg::*;
#(
  parameter int unsigned B  = ADC_B,
  parameter int unsigned NA = N_ADC,
  parameter int unsigned NP = N_PAR
) (
  input  logic         clk_adc,
  input  logic         rst_n,
  input  logic [B-1:0] adc_code [NA],
  output logic [B-1:0] samples  [NP],
  output logic         clk_bk
);
  localparam int unsigned NG = NP / NA;   // ADC clocks per group (4)

  logic [$clog2(NG)-1:0] cnt;
  logic [B-1:0] acc [NP];

  always_ff @(posedge clk_adc or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      clk_bk <= 1'b0;
    end else begin
      cnt    <= cnt + 1'b1;
      clk_bk <= (cnt + 1'b1) >= ($clog2(NG))'(NG / 2);
    end
  end

  always_ff @(posedge clk_adc) begin
    for (int k = 0; k < NA; k++) acc[int'(cnt) * NA + k] <= adc_code[k];
    if (cnt == ($clog2(NG))'(NG - 1)) begin
      for (int i = 0; i < NP - NA; i++) samples[i] <= acc[i];
      for (int k = 0; k < NA; k++) samples[NP - NA + k] <= adc_code[k];
    end
  end
endmodule
