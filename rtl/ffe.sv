// ffe: digital feed-forward equalizer, 16 parallel 2-tap FIR filters with
// half-UI tap spacing.
// The ADC codes are offset binary; each is first made signed, x = code - 16
// (range -16..15). For each of the 16 sample positions n of a back-end cycle
//   y[n] = C0 * S0[n] + C1 * S1[n],  S0[n] = x[n],  S1[n] = x[n-1],
// where x[n-1] is the sample half a UI earlier (for n = 0 the last sample
// of the previous cycle, kept in a register). The sum is saturated to the
// 10-bit output range.
// Interface: clk is the 625 MHz back-end clock. samples, c0 and c1 are taken
// on a clock edge; y, s0 and s1 appear one clock later and stay aligned
// (s0/s1 are the signed tap inputs that produced y, used by the CMA logic).
// From the description: 2 taps, half-UI spacing, 5-bit inputs and
// coefficients, 10-bit x 16 outputs. This design's choices: the offset of
// 16, which tap sees the earlier sample, saturation and the output register.
module ffe
  import xcvr_pkg::*;
#(
  parameter int unsigned B  = ADC_B,
  parameter int unsigned CW = COEF_W,
  parameter int unsigned YW = FFE_W,
  parameter int unsigned NP = N_PAR
) (
  input  logic                 clk,
  input  logic [B-1:0]         samples [NP],
  input  logic signed [CW-1:0] c0,
  input  logic signed [CW-1:0] c1,
  output logic signed [YW-1:0] y  [NP],
  output logic signed [B-1:0]  s0 [NP],
  output logic signed [B-1:0]  s1 [NP]
);
  localparam int signed YMAX = (1 <<< (YW - 1)) - 1;
  localparam int signed YMIN = -(1 <<< (YW - 1));
  localparam int signed OFS  = 1 <<< (B - 1);

  logic signed [B-1:0] x [NP];
  logic signed [B-1:0] x_last;     // sample 15 of the previous cycle

  always_comb begin
    for (int n = 0; n < NP; n++) x[n] = B'(int'(samples[n]) - OFS);
  end

  always_ff @(posedge clk) begin
    x_last <= x[NP-1];
    for (int n = 0; n < NP; n++) begin
      automatic logic signed [B-1:0] xp = (n == 0) ? x_last : x[n-1];
      automatic int signed acc = int'(c0) * int'(x[n]) + int'(c1) * int'(xp);
      if (acc > YMAX)      y[n] <= YW'(YMAX);
      else if (acc < YMIN) y[n] <= YW'(YMIN);
      else                 y[n] <= YW'(acc);
      s0[n] <= x[n];
      s1[n] <= xp;
    end
  end
endmodule
