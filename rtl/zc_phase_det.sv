// zc_phase_det: zero-crossing phase detector of the feed-forward CDR.
// The equalized signal arrives as 16 samples per cycle, two per unit
// interval. Wherever two consecutive samples differ in sign the data crossed
// zero between them; linear interpolation between the two samples places the
// crossing to a quarter of the half-UI, and the crossing time modulo one UI
// is reported as a 3-bit instantaneous phase ph_i in eighths of a UI.
// Coordinates: sample n of the cycle sits at time n/2 UI; pair m (m = 0..15)
// is samples m-1 and m, where sample -1 is the last one of the previous
// cycle. A crossing in pair m at fraction t has phase
//   ph_i = (4*(m-1) + round(4t)) mod 8.
// Interface: clk is the 625 MHz back-end clock, used only to keep sample 15
// for the next cycle. zc_valid[m] and ph[m] are combinational from y.
// From the description: zero-crossing extraction by linear interpolation, a
// 3-bit phase code. This design's choices: the quarter rounding, which
// sample counts as positive (y >= 0) and the per-pair output format.
module zc_phase_det
  import xcvr_pkg::*;
#(
  parameter int unsigned YW = FFE_W,
  parameter int unsigned NP = N_PAR
) (
  input  logic                 clk,
  input  logic signed [YW-1:0] y [NP],
  output logic                 zc_valid [NP],
  output logic [PH_B-1:0]      ph [NP]
);
  logic signed [YW-1:0] y_last;

  always_ff @(posedge clk) y_last <= y[NP-1];

  always_comb begin
    for (int m = 0; m < NP; m++) begin
      automatic logic signed [YW-1:0] a = (m == 0) ? y_last : y[(m + NP - 1) % NP];
      automatic logic signed [YW-1:0] b = y[m];
      automatic logic [2:0] q = zc_quarter(16'(a), 16'(b));
      zc_valid[m] = (a >= 0) != (b >= 0);
      ph[m]       = PH_B'(4 * (m + NP - 1) + int'(q));
    end
  end
endmodule
