// cdr_loop: second-order averaging filter of the feed-forward CDR.
// It does not steer any clock; it only estimates where the data's zero
// crossings lie relative to the free-running sample grid. For every valid
// crossing of the cycle the error e = ph_i - ph_av is taken modulo one UI
// (a signed value in [-0.5, 0.5) UI); the errors of the cycle are averaged
// (avg). Two integrators follow, with gains g1 = 2^-G1_SH and g2 = 2^-G2_SH:
//   F  <- F + g1 * avg               (first integrator)
//   P  <- P + g2 * F                 (second integrator, modulo 1 UI)
//   ph_av = P + F                    (modulo 1 UI)
// so g1 acts as the proportional gain and g1*g2 as the integral gain, and a
// constant frequency offset between data and sampling clock (including
// spread-spectrum modulation) is followed with zero steady-state phase
// error. When ph_av passes the 0/1-UI boundary a phase slip is reported:
// going below 0 (data faster than the sampling clock) gives SLIP_FASTER,
// going above 1 UI gives SLIP_SLOWER. A cycle with no crossing holds F and
// still advances P.
// Phase format: PW = 3 + PF bits, 1 UI = 2^PW; the top 3 bits are the same
// eighths of a UI as the detector's code.
// Interface: clk 625 MHz, rst_n async. ph_av and slip are registered: during
// a cycle they describe the estimate made from all earlier cycles.
// From the description: modulo-1UI error subtractor, averaging, two
// integrators with gains g1 and g2, slip detection from ph_av crossing the
// UI boundary. This design's choices: the averaging by division by the
// number of crossings, the gain values, the fraction width and the way the
// two integrator outputs are summed into ph_av.
module cdr_loop
  import xcvr_pkg::*;
#(
  parameter int unsigned NP    = N_PAR,
  parameter int unsigned PF    = 8,
  parameter int unsigned G1_SH = 2,
  parameter int unsigned G2_SH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            zc_valid [NP],
  input  logic [PH_B-1:0] ph [NP],
  output logic [PH_B+PF-1:0] ph_av,
  output slip_e           slip,
  output logic [$clog2(NP+1)-1:0] n_zc   // crossings seen this cycle
);
  localparam int unsigned PW = PH_B + PF;
  localparam int unsigned FW = PW + 4;     // F range +-8 UI
  localparam int signed   HALF = 1 <<< (PW - 1);

  logic signed [FW-1:0] f_q;
  logic [PW-1:0]        p_q;

  int signed sum_e, avg, cnt;
  logic signed [FW-1:0] f_n;
  logic [PW-1:0]        p_n, ph_n;
  int signed            dph;

  always_comb begin
    sum_e = 0;
    cnt   = 0;
    for (int m = 0; m < NP; m++) begin
      if (zc_valid[m]) begin
        // modulo-1UI subtraction, result in [-HALF, HALF)
        automatic logic [PW-1:0] diff = {ph[m], PF'(0)} - ph_av;
        sum_e = sum_e + int'($signed(diff));
        cnt   = cnt + 1;
      end
    end
    avg  = (cnt == 0) ? 0 : sum_e / cnt;
    f_n  = f_q + FW'(avg >>> G1_SH);
    p_n  = p_q + PW'(f_n >>> G2_SH);
    ph_n = p_n + PW'(f_n);
    dph  = int'({1'b0, ph_n}) - int'({1'b0, ph_av});
  end

  assign n_zc = ($clog2(NP+1))'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q   <= '0;
      p_q   <= '0;
      ph_av <= '0;
      slip  <= SLIP_NONE;
    end else begin
      f_q   <= f_n;
      p_q   <= p_n;
      ph_av <= ph_n;
      if (dph > HALF)       slip <= SLIP_FASTER;   // wrapped below 0
      else if (dph < -HALF) slip <= SLIP_SLOWER;   // wrapped above 1 UI
      else                  slip <= SLIP_NONE;
    end
  end
endmodule
