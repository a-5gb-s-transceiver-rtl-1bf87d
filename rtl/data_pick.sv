// data_pick: data pick-up logic of the feed-forward CDR.
// The eye centre lies half a UI from the averaged zero-crossing phase ph_av.
// In sample coordinates (sample n at n half-UIs from the cycle start) the
// candidate eye centres of a cycle are
//   x_j = 2*ph_av - 1 + 2j   half-UIs,   j = -1 .. 7,
// i.e. centres at phase ph_av + 0.5 UI, shifted one UI early so that both
// neighbouring samples of every centre are available in this cycle or the
// three samples kept from the last one. For each centre the two samples
// around it are looked at: if they have the same sign that sign is the bit;
// if they differ, the zero crossing between them is placed by linear
// interpolation (quarters of a half-UI, the same code as the phase detector)
// and the sample on the same side of the crossing as the eye centre is
// sliced. A bit is 1 when the chosen sample is >= 0.
// Normally the 8 centres j = 0..7 are output. After ph_av wrapped below 0
// (data faster than the receiver, SLIP_FASTER) one more centre, j = -1, is
// inserted: 9 bits. After ph_av wrapped above 1 UI (data slower,
// SLIP_SLOWER) centre j = 0 repeats the previous cycle's last bit and is
// removed: 7 bits.
// Interface: clk 625 MHz, rst_n async (clears the output to an empty
// 8-bit group). y is the FFE output of the cycle, ph_av and slip
// the loop state for it. bits (LSB = earliest) and nbits are registered,
// one clock after y.
// From the description: slicing at the eye centre, choosing the sample on
// the eye centre's side of the crossing, 7/8/9-bit output on phase slips.
// This design's choices: the coordinate offset, the three-sample history
// and the quarter-half-UI resolution of the comparison.
module data_pick
  import xcvr_pkg::*;
#(
  parameter int unsigned YW = FFE_W,
  parameter int unsigned NP = N_PAR,
  parameter int unsigned PF = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] y [NP],
  input  logic [PH_B+PF-1:0]   ph_av,
  input  slip_e                slip,
  output logic [UI_PER_CYC:0]  bits,    // up to 9 bits
  output logic [3:0]           nbits
);
  localparam int unsigned PW   = PH_B + PF;
  localparam int signed   H    = 1 <<< (PW - 1);   // half-UI in phase LSBs
  localparam int unsigned HIST = 3;
  localparam int unsigned NB   = UI_PER_CYC + 1;    // 9 candidate centres

  logic signed [YW-1:0] hist [HIST];   // samples -3, -2, -1
  logic signed [YW-1:0] win [NP + HIST];
  logic                 dec [NB];      // dec[j+1] is the bit of centre j

  always_comb begin
    for (int i = 0; i < int'(HIST); i++) win[i] = hist[i];
    for (int n = 0; n < int'(NP); n++) win[n + HIST] = y[n];
  end

  always_comb begin
    for (int jj = 0; jj < int'(NB); jj++) begin
      automatic int signed x    = int'({1'b0, ph_av}) + (2 * (jj - 1) - 1) * H;
      automatic int signed idx  = x >>> (PW - 1);
      automatic int signed frac = x & (H - 1);
      automatic logic signed [YW-1:0] a = win[idx + HIST];
      automatic logic signed [YW-1:0] b = win[idx + HIST + 1];
      automatic logic [2:0] q = zc_quarter(16'(a), 16'(b));
      if ((a >= 0) == (b >= 0))        dec[jj] = (a >= 0);
      else if (4 * frac < int'(q) * H) dec[jj] = (a >= 0);
      else                             dec[jj] = (b >= 0);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(HIST); i++) hist[i] <= y[NP - HIST + i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits  <= '0;
      nbits <= 4'd8;
    end else begin
      bits <= '0;
      unique case (slip)
        SLIP_FASTER: begin
          for (int k = 0; k < int'(NB); k++) bits[k] <= dec[k];
          nbits <= 4'd9;
        end
        SLIP_SLOWER: begin
          for (int k = 0; k < int'(NB) - 2; k++) bits[k] <= dec[k + 2];
          nbits <= 4'd7;
        end
        default: begin
          for (int k = 0; k < int'(NB) - 1; k++) bits[k] <= dec[k + 1];
          nbits <= 4'd8;
        end
      endcase
    end
  end
endmodule
