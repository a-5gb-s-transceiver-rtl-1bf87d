// tb_data_pick: self-checking test of the CDR data pick-up logic.
// Random sample words, random ph_av and random slip codes are applied; one
// clock later the output must match a reference that, for every eye centre
// c_j = 2*ph_av/2^11 - 1 + 2j half-UIs (j = -1..7), takes the two samples
// around c_j, and if they differ in sign slices the one on c_j's side of
// the interpolated crossing q/4 (q = floor((8|a| + S) / (2S))). The output
// must hold 8 bits (j = 0..7) normally, 9 bits (j = -1..7) after
// SLIP_FASTER and 7 bits (j = 1..7) after SLIP_SLOWER.
`timescale 1ps/1ps
module tb_data_pick;
  import xcvr_pkg::*;
  logic clk = 0, rst_n = 1;
  logic signed [9:0] y [16];
  logic [10:0] ph_av;
  slip_e slip;
  logic [8:0] bits;
  logic [3:0] nbits;
  int checks = 0, failures = 0, n_interp = 0;
  int win [19];
  int hist [3];

  data_pick #(.YW(10), .NP(16), .PF(8)) dut (.*);
  always #800 clk = ~clk;

  function automatic bit decide(int jj, int phv);
    real c = 2.0 * phv / 2048.0 - 1.0 + 2.0 * jj;
    int idx = int'($floor(c));
    real fr = c - idx;
    int a = win[idx + 3], b = win[idx + 4];
    int ma = (a < 0) ? -a : a, mb = (b < 0) ? -b : b;
    int q;
    if ((a >= 0) == (b >= 0)) return a >= 0;
    q = (8 * ma + ma + mb) / (2 * (ma + mb));
    return (fr * 4 < q) ? (a >= 0) : (b >= 0);
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) y[i] = 0;
    ph_av = 0; slip = SLIP_NONE;
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) hist[i] = int'(y[13 + i]);
    for (int it = 0; it < 2000; it++) begin
      logic [8:0] eb;
      int en, k;
      for (int i = 0; i < 16; i++) y[i] = 10'($urandom_range(0, 200)) - 10'sd100;
      ph_av = 11'($urandom);
      case ($urandom_range(0, 2))
        0: slip = SLIP_NONE;
        1: slip = SLIP_FASTER;
        default: slip = SLIP_SLOWER;
      endcase
      for (int i = 0; i < 3; i++) win[i] = hist[i];
      for (int i = 0; i < 16; i++) win[i + 3] = int'(y[i]);
      eb = '0; k = 0;
      for (int jj = (slip == SLIP_FASTER ? -1 : (slip == SLIP_SLOWER ? 1 : 0)); jj <= 7; jj++) begin
        eb[k] = decide(jj, int'(ph_av)); k++;
      end
      en = k;
      for (int i = 0; i < 3; i++) hist[i] = int'(y[13 + i]);
      @(posedge clk); #1;
      checks += 2;
      if (int'(nbits) != en) begin failures++; $display("nbits %0d exp %0d", nbits, en); end
      if (bits !== eb) begin failures++; $display("it %0d bits %b exp %b slip %0d ph %0d", it, bits, eb, slip, ph_av); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
