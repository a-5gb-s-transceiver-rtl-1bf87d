// cma_adapt: constant-modulus (CMA) adaptation of the two FFE tap
// coefficients, in sign-sign form.
// CMA minimises E{(y^2 - d^2)^2} without knowing the transmitted data: the
// stochastic gradient for tap k is proportional to (y^2 - d^2) * y * S_k.
// To save area only the signs of (y^2 - d^2) and of y are used, while the
// tap input S_k keeps its 5 bits:
//   e     = sgn(y_sel) * sgn(y_sel^2 - d^2)          (each in {-1, 0, +1})
//   C_k  <- C_k - mu * e * S_sel^k                   (k = 0, 1)
// Each coefficient lives in an accumulator with MU_SH fraction bits, so the
// step size is mu = 2^-MU_SH; the 5-bit coefficient is the accumulator's
// integer part (floor), and the accumulator saturates at the coefficient
// range. One of the 16 parallel FFE outputs is used per cycle; sel steps
// through 0..15 so every sample phase takes part (samples are taken blind,
// independently of the CDR).
// Interface: clk 625 MHz back-end clock; y, s0, s1 from the FFE (aligned);
// d the desired output modulus; adapt_en freezes the taps when low. c0/c1
// are registered; reset loads C0_INIT/C1_INIT (4 and 0, the starting point
// of the published adaptation example). Latency: one clock from y to a new
// coefficient.
// From the description: the cost function, the sign-sign simplification,
// the sample select, the mu gain and the accumulating register per tap.
// This design's choices: the rotating select, the step size, the minus sign
// written out (gradient descent), floor rounding and saturation.
module cma_adapt
  import xcvr_pkg::*;
#(
  parameter int unsigned B       = ADC_B,
  parameter int unsigned CW      = COEF_W,
  parameter int unsigned YW      = FFE_W,
  parameter int unsigned NP      = N_PAR,
  parameter int unsigned MU_SH   = 10,
  parameter int signed   C0_INIT = 4,
  parameter int signed   C1_INIT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adapt_en,
  input  logic [YW-2:0]        d,
  input  logic signed [YW-1:0] y  [NP],
  input  logic signed [B-1:0]  s0 [NP],
  input  logic signed [B-1:0]  s1 [NP],
  output logic [$clog2(NP)-1:0] sel,
  output logic signed [CW-1:0] c0,
  output logic signed [CW-1:0] c1
);
  localparam int unsigned AW = CW + MU_SH;
  localparam int signed AMAX = (1 <<< (AW - 1)) - 1;
  localparam int signed AMIN = -(1 <<< (AW - 1));

  logic signed [AW-1:0] acc0, acc1;
  logic signed [YW-1:0] y_sel;
  logic signed [B-1:0]  s0_sel, s1_sel;
  logic signed [1:0]    sg_y, sg_m, e;

  assign y_sel  = y[sel];
  assign s0_sel = s0[sel];
  assign s1_sel = s1[sel];
  assign sg_y   = sgn3(32'(y_sel));
  assign sg_m   = sgn3(int'(y_sel) * int'(y_sel) - int'({1'b0, d}) * int'({1'b0, d}));
  assign e      = 2'(sg_y * sg_m);

  function automatic logic signed [AW-1:0] step(input logic signed [AW-1:0] a,
                                                 input logic signed [1:0] ee,
                                                 input logic signed [B-1:0] s);
    automatic int signed n = int'(a) - int'(ee) * int'(s);
    if (n > AMAX) n = AMAX;
    if (n < AMIN) n = AMIN;
    return AW'(n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      acc0 <= AW'(C0_INIT <<< MU_SH);
      acc1 <= AW'(C1_INIT <<< MU_SH);
    end else begin
      sel <= sel + 1'b1;
      if (adapt_en) begin
        acc0 <= step(acc0, e, s0_sel);
        acc1 <= step(acc1, e, s1_sel);
      end
    end
  end

  assign c0 = acc0[AW-1 -: CW];
  assign c1 = acc1[AW-1 -: CW];
endmodule
