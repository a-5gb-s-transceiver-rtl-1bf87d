// adc_encoder: digital encoder of one 5-bit flash ADC slice.
// The comparator array delivers the full-swing outputs <0>..<32> of the 17
// regenerative amplifiers and their 16 interpolated neighbours. Thresholds
// <1>..<31> form the 32-level thermometer code; the encoder first converts
// it to a 5-bit Gray code and then to binary. Gray bit k is the XOR of the
// thermometer bits T[i] with i = 2^k (mod 2^(k+1)): in a clean thermometer
// code exactly those bits mark the level changes of Gray bit k, and the
// XOR form limits the damage of a bubble. Binary is then b4 = g4,
// b(k) = b(k+1) ^ g(k).
// Interface: therm is sampled on clk (this slice's 2.5 GHz ADC clock); code
// is registered, one clock after therm. Level 0 means the input lies below
// threshold <1>, level 31 above threshold <31>.
// From the description: 17 amplifiers with 2x resistor interpolation,
// outputs <0>..<32>, thermometer -> Gray -> binary. This design's choices:
// the use of <1>..<31> as the 31 level boundaries (<0> and <32> are the
// range end comparators and do not change the code), the XOR Gray form and
// the output register.
module adc_encoder #(
  parameter int unsigned B    = 5,
  parameter int unsigned NCMP = 33        // comparator outputs <0>..<32>
) (
  input  logic            clk,
  input  logic [NCMP-1:0] therm,
  output logic [B-1:0]    gray,           // combinational Gray code
  output logic [B-1:0]    code            // registered binary code
);
  localparam int unsigned NLEV = 1 << B;  // 32 levels

  always_comb begin
    for (int k = 0; k < B; k++) begin
      gray[k] = 1'b0;
      for (int i = 1; i < NLEV; i++) begin
        if ((i % (2 << k)) == (1 << k)) gray[k] = gray[k] ^ therm[i];
      end
    end
  end

  logic [B-1:0] bin;
  always_comb begin
    bin[B-1] = gray[B-1];
    for (int k = B - 2; k >= 0; k--) bin[k] = bin[k+1] ^ gray[k];
  end

  always_ff @(posedge clk) code <= bin;
endmodule
