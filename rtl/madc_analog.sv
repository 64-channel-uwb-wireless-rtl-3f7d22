// Behavioural model of the channel's multiplying DAC and comparator (analog
// circuit, not synthesizable as such; kept combinational so it can be
// simulated and linted with the digital logic).
//
// The real part is a binary-weighted split-capacitor MDAC whose reference is
// gated bit by bit by the stored coefficient (three two-input gates per bit),
// so that a SAR search against it digitises the product of the held input and
// the coefficient. The model states the same relation in numbers: the held
// input `vin` is a signed fraction of full scale in AIN_W bits, `coef` a signed
// Q1.7 factor (unity, 128, when `mult_en` is low: the plain ADC of raw
// recording), and `code` the SAR's offset-binary trial. `cmp` is 1 when
// vin*coef >= (code-128) * 2^(AIN_W-1), so the finished search returns
// clamp(floor(vin*coef / 2^(AIN_W-1))) + 128. The scaling is this design's
// choice; the multiply-by-reference principle follows the design description.
module madc_analog #(
  parameter int unsigned AIN_W  = 12,
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned COEF_W = 8
) (
  input  logic signed [AIN_W-1:0]  vin,
  input  logic signed [COEF_W-1:0] coef,
  input  logic                     mult_en,
  input  logic [ADC_W-1:0]         code,
  output logic                     cmp
);
  localparam int FRAC = AIN_W - ADC_W + COEF_W - 1;  // AIN_W-1 with ADC_W==COEF_W
  logic signed [31:0] prod, level;

  always_comb begin
    prod  = 32'(vin) * (mult_en ? 32'(coef) : (32'sd1 <<< (COEF_W-1)));
    level = (32'($signed({1'b0, code})) - (32'sd1 <<< (ADC_W-1))) <<< FRAC;
    cmp   = (prod >= level);
  end
endmodule
