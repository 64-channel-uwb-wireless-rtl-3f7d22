// One recording/stimulation channel: SAR multiplying ADC, 22-bit channel
// memory and the stimulation control that reuses the converter.
//
// Recording: `conv_start` samples `vin` (the held output of the channel's
// anti-alias filter, represented as a signed AIN_W-bit number) and starts an
// 8-bit SAR conversion against the MDAC. With `mult_en` high the MDAC is
// scaled by the stored coefficient, so the result is the FIR tap product
// vin*coef (one multiplication of an FIR filter); with it low the channel is a
// plain ADC. `adc_valid` pulses with the signed result `adc_data`, N+1 cycles
// after `conv_start`.
//
// Stimulation: in a channel whose stim_en bit is set, the SAR register is
// reloaded with the stored 8-bit amplitude whenever no conversion is running
// (a conversion result is read in its `adc_valid` cycle, before the reload),
// so when `stim_mode` rises it already holds the amplitude as the MDAC code
// (`stim_amp`, to the V-I converter), and the 4-bit duty word
// times the biphasic phases (`stim_on`, `stim_anodic`). Reusing converter and
// register for this, and the 8-bit amplitude with 4-bit duty word, follow the
// design description; the memory layout (see nvas_pkg::chan_cfg_t) is this
// design's choice.
//
// `cfg_we` writes the 22-bit memory; `cfg` reads it back.
module neural_channel
  import nvas_pkg::*;
#(
  parameter int unsigned AIN_W_P = AIN_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  chan_cfg_t                 cfg_wdata,
  output chan_cfg_t                 cfg,
  input  logic signed [AIN_W_P-1:0] vin,
  input  logic                      conv_start,
  input  logic                      mult_en,
  output logic                      adc_valid,
  output logic signed [ADC_W-1:0]   adc_data,
  input  logic                      stim_mode,
  input  logic                      unit_tick,
  output logic                      stim_on,
  output logic                      stim_anodic,
  output logic [ADC_W-1:0]          stim_amp
);
  logic signed [AIN_W_P-1:0] vhold;   // sample-and-hold
  logic                      mult_q;
  logic [ADC_W-1:0]          trial, result;
  logic                      cmp, busy, stim_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg    <= '0;
      vhold  <= '0;
      mult_q <= 1'b0;
    end else begin
      if (cfg_we) cfg <= cfg_wdata;
      if (conv_start && !busy) begin
        vhold  <= vin;
        mult_q <= mult_en;
      end
    end
  end

  assign stim_act = stim_mode && cfg.stim_en;

  sar_logic #(.N(ADC_W)) u_sar (
    .clk, .rst_n,
    .start   (conv_start && !stim_mode),
    .cmp,
    .load    (cfg.stim_en),
    .load_val(cfg.amp),
    .trial,
    .busy,
    .done    (adc_valid),
    .result
  );

  madc_analog #(.AIN_W(AIN_W_P), .ADC_W(ADC_W), .COEF_W(COEF_W)) u_mdac (
    .vin    (vhold),
    .coef   (cfg.coef),
    .mult_en(mult_q),
    .code   (trial),
    .cmp
  );

  assign adc_data = $signed({~result[ADC_W-1], result[ADC_W-2:0]});

  stim_pulse_gen u_stim (
    .clk, .rst_n,
    .en          (stim_act),
    .unit_tick,
    .duty        (cfg.duty),
    .anodic_first(cfg.anodic_first),
    .stim_on,
    .stim_anodic
  );

  assign stim_amp = stim_on ? trial : '0;
endmodule
