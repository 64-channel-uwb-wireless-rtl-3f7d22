// One I/Q group: sixteen recording/stimulation channels and the two
// add-and-delay lines that turn their converters into eight allpass (I) and
// eight Hilbert (Q) 16-tap FIR filters. Four groups make up the 64 channels.
//
// Raw mode (`iq_mode` low): each channel converts its own input; `raw_valid`
// pulses with all sixteen 8-bit samples in `raw_data`.
// I/Q mode: the inputs of channels 0..7 of the group are the recording inputs.
// A sample period has eight slots; in slot j (`slot` at `conv_start`) all
// sixteen converters take input j. Channels 0..7 hold the allpass coefficients
// c[0..7] and channels 8..15 the Hilbert ones, so each set of eight produces the
// eight products of one FIR input sample, which its add-and-delay line folds
// into the sixteen taps of filter j. I and Q of input j leave on `i_*`/`q_*`
// one cycle after the conversion ends (N+2 cycles after `conv_start`), the
// 12-bit filter sum saturated to the 10-bit processor word.
// This organisation follows the design description; that channels 0..7 carry
// the recording inputs and that the slot index is sampled with `conv_start`
// are this design's choices.
//
// Stimulation passes straight through to the channels (see neural_channel).
module iq_group
  import nvas_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [2*NSET-1:0]                 cfg_we,
  input  chan_cfg_t                         cfg_wdata,
  input  logic signed [2*NSET-1:0][AIN_W-1:0] afe_in,
  input  logic                              iq_mode,
  input  logic                              conv_start,
  input  logic [$clog2(NSET)-1:0]           slot,
  input  logic                              clear,
  output logic                              conv_done,
  output logic                              raw_valid,
  output logic signed [2*NSET-1:0][ADC_W-1:0] raw_data,
  output logic                              i_valid,
  output logic [$clog2(NSET)-1:0]           i_sel,
  output logic signed [DW-1:0]              i_y,
  output logic                              q_valid,
  output logic [$clog2(NSET)-1:0]           q_sel,
  output logic signed [DW-1:0]              q_y,
  input  logic                              stim_mode,
  input  logic                              unit_tick,
  output logic [2*NSET-1:0]                 stim_on,
  output logic [2*NSET-1:0]                 stim_anodic,
  output logic [2*NSET-1:0][ADC_W-1:0]      stim_amp
);
  localparam int unsigned NC = 2 * NSET;

  logic [$clog2(NSET)-1:0] slot_q;
  logic                    iq_q;
  logic [NC-1:0]           adc_valid;
  logic signed [NC-1:0][ADC_W-1:0] adc_data;
  chan_cfg_t               cfg_rd [NC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      iq_q   <= 1'b0;
    end else if (conv_start) begin
      slot_q <= slot;
      iq_q   <= iq_mode;
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_ch
    neural_channel u_ch (
      .clk, .rst_n,
      .cfg_we     (cfg_we[c]),
      .cfg_wdata,
      .cfg        (cfg_rd[c]),
      .vin        (iq_mode ? afe_in[slot] : afe_in[c]),
      .conv_start,
      .mult_en    (iq_mode),
      .adc_valid  (adc_valid[c]),
      .adc_data   (adc_data[c]),
      .stim_mode,
      .unit_tick,
      .stim_on    (stim_on[c]),
      .stim_anodic(stim_anodic[c]),
      .stim_amp   (stim_amp[c])
    );
  end

  assign conv_done = adc_valid[0];
  assign raw_valid = adc_valid[0] && !iq_q;
  assign raw_data  = adc_data;

  add_delay_line #(.NF(NSET), .NU(NSET), .PW(ADC_W), .ACC_W(DW+2), .OUT_W(DW), .ANTISYM(1'b0)) u_line_i (
    .clk, .rst_n, .clear,
    .p_valid(adc_valid[0] && iq_q),
    .sel    (slot_q),
    .p      (adc_data[NSET-1:0]),
    .y_valid(i_valid),
    .y_sel  (i_sel),
    .y      (i_y)
  );

  add_delay_line #(.NF(NSET), .NU(NSET), .PW(ADC_W), .ACC_W(DW+2), .OUT_W(DW), .ANTISYM(1'b1)) u_line_q (
    .clk, .rst_n, .clear,
    .p_valid(adc_valid[NSET] && iq_q),
    .sel    (slot_q),
    .p      (adc_data[NC-1:NSET]),
    .y_valid(q_valid),
    .y_sel  (q_sel),
    .y      (q_y)
  );
endmodule
