// Biphasic waveform timing of one stimulation channel.
//
// A stimulation period is 32 time units, a unit being one `unit_tick` from the
// controller. The first 16 units carry the first phase and the last 16 the
// second; in each half the current flows for the first duty+1 units, so the two
// phases always have equal width (charge balance) and the 4-bit duty word sets
// the on-time in sixteenths of a half period. `anodic_first` selects the order
// of the phases. The counter restarts whenever `en` is low. The 4-bit duty word
// is the design's; the period split and phase order are this design's choice.
//
// Outputs are registered-counter decodes: `stim_on` is high while current
// flows, `stim_anodic` gives its direction.
module stim_pulse_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       unit_tick,
  input  logic [3:0] duty,
  input  logic       anodic_first,
  output logic       stim_on,
  output logic       stim_anodic
);
  logic [4:0] ucnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ucnt <= '0;
    else if (!en)       ucnt <= '0;
    else if (unit_tick) ucnt <= ucnt + 1'b1;
  end

  always_comb begin
    stim_on     = en && (ucnt[3:0] <= duty);
    stim_anodic = stim_on && (ucnt[4] ^ anodic_first);
  end
endmodule
