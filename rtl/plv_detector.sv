// Phase-synchrony stimulation trigger.
//
// Each time the processor delivers a new set of phase-locking values
// (`valid`), every pair enabled in `mask` is compared with the programmed
// `threshold`; `above` shows the result per pair. When at least one enabled
// pair has been above the threshold for `hold` consecutive samples (hold 0
// acts as 1), `trigger` pulses for one cycle (only while `enable` is high) and
// the run count restarts. Thresholding the PLV to start stimulation follows
// the design description; the pair mask and the consecutive-sample criterion
// are this design's choices.
// Timing: `trigger` and `above` are registered, one cycle after `valid`.
module plv_detector #(
  parameter int unsigned NP = 32,
  parameter int unsigned DW = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic                   valid,
  input  logic [NP-1:0][DW-1:0]  plv,
  input  logic [DW-1:0]          threshold,
  input  logic [7:0]             hold,
  input  logic [NP-1:0]          mask,
  output logic [NP-1:0]          above,
  output logic [7:0]             run_len,
  output logic                   trigger
);
  logic [NP-1:0] above_w;
  logic          any_w;
  logic [7:0]    need;

  always_comb begin
    for (int p = 0; p < NP; p++) above_w[p] = (plv[p] > threshold);
    any_w = |(above_w & mask);
    need  = (hold == 8'd0) ? 8'd1 : hold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above   <= '0;
      run_len <= '0;
      trigger <= 1'b0;
    end else begin
      trigger <= 1'b0;
      if (valid) begin
        above <= above_w;
        if (!any_w) begin
          run_len <= '0;
        end else if (run_len + 8'd1 >= need) begin
          run_len <= '0;
          trigger <= enable;
        end else begin
          run_len <= run_len + 8'd1;
        end
      end
    end
  end
endmodule
