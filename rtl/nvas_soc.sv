// Closed-loop neural vector analyzer and phase-synchrony-triggered stimulator.
//
// Sixty-four channels record neural signals. In raw mode every channel's SAR
// ADC digitises its own input and the samples go out over the wireless link.
// In phase-synchrony mode the converters become multiplying ADCs: in each of
// four groups, eight channels are filtered by eight allpass FIR filters (I) and
// eight Hilbert FIR filters (Q), built from two sets of eight MADCs and two
// folded add-and-delay lines. The tri-core CORDIC processor turns the 32 I/Q
// pairs into magnitude and phase per channel and, for 32 channel pairs, phase
// difference and phase-locking value (PLV). The vector parameters are sent over
// the link; the PLV is compared with a programmed threshold, and a trigger
// switches the channels into stimulation, where each channel's SAR register and
// MDAC drive a programmable biphasic current for a burst, then recording
// resumes.
//
// Ports: `afe_in` stands for the outputs of the 64 analog front-ends (signed
// fractions of converter full scale); `stim_on`, `stim_anodic`, `stim_amp` go
// to the per-channel V-I converters and biphasic current drivers; `uwb_chip`
// and `uwb_en` go to the UWB pulse generator (one Manchester chip per clock
// at HALF = 1); `analog_ctrl` sets gain, filter tuning, chopper and UWB band
// of the analog blocks. Configuration goes through `cfg_*` (map in nvas_pkg). The
// analog front-ends, current drivers and pulse generator are outside this
// RTL. The partitioning follows the design description; the single clock
// (20 MHz assumed), the interfaces between the blocks and the register map are
// this design's choices.
module nvas_soc
  import nvas_pkg::*;
#(
  parameter int unsigned PERIOD_RST    = 5714,
  parameter int unsigned STIM_UNIT_RST = 125000,
  parameter int unsigned NPULSES_RST   = 10,
  parameter int unsigned HALF          = 1,
  parameter int unsigned ITER          = 10
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_we,
  input  logic [7:0]                        cfg_addr,
  input  logic [31:0]                       cfg_wdata,
  input  logic signed [NCH-1:0][AIN_W-1:0]  afe_in,
  output logic [NCH-1:0]                    stim_on,
  output logic [NCH-1:0]                    stim_anodic,
  output logic [NCH-1:0][ADC_W-1:0]         stim_amp,
  output logic                              stim_mode,
  output analog_ctrl_t                      analog_ctrl,
  output logic                              uwb_chip,
  output logic                              uwb_en,
  output logic                              vec_valid,
  output logic [NPAIR-1:0][DW-1:0]          plv,
  output logic [NPAIR-1:0]                  plv_above,
  output logic                              trigger,
  output logic [15:0]                       bursts,
  output logic [15:0]                       skipped,
  output logic [15:0]                       frames_sent,
  output logic [15:0]                       frames_dropped
);
  localparam int unsigned GC = 2 * NSET;  // channels per group

  logic [NCH-1:0]          chan_we;
  chan_cfg_t               chan_wdata;
  logic [NPAIR-1:0][$clog2(NIQ)-1:0] pair_a, pair_b;
  logic [DW-1:0]           threshold;
  logic [7:0]              hold, run_len;
  logic [NPAIR-1:0]        mask;
  logic [3:0]              ema_shift;
  logic                    iq_mode, closed_loop;
  logic                    conv_start, frame_done, frame_iq, unit_tick;
  logic [$clog2(NSET)-1:0] slot;
  logic [NGROUP-1:0]       conv_done_g, raw_valid_g, i_valid_g, q_valid_g;
  logic [NGROUP-1:0][$clog2(NSET)-1:0] i_sel_g, q_sel_g;
  logic signed [NGROUP-1:0][DW-1:0]    i_y_g, q_y_g;
  logic signed [NGROUP-1:0][GC-1:0][ADC_W-1:0] raw_g;
  logic [NCH-1:0][ADC_W-1:0]           raw_buf;
  logic signed [NIQ-1:0][DW-1:0]       i_buf, q_buf;
  logic                    proc_start, proc_busy, raw_frame;
  logic [NIQ-1:0][DW-1:0]  mag, phase;
  logic [NPAIR-1:0][DW-1:0] dphi;
  logic                    bit_out, bit_valid, bit_ready;

  soc_controller #(
    .PERIOD_RST(PERIOD_RST), .STIM_UNIT_RST(STIM_UNIT_RST), .NPULSES_RST(NPULSES_RST)
  ) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .chan_we, .chan_wdata, .pair_a, .pair_b, .threshold, .hold, .mask, .ema_shift,
    .iq_mode, .closed_loop, .analog_ctrl,
    .conv_start, .slot, .conv_done(conv_done_g[0]), .frame_done, .frame_iq,
    .trigger, .stim_mode, .unit_tick, .bursts, .skipped
  );

  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    iq_group u_grp (
      .clk, .rst_n,
      .cfg_we     (chan_we[g*GC +: GC]),
      .cfg_wdata  (chan_wdata),
      .afe_in     (afe_in[g*GC +: GC]),
      .iq_mode, .conv_start, .slot,
      .clear      (1'b0),
      .conv_done  (conv_done_g[g]),
      .raw_valid  (raw_valid_g[g]),
      .raw_data   (raw_g[g]),
      .i_valid    (i_valid_g[g]), .i_sel(i_sel_g[g]), .i_y(i_y_g[g]),
      .q_valid    (q_valid_g[g]), .q_sel(q_sel_g[g]), .q_y(q_y_g[g]),
      .stim_mode, .unit_tick,
      .stim_on    (stim_on[g*GC +: GC]),
      .stim_anodic(stim_anodic[g*GC +: GC]),
      .stim_amp   (stim_amp[g*GC +: GC])
    );
  end

  // Collect raw samples and the I/Q outputs of the FIR filters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_buf <= '0; i_buf <= '0; q_buf <= '0;
      proc_start <= 1'b0; raw_frame <= 1'b0;
    end else begin
      for (int g = 0; g < NGROUP; g++) begin
        if (raw_valid_g[g]) raw_buf[g*GC +: GC] <= raw_g[g];
        if (i_valid_g[g])   i_buf[g*NSET + int'(i_sel_g[g])] <= i_y_g[g];
        if (q_valid_g[g])   q_buf[g*NSET + int'(q_sel_g[g])] <= q_y_g[g];
      end
      proc_start <= frame_done && frame_iq;
      raw_frame  <= frame_done && !frame_iq;
    end
  end

  cordic_processor #(.ITER(ITER)) u_proc (
    .clk, .rst_n,
    .start(proc_start && !proc_busy),
    .i_in(i_buf), .q_in(q_buf), .pair_a, .pair_b, .ema_shift,
    .busy(proc_busy), .done(vec_valid),
    .mag, .phase, .dphi, .plv
  );

  plv_detector #(.NP(NPAIR), .DW(DW)) u_det (
    .clk, .rst_n, .enable(closed_loop), .valid(vec_valid),
    .plv, .threshold, .hold, .mask,
    .above(plv_above), .run_len, .trigger
  );

  tx_framer u_tx (
    .clk, .rst_n,
    .raw_valid(raw_frame), .raw_data(raw_buf),
    .vec_valid, .mag, .phase, .dphi, .plv,
    .bit_out, .bit_valid, .bit_ready,
    .frames_sent, .frames_dropped
  );

  manchester_enc #(.HALF(HALF)) u_man (
    .clk, .rst_n, .bit_in(bit_out), .bit_valid, .bit_ready,
    .chip(uwb_chip), .tx_en(uwb_en)
  );
endmodule
