// On-chip controller: configuration registers, mode control, sample and
// conversion-slot timing, and the stimulation burst.
//
// Configuration: a word-wide write port (`cfg_we`, `cfg_addr`, `cfg_wdata`)
// sets the global registers and, at 0x40..0x7F, each channel's 22-bit memory
// (`chan_we` one-hot with `chan_wdata`); 0x80..0x9F hold the pair table. See
// nvas_pkg for the map. Reset values come from the parameters. `analog_ctrl`
// carries the codes for the programmable amplifier gain, the tunable band-pass
// and anti-alias filters, the chopper and the UWB band of the pulse generator.
//
// Sampling: a free-running timer marks a sample period every `period` cycles
// (24 bits, so that slow rates that put a 4-16 Hz band near a quarter of the
// sample rate, where the 16-tap Hilbert filter works best, can be set).
// If `run` is set and no burst is active, a conversion frame starts: one
// conversion of every channel in raw mode, or eight slots (`slot` 0..7, each
// started by `conv_start` and ended by `conv_done`) in I/Q mode.
// `frame_done` pulses one cycle after the last conversion, with `frame_iq`
// telling which kind of frame it was. A sample tick that falls in a burst or
// in an unfinished frame is skipped and counted in `skipped`.
//
// Stimulation: a `trigger` with closed loop enabled switches the channels to
// stimulation (`stim_mode`) for `npulses` biphasic periods of 32 time units,
// a unit being `stim_unit` cycles (`unit_tick` marks each unit), then returns
// to recording. The reset value of the unit gives 5 Hz pulses at an assumed
// 20 MHz clock. That one on-chip controller generates the control signals,
// and that converters serve recording or stimulation in turn, follow the
// design description; the registers, their reset values and the timing are
// this design's choices.
module soc_controller
  import nvas_pkg::*;
#(
  parameter int unsigned PERIOD_RST    = 5714,   // 3.5 kS/s at 20 MHz
  parameter int unsigned STIM_UNIT_RST = 125000, // 32 units = 200 ms (5 Hz)
  parameter int unsigned NPULSES_RST   = 10,
  parameter int unsigned THRESH_RST    = 400,
  parameter int unsigned HOLD_RST      = 4,
  parameter int unsigned EMA_RST       = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration port
  input  logic                          cfg_we,
  input  logic [7:0]                    cfg_addr,
  input  logic [31:0]                   cfg_wdata,
  output logic [NCH-1:0]                chan_we,
  output chan_cfg_t                     chan_wdata,
  output logic [NPAIR-1:0][$clog2(NIQ)-1:0] pair_a,
  output logic [NPAIR-1:0][$clog2(NIQ)-1:0] pair_b,
  output logic [DW-1:0]                 threshold,
  output logic [7:0]                    hold,
  output logic [NPAIR-1:0]              mask,
  output logic [3:0]                    ema_shift,
  output logic                          iq_mode,
  output logic                          closed_loop,
  output analog_ctrl_t                  analog_ctrl,
  // conversion timing
  output logic                          conv_start,
  output logic [$clog2(NSET)-1:0]       slot,
  input  logic                          conv_done,
  output logic                          frame_done,
  output logic                          frame_iq,
  // stimulation
  input  logic                          trigger,
  output logic                          stim_mode,
  output logic                          unit_tick,
  output logic [15:0]                   bursts,
  output logic [15:0]                   skipped
);
  ctrl_state_t st;
  logic        run;
  logic [23:0] period, tmr;
  logic [19:0] stim_unit, ucnt;
  logic [7:0]  npulses;
  logic [12:0] units_left;
  logic        tick, trig_pend;

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iq_mode <= 1'b0; closed_loop <= 1'b0; run <= 1'b0;
      period    <= 24'(PERIOD_RST);
      threshold <= DW'(THRESH_RST);
      hold      <= 8'(HOLD_RST);
      mask      <= '1;
      stim_unit <= 20'(STIM_UNIT_RST);
      npulses   <= 8'(NPULSES_RST);
      ema_shift <= 4'(EMA_RST);
      analog_ctrl <= '{uwb_high_band: 1'b1, chop_en: 1'b1, rc_lpf_tune: 4'd0, bpf_tune: 4'd0, gain_sel: 3'd0};
      for (int p = 0; p < NPAIR; p++) begin
        pair_a[p] <= $clog2(NIQ)'(p);
        pair_b[p] <= $clog2(NIQ)'((p + 1) % NIQ);
      end
    end else if (cfg_we) begin
      case (cfg_addr)
        A_MODE:      {run, closed_loop, iq_mode} <= cfg_wdata[2:0];
        A_PERIOD:    period    <= cfg_wdata[23:0];
        A_THRESH:    threshold <= cfg_wdata[DW-1:0];
        A_HOLD:      hold      <= cfg_wdata[7:0];
        A_MASK:      mask      <= cfg_wdata[NPAIR-1:0];
        A_STIM_UNIT: stim_unit <= cfg_wdata[19:0];
        A_STIM_NPUL: npulses   <= cfg_wdata[7:0];
        A_EMA_SHIFT: ema_shift <= cfg_wdata[3:0];
        A_ANALOG:    analog_ctrl <= analog_ctrl_t'(cfg_wdata[$bits(analog_ctrl_t)-1:0]);
        default:
          if (cfg_addr[7:5] == A_PAIR_BASE[7:5]) begin
            pair_a[cfg_addr[4:0]] <= cfg_wdata[4:0];
            pair_b[cfg_addr[4:0]] <= cfg_wdata[9:5];
          end
      endcase
    end
  end

  always_comb begin
    chan_we    = '0;
    chan_wdata = chan_cfg_t'(cfg_wdata[CHCFG_W-1:0]);
    if (cfg_we && cfg_addr[7:6] == A_CHAN_BASE[7:6]) chan_we[cfg_addr[5:0]] = 1'b1;
  end

  // ---------------- sample timer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tmr <= '0;
    else        tmr <= (tmr >= period - 24'd1) ? 24'd0 : tmr + 24'd1;
  end
  assign tick = run && (tmr >= period - 24'd1);

  // ---------------- frame / stimulation sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; conv_start <= 1'b0; slot <= '0; frame_done <= 1'b0;
      frame_iq <= 1'b0; ucnt <= '0; units_left <= '0;
      trig_pend <= 1'b0; bursts <= '0; skipped <= '0;
    end else begin
      conv_start <= 1'b0;
      frame_done <= 1'b0;
      if (trigger && closed_loop) trig_pend <= 1'b1;
      if (tick && st != ST_IDLE) skipped <= skipped + 1'b1;
      case (st)
        ST_IDLE: begin
          if (trig_pend || (trigger && closed_loop)) begin
            trig_pend  <= 1'b0;
            st         <= ST_STIM;
            ucnt       <= '0;
            units_left <= {npulses, 5'd0};
            bursts     <= bursts + 1'b1;
            if (tick) skipped <= skipped + 1'b1;
          end else if (tick) begin
            st         <= ST_CONVERT;
            slot       <= '0;
            frame_iq   <= iq_mode;
            conv_start <= 1'b1;
          end
        end
        ST_CONVERT: if (conv_done) begin
          if (frame_iq && slot != $clog2(NSET)'(NSET-1)) begin
            slot       <= slot + 1'b1;
            conv_start <= 1'b1;
          end else begin
            frame_done <= 1'b1;
            st         <= ST_IDLE;
          end
        end
        default: begin  // ST_STIM
          if (unit_tick) begin
            ucnt       <= '0;
            if (units_left <= 13'd1) st <= ST_IDLE;
            units_left <= units_left - 1'b1;
          end else begin
            ucnt <= ucnt + 1'b1;
          end
        end
      endcase
    end
  end

  // The last tick of a burst coincides with the return to recording, so the
  // channels' unit counters and stim_mode end on the same edge.
  assign stim_mode = (st == ST_STIM);
  assign unit_tick = stim_mode && (ucnt >= stim_unit - 20'd1);
endmodule
