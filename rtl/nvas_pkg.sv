// Shared constants and types of the neural vector analyzer / stimulator SoC.
//
// The channel count, the FIR organisation (two sets of eight MADCs per group of
// sixteen channels, four groups, sixteen taps), the 8-bit ADC/DAC, the 10-bit
// processor word, the 8-bit amplitude and 4-bit duty cycle follow the design
// description. The remaining items are this implementation's choices: the
// analog-input word width used by the converter model, the layout of the 22-bit
// per-channel memory, the register map and the frame format of the serial link.
package nvas_pkg;

  localparam int unsigned NCH      = 64;  // recording/stimulation channels
  localparam int unsigned NGROUP   = 4;   // I/Q groups of 16 channels
  localparam int unsigned NSET     = 8;   // MADCs per FIR set = filters per line
  localparam int unsigned NTAP     = 16;  // FIR taps (symmetric, 8 unique)
  localparam int unsigned ADC_W    = 8;   // SAR ADC / MDAC resolution
  localparam int unsigned COEF_W   = 8;   // FIR coefficient width (Q1.7)
  localparam int unsigned AIN_W    = 12;  // word standing for the held analog input
  localparam int unsigned DW       = 10;  // processor word
  localparam int unsigned NIQ      = NGROUP * NSET;  // 32 analytic channels
  localparam int unsigned NPAIR    = 32;  // phase-difference / PLV pairs
  localparam int unsigned CHCFG_W  = 22;  // per-channel memory bits

  // Per-channel 22-bit memory: FIR coefficient, 12-bit stimulation word
  // (amplitude and duty cycle) and two stimulation control bits.
  typedef struct packed {
    logic                  anodic_first;  // [21] biphasic polarity order
    logic                  stim_en;       // [20] channel takes part in a burst
    logic [3:0]            duty;          // [19:16] duty cycle, (duty+1)/16 of a half period
    logic [ADC_W-1:0]      amp;           // [15:8] stimulation current code
    logic signed [COEF_W-1:0] coef;       // [7:0]  MADC multiplier (FIR tap)
  } chan_cfg_t;

  // Control codes for the analog blocks (amplifier gain, filter tuning,
  // chopper, UWB band). The code widths and meanings are this design's choice.
  typedef struct packed {
    logic       uwb_high_band;  // [12] 1: 3.1-10.4 GHz pulse, 0: 0-1 GHz pulse
    logic       chop_en;        // [11] first-stage chopper enable
    logic [3:0] rc_lpf_tune;    // [10:7] RC anti-alias low-pass tuning
    logic [3:0] bpf_tune;       // [6:3] SC band-pass centre-frequency code
    logic [2:0] gain_sel;       // [2:0] amplifier gain step within 54-60 dB
  } analog_ctrl_t;

  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,   // waiting for the next sample tick
    ST_CONVERT = 2'd1,   // conversion slots of one sample period
    ST_STIM    = 2'd2    // stimulation burst: SAR/MDAC reused as DAC
  } ctrl_state_t;

  // Register map of the configuration port (word addresses).
  localparam logic [7:0] A_MODE      = 8'h00;  // [0] iq mode, [1] closed loop, [2] run
  localparam logic [7:0] A_PERIOD    = 8'h01;  // sample period in clock cycles (24 bits)
  localparam logic [7:0] A_THRESH    = 8'h02;  // PLV threshold
  localparam logic [7:0] A_HOLD      = 8'h03;  // consecutive samples above threshold
  localparam logic [7:0] A_MASK      = 8'h04;  // pairs watched by the detector
  localparam logic [7:0] A_STIM_UNIT = 8'h05;  // clock cycles per stimulation time unit
  localparam logic [7:0] A_STIM_NPUL = 8'h06;  // biphasic pulses per burst
  localparam logic [7:0] A_EMA_SHIFT = 8'h07;  // PLV averaging shift
  localparam logic [7:0] A_ANALOG    = 8'h08;  // analog_ctrl_t
  localparam logic [7:0] A_CHAN_BASE = 8'h40;  // 0x40..0x7F channel memories
  localparam logic [7:0] A_PAIR_BASE = 8'h80;  // 0x80..0x9F pair table {b[9:5], a[4:0]}

  // Serial frame
  localparam logic [15:0] TX_SYNC     = 16'hA5C3;
  localparam logic [7:0]  TX_T_RAW    = 8'h01;
  localparam logic [7:0]  TX_T_VECTOR = 8'h02;

endpackage
