// Tri-core CORDIC phase, magnitude and phase-synchrony processor.
//
// Per sample period, after `start` with the 32 analytic samples (I from the
// allpass filters, Q from the Hilbert filters):
//  * core 1 (vectoring) gives each channel's magnitude |I+jQ| and phase
//    atan2(Q, I), one channel after the other;
//  * for each pair p of the programmable pair table, the phase difference
//    dphi = phase[a] - phase[b] is formed (a wrapping subtraction of binary
//    angles) and core 2 (rotation) turns it into the unit phasor
//    (cos dphi, sin dphi);
//  * that phasor is averaged by a shift-only exponential moving average,
//    C += (cos - C) >> ema_shift (likewise S), and core 3 (vectoring) returns
//    the phase-locking value PLV = |(C, S)|, 511 standing for 1.0.
// Core 2 works on pair p while core 3 works on pair p-1, so the two run side
// by side. Using three shift-only CORDIC cores on a 10-bit word and computing
// magnitude, phase, phase difference and PLV per sample follow the design
// description. Which core does what, the moving-average window, the pair table
// and the sequencing are this design's choices.
//
// Timing: `done` pulses when all outputs are updated, about
// NCHAN*(ITER+3) + (NP+1)*(ITER+3) + 1 cycles after `start` (846 at the defaults).
// Outputs hold until the next run.
module cordic_processor
  import nvas_pkg::*;
#(
  parameter int unsigned NCHAN = NIQ,
  parameter int unsigned NP    = NPAIR,
  parameter int unsigned ITER  = 10,
  parameter int unsigned EF    = 6      // fraction bits of the moving average
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  logic signed [NCHAN-1:0][DW-1:0]      i_in,
  input  logic signed [NCHAN-1:0][DW-1:0]      q_in,
  input  logic [NP-1:0][$clog2(NCHAN)-1:0]     pair_a,
  input  logic [NP-1:0][$clog2(NCHAN)-1:0]     pair_b,
  input  logic [3:0]                           ema_shift,
  output logic                                 busy,
  output logic                                 done,
  output logic [NCHAN-1:0][DW-1:0]             mag,
  output logic [NCHAN-1:0][DW-1:0]             phase,
  output logic [NP-1:0][DW-1:0]                dphi,
  output logic [NP-1:0][DW-1:0]                plv
);
  localparam int unsigned EW = DW + 1 + EF;
  localparam logic signed [DW-1:0] UNIT = DW'((1 << (DW-1)) - 1);  // 511

  typedef enum logic [2:0] {P_IDLE, P1_GO, P1_WAIT, P2_GO, P2_WAIT} pstate_t;
  pstate_t st;

  logic signed [NCHAN-1:0][DW-1:0] iq_i, iq_q;
  logic signed [EW-1:0] ema_c [NP];
  logic signed [EW-1:0] ema_s [NP];
  logic [$clog2(NCHAN)-1:0] c;
  logic [$clog2(NP+1)-1:0]  s;

  logic              c1_start, c2_start, c3_start;
  logic              c1_done, c2_done, c3_done;
  logic signed [DW:0] c1_x, c2_x, c2_y, c3_x;
  logic signed [DW:0] c1_y_unused, c3_y_unused;
  logic [DW-1:0]     c1_z, c2_z_unused, c3_z_unused;
  logic              b1, b2, b3;
  logic [DW-1:0]     dphi_w;
  logic signed [DW-1:0] c3_xin, c3_yin;

  function automatic logic signed [DW-1:0] sat_dw(input logic signed [EW-1:0] v);
    logic signed [EW-1:0] t;
    t = v >>> EF;
    if (t > EW'(UNIT))       return UNIT;
    else if (t < -EW'(UNIT)) return -UNIT;
    else                     return DW'(t);
  endfunction

  function automatic logic [DW-1:0] mag_out(input logic signed [DW:0] v);
    if (v < 0)                          return '0;
    else if (v > (DW+1)'((1<<DW)-1))    return '1;
    else                                return DW'(v);
  endfunction

  always_comb begin
    dphi_w   = phase[pair_a[s[$clog2(NP)-1:0]]] - phase[pair_b[s[$clog2(NP)-1:0]]];
    c3_xin   = sat_dw(ema_c[s[$clog2(NP)-1:0] - 1'b1]);
    c3_yin   = sat_dw(ema_s[s[$clog2(NP)-1:0] - 1'b1]);
    c1_start = (st == P1_GO);
    c2_start = (st == P2_GO) && (s < NP);
    c3_start = (st == P2_GO) && (s != 0);
  end

  cordic_core #(.DW(DW), .ITER(ITER)) u_core1 (
    .clk, .rst_n, .start(c1_start), .mode(1'b0),
    .x_in(iq_i[c]), .y_in(iq_q[c]), .z_in('0),
    .busy(b1), .done(c1_done), .x_out(c1_x), .y_out(c1_y_unused), .z_out(c1_z));

  cordic_core #(.DW(DW), .ITER(ITER)) u_core2 (
    .clk, .rst_n, .start(c2_start), .mode(1'b1),
    .x_in(UNIT), .y_in('0), .z_in(dphi_w),
    .busy(b2), .done(c2_done), .x_out(c2_x), .y_out(c2_y), .z_out(c2_z_unused));

  cordic_core #(.DW(DW), .ITER(ITER)) u_core3 (
    .clk, .rst_n, .start(c3_start), .mode(1'b0),
    .x_in(c3_xin), .y_in(c3_yin), .z_in('0),
    .busy(b3), .done(c3_done), .x_out(c3_x), .y_out(c3_y_unused), .z_out(c3_z_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= P_IDLE;
      c     <= '0;
      s     <= '0;
      done  <= 1'b0;
      iq_i  <= '0;
      iq_q  <= '0;
      mag   <= '0;
      phase <= '0;
      dphi  <= '0;
      plv   <= '0;
      for (int p = 0; p < NP; p++) begin
        ema_c[p] <= '0;
        ema_s[p] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          iq_i <= i_in;
          iq_q <= q_in;
          c    <= '0;
          st   <= P1_GO;
        end
        P1_GO: st <= P1_WAIT;
        P1_WAIT: if (c1_done) begin
          mag[c]   <= mag_out(c1_x);
          phase[c] <= c1_z;
          if (c == $clog2(NCHAN)'(NCHAN-1)) begin
            s  <= '0;
            st <= P2_GO;
          end else begin
            c  <= c + 1'b1;
            st <= P1_GO;
          end
        end
        P2_GO: begin
          if (s < NP) dphi[s[$clog2(NP)-1:0]] <= dphi_w;
          st <= P2_WAIT;
        end
        default: if (c2_done || c3_done) begin  // P2_WAIT: both cores end together
          if (s < NP) begin
            ema_c[s[$clog2(NP)-1:0]] <= ema_c[s[$clog2(NP)-1:0]]
              + (((EW'(c2_x) <<< EF) - ema_c[s[$clog2(NP)-1:0]]) >>> ema_shift);
            ema_s[s[$clog2(NP)-1:0]] <= ema_s[s[$clog2(NP)-1:0]]
              + (((EW'(c2_y) <<< EF) - ema_s[s[$clog2(NP)-1:0]]) >>> ema_shift);
          end
          if (s != 0) plv[s[$clog2(NP)-1:0] - 1'b1] <= mag_out(c3_x);
          if (s == ($clog2(NP+1))'(NP)) begin
            done <= 1'b1;
            st   <= P_IDLE;
          end else begin
            s  <= s + 1'b1;
            st <= P2_GO;
          end
        end
      endcase
    end
  end

  assign busy = (st != P_IDLE);
endmodule
