// End-to-end testbench of nvas_soc with every parameter at its default.
//
// The analog front-ends are replaced by numbers: in raw mode constant levels,
// in phase-synchrony mode sinusoids at 0.23 cycles per sample whose phase
// steps by 0.3 rad from one analytic channel to the next for channels 0..15
// (phase-locked) and random samples for channels 16..31. Channel memories get
// a Hamming-windowed half-sample-delay allpass (I) and a type-IV Hilbert
// transformer (Q), quantised to Q1.7. Everything leaving the chip is read from
// the Manchester chip stream, as a receiver would:
//  * raw frames must carry floor(input/16) of every channel;
//  * vector frames must show phase differences of +0.3 rad for the locked
//    pairs (a, a+1), PLV near 1.0 for them and clearly lower for unlocked pairs, and
//    must match the processor's results;
//  * with closed loop on, the PLV trigger must start a stimulation burst whose
//    per-channel current, polarity and duration follow the channel memories;
//    recording must resume afterwards;
//  * a shortened sample period must make frames be dropped, and sample ticks
//    during the burst must be skipped.
// Each of these mechanisms is counted; one that never happens is a failure.
module tb_nvas_soc;
  import nvas_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int PERIOD = 5714;
  localparam int NPUL = 6;      // burst longer than a sample period
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic signed [NCH-1:0][AIN_W-1:0] afe_in = '0;
  logic [NCH-1:0] stim_on, stim_anodic;
  logic [NCH-1:0][ADC_W-1:0] stim_amp;
  analog_ctrl_t analog_ctrl;
  logic stim_mode, uwb_chip, uwb_en, vec_valid, trigger;
  logic [NPAIR-1:0][DW-1:0] plv;
  logic [NPAIR-1:0] plv_above;
  logic [15:0] bursts, skipped, frames_sent, frames_dropped;

  int checks = 0, failures = 0;
  int n_raw = 0, n_vec = 0, n_trig = 0, n_mode_sw = 0, n_stim_cyc = 0, n_bad_stim = 0;
  int n_locked_ok = 0, n_unlocked_ok = 0, sample_n = 0;
  int stim_on_cyc [NCH];
  logic bits [$];
  int chip_idx = 0;
  bit iq_phase = 0;
  chan_cfg_t ccfg [NCH];
  // processor results of each vector frame the link accepted
  typedef struct {
    logic [NIQ-1:0][DW-1:0]   mag, phase;
    logic [NPAIR-1:0][DW-1:0] dphi, plv;
  } vec_snap_t;
  vec_snap_t snaps [$];

  nvas_soc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction
  function automatic int angdiff(int a, int b);
    int d = (a - b) & 1023;
    if (d >= 512) d -= 1024;
    return d;
  endfunction
  function automatic int getf(int pos, int w);  // field of the current frame
    int v = 0;
    for (int i = 0; i < w; i++) v = (v << 1) | int'(bits[pos + i]);
    return v;
  endfunction

  // ---------------- receiver: Manchester decode and frame check ----------------
  always @(posedge clk) if (rst_n && vec_valid && !dut.u_tx.bit_valid)
    snaps.push_back('{dut.mag, dut.phase, dut.dphi, plv});

  always @(posedge clk) if (rst_n) begin
    if (uwb_en) begin
      if (chip_idx[0]) bits.push_back(uwb_chip);
      chip_idx <= chip_idx + 1;
    end else if (chip_idx != 0) begin
      chip_idx <= 0;
      check_frame();
      bits.delete();
    end
  end

  task automatic check_frame();
    int typ, bad = 0, exp_d, lock_bad = 0;
    checks++;
    if (bits.size() < 24 || getf(0, 16) != 16'hA5C3) begin
      failures++; $display("FAIL frame without sync (%0d bits)", bits.size()); return;
    end
    typ = getf(16, 8);
    if (typ == 1) begin
      n_raw++;
      for (int c = 0; c < NCH; c++)
        if (getf(24 + 8 * c, 8) != (floordiv(int'($signed(afe_in[c])), 16) & 255)) bad++;
      checks++;
      if (bad != 0 || bits.size() != 24 + 512) begin failures++; $display("FAIL raw frame: %0d wrong samples", bad); end
    end else if (typ == 2) begin
      n_vec++;
      checks++;
      if (bits.size() != 24 + 1280) begin failures++; $display("FAIL vector frame length %0d", bits.size()); end
      // decoded payload equals the processor's results of that sample
      if (snaps.size() == 0) bad = 1;
      else begin
        vec_snap_t sn = snaps.pop_front();
        for (int c = 0; c < NIQ; c++)
          if (getf(24 + 20 * c, 10) != int'(sn.mag[c]) || getf(34 + 20 * c, 10) != int'(sn.phase[c])) bad++;
        for (int p = 0; p < NPAIR; p++)
          if (getf(664 + 20 * p, 10) != int'(sn.dphi[p]) || getf(674 + 20 * p, 10) != int'(sn.plv[p])) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL vector frame payload: %0d fields", bad); end
      // locked pairs (a, a+1), a < 15: phase difference +0.3 rad, PLV high
      if (sample_n > 40) begin
        exp_d = int'($floor(0.3 / (2.0 * PI) * 1024.0 + 0.5));
        for (int p = 0; p < 15; p++) begin
          int d, pl;
          d  = getf(664 + 20 * p, 10);
          pl = getf(674 + 20 * p, 10);
          checks++;
          if (angdiff(d, exp_d) > 8 || angdiff(d, exp_d) < -8 || pl < 400) begin
            failures++; lock_bad++;
            $display("FAIL locked pair %0d: dphi %0d (exp %0d) plv %0d", p, d, exp_d & 1023, pl);
          end else n_locked_ok++;
        end
        for (int p = 17; p < 31; p++) begin
          checks++;
          if (getf(674 + 20 * p, 10) > 420) begin failures++; $display("FAIL unlocked pair %0d plv %0d", p, getf(674 + 20 * p, 10)); end
          else n_unlocked_ok++;
        end
      end
    end else begin
      failures++; $display("FAIL unknown frame type %0d", typ);
    end
  endtask

  // ---------------- front-end stimulus: new values after each frame ----------------
  always @(negedge clk) if (rst_n && dut.frame_done && iq_phase) begin
    sample_n++;
    for (int a = 0; a < NIQ; a++) begin
      real ph;
      int idx;
      idx = 16 * (a / 8) + (a % 8);
      ph  = (a < 16) ? 2.0 * PI * 0.23 * real'(sample_n) - 0.3 * real'(a)
                     : real'($urandom_range(0, 6283)) / 1000.0;
      afe_in[idx] = AIN_W'(int'(1800.0 * $sin(ph)));
    end
  end

  // ---------------- stimulation monitor ----------------
  always @(posedge clk) if (rst_n) begin
    if (stim_mode) n_stim_cyc++;
    if (trigger) n_trig++;
    for (int c = 0; c < NCH; c++) begin
      if (stim_on[c]) stim_on_cyc[c]++;
      if ((stim_on[c] && (!stim_mode || !ccfg[c].stim_en || stim_amp[c] != ccfg[c].amp)) ||
          (!stim_on[c] && stim_amp[c] != 0)) n_bad_stim++;
    end
  end

  initial begin
    real h;
    int q;
    repeat (4) @(posedge clk);
    rst_n = 1;
    foreach (stim_on_cyc[c]) stim_on_cyc[c] = 0;
    // channel memories: FIR coefficients and stimulation settings
    for (int c = 0; c < NCH; c++) begin
      int k;
      real m, w;
      k = c % 8;
      m = real'(k) - 7.5;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 15.0);
      // allpass: sinc(m), Hilbert: (1 - cos(pi m)) / (pi m) = 1 / (pi m) at half-integer m
      h = ((c % 16) < 8) ? $sin(PI * m) / (PI * m) * w : w / (PI * m);
      q = int'($floor(h * 128.0 + 0.5));
      if (q > 127) q = 127;
      if (q < -128) q = -128;
      ccfg[c].coef         = 8'(q);
      ccfg[c].amp          = 8'(20 + 3 * c);
      ccfg[c].duty         = 4'(c % 16);
      ccfg[c].stim_en      = (c % 3 != 0);
      ccfg[c].anodic_first = c[1];
      wr(8'(A_CHAN_BASE + c), 32'(ccfg[c]));
    end

    // ---- analog control codes reach their port ----
    wr(A_ANALOG, 32'h0000_1C47);
    checks++;
    if (analog_ctrl != analog_ctrl_t'(13'h1C47)) begin failures++; $display("FAIL analog control"); end

    // ---- raw recording ----
    for (int c = 0; c < NCH; c++) afe_in[c] = AIN_W'(int'($urandom_range(0, 4095)) - 2048);
    wr(A_MODE, 3'b100);
    while (n_raw < 3) @(negedge clk);

    // ---- switch to phase-synchrony mode, open loop ----
    iq_phase = 1;
    wr(A_MODE, 3'b101); n_mode_sw++;
    while (n_vec < 50) @(negedge clk);

    // ---- overflow: a sample period shorter than a vector frame drops frames ----
    wr(A_PERIOD, 2000);
    while (frames_dropped < 3) @(negedge clk);
    wr(A_PERIOD, PERIOD);
    repeat (3 * PERIOD) @(negedge clk);

    // ---- closed loop: PLV of pairs 0..3 above threshold for 3 samples ----
    wr(A_THRESH, 420); wr(A_HOLD, 3); wr(A_MASK, 32'h0000_000F);
    wr(A_STIM_UNIT, 40); wr(A_STIM_NPUL, NPUL);
    wr(A_MODE, 3'b111); n_mode_sw++;
    while (bursts < 1) @(negedge clk);
    while (stim_mode) @(negedge clk);
    wr(A_MODE, 3'b101); n_mode_sw++;   // open loop again, recording goes on
    begin
      int v0 = n_vec;
      while (n_vec < v0 + 3) @(negedge clk);
    end

    // ---- checks on the burst ----
    checks++;
    if (n_stim_cyc != NPUL * 32 * 40) begin failures++; $display("FAIL burst length %0d cycles", n_stim_cyc); end
    checks++;
    if (n_bad_stim != 0) begin failures++; $display("FAIL stimulation outputs wrong in %0d channel-cycles", n_bad_stim); end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (stim_on_cyc[c] != (ccfg[c].stim_en ? NPUL * 2 * (int'(ccfg[c].duty) + 1) * 40 : 0)) begin
        failures++; $display("FAIL channel %0d on for %0d cycles", c, stim_on_cyc[c]);
      end
    end

    // ---- every mechanism must have happened ----
    $display("raw frames %0d, vector frames %0d, mode switches %0d, triggers %0d, bursts %0d, stim cycles %0d",
             n_raw, n_vec, n_mode_sw, n_trig, bursts, n_stim_cyc);
    $display("dropped frames %0d, skipped samples %0d, locked-pair checks %0d, unlocked-pair checks %0d",
             frames_dropped, skipped, n_locked_ok, n_unlocked_ok);
    checks++; if (n_raw == 0)          begin failures++; $display("FAIL no raw frame"); end
    checks++; if (n_vec == 0)          begin failures++; $display("FAIL no vector frame"); end
    checks++; if (n_trig == 0)         begin failures++; $display("FAIL no trigger"); end
    checks++; if (bursts == 0)         begin failures++; $display("FAIL no burst"); end
    checks++; if (frames_dropped == 0) begin failures++; $display("FAIL no dropped frame"); end
    checks++; if (skipped == 0)        begin failures++; $display("FAIL no skipped sample"); end
    checks++; if (n_locked_ok == 0)    begin failures++; $display("FAIL locked pairs never checked"); end
    checks++; if (n_unlocked_ok == 0)  begin failures++; $display("FAIL unlocked pairs never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
