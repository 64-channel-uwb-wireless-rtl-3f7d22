// Workload testbench: the full-signal-path measurements of the vector analyzer,
// run through the whole chip in phase-synchrony mode (open loop).
//
// Three experiments share one run, one per I/Q group. Analytic channel a is
// fed from input 16*(a/8) + a%8.
//  * Phase difference (group 1): channels 9..15 carry the same tone as
//    channel 8, delayed by k*0.7 rad. Pair (8, 8+k) must report +k*0.7 rad,
//    wrapped. The mean error after settling must stay within 1.5 % of the
//    ideal difference (at least one angle step; 1024 steps make a turn).
//  * Envelope (group 2): channel 16 carries a tone at a quarter of the sample
//    rate, amplitude-modulated with a period of 50 samples. The magnitude
//    output must follow the envelope: the best correlation over a delay of
//    0..24 samples must be at least 0.97.
//  * PLV against frequency offset (group 0): channel 0 carries a fixed tone
//    and channel k (1..7) the same tone offset by df_k. The pair (0, k) must
//    settle near the steady response of the moving average to a phasor turning
//    2*pi*df per sample, |a / (1 - (1-a) e^(j 2 pi df))| with a = 2^-4. The
//    averaged PLV must be within 0.08 of it (511 = 1.0).
// The sample period is shortened to 2000 cycles; all parameters are at their
// defaults.
module tb_workload_vector_analysis;
  import nvas_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NS = 220, SETTLE = 60;
  localparam real F0 = 0.23;
  localparam real DF [7] = '{0.0, 0.004, 0.008, 0.016, 0.03, 0.06, 0.12};
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

  int checks = 0, failures = 0, sample_n = 0, nv = 0;
  real env [NS + 64];
  real magv [NS + 64];
  real dsum [7];
  real psum [7];
  int  navg = 0;

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

  function automatic int wrap1024(int v);
    int r;
    r = v % 1024;
    if (r < 0) r += 1024;
    if (r >= 512) r -= 1024;
    return r;
  endfunction

  always @(negedge clk) if (rst_n && dut.frame_done) begin
    sample_n++;
    for (int k = 0; k < 8; k++) begin
      afe_in[k]      = AIN_W'(int'(1800.0 * $sin(2.0 * PI * (F0 + (k == 0 ? 0.0 : DF[k-1])) * real'(sample_n))));
      afe_in[16 + k] = AIN_W'(int'(1800.0 * $sin(2.0 * PI * F0 * real'(sample_n) - 0.7 * real'(k))));
    end
    env[sample_n] = 0.55 + 0.4 * $sin(2.0 * PI * real'(sample_n) / 50.0);
    afe_in[32] = AIN_W'(int'(1800.0 * env[sample_n] * $sin(2.0 * PI * 0.25 * real'(sample_n))));
  end

  always @(posedge clk) if (rst_n && vec_valid) begin
    nv <= nv + 1;
    magv[sample_n] <= real'(dut.mag[16]);
    if (sample_n >= SETTLE) begin
      navg <= navg + 1;
      for (int k = 1; k < 8; k++) begin
        dsum[k-1] <= dsum[k-1] + real'(wrap1024(int'($signed(dut.dphi[8 + k - 1]))
                                               - int'($floor(real'(k) * 0.7 / (2.0 * PI) * 1024.0 + 0.5))));
        psum[k-1] <= psum[k-1] + real'(plv[k-1]);
      end
    end
  end

  initial begin
    chan_cfg_t cc;
    foreach (dsum[k]) begin dsum[k] = 0.0; psum[k] = 0.0; end
    foreach (magv[k]) begin magv[k] = 0.0; env[k] = 0.0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    // windowed allpass (delay of 7.5 samples) and Hilbert coefficients
    for (int c = 0; c < NCH; c++) begin
      real m, w, h;
      m = real'(c % 8) - 7.5;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(c % 8) / 15.0);
      h = ((c % 16) < 8) ? $sin(PI * m) / (PI * m) * w : w / (PI * m);
      cc = '0;
      cc.coef = 8'(int'($floor(h * 128.0 + 0.5)));
      wr(8'(A_CHAN_BASE + c), 32'(cc));
    end
    for (int k = 1; k < 8; k++) begin
      wr(8'(A_PAIR_BASE + k - 1), {22'd0, 5'(k), 5'(0)});
      wr(8'(A_PAIR_BASE + 8 + k - 1), {22'd0, 5'(8 + k), 5'(8)});
    end
    wr(A_PERIOD, 2000);
    wr(A_MODE, 3'b101);           // run, open loop, I/Q mode
    while (sample_n < NS) @(negedge clk);

    // phase differences
    for (int k = 1; k < 8; k++) begin
      real e, lim;
      e = dsum[k-1] / real'(navg);
      lim = 0.015 * real'(k) * 0.7 / (2.0 * PI) * 1024.0;
      if (lim < 1.0) lim = 1.0;
      $display("pair (8,%0d): ideal %0d, mean error %0.2f steps", 8 + k,
               wrap1024(int'($floor(real'(k) * 0.7 / (2.0 * PI) * 1024.0 + 0.5))), e);
      checks++;
      if (e > lim || e < -lim) begin failures++; $display("FAIL phase difference error"); end
    end
    // PLV against frequency offset
    for (int k = 1; k < 8; k++) begin
      real w, re, im, ideal, got;
      w = 2.0 * PI * DF[k-1];
      re = 1.0 - (15.0 / 16.0) * $cos(w);
      im = (15.0 / 16.0) * $sin(w);
      ideal = (1.0 / 16.0) / $sqrt(re * re + im * im);
      got = psum[k-1] / real'(navg) / 511.0;
      $display("df %0.3f: PLV %0.3f, ideal %0.3f", DF[k-1], got, ideal);
      checks++;
      if (got - ideal > 0.08 || ideal - got > 0.08) begin failures++; $display("FAIL PLV"); end
    end
    // envelope
    begin
      real best;
      int bl;
      best = -2.0; bl = -1;
      for (int lag = 0; lag <= 24; lag++) begin
        real sx, sy, sxx, syy, sxy, n, r;
        sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 0;
        for (int t = SETTLE; t < NS - 1; t++) begin
          sx += env[t - lag]; sy += magv[t];
          sxx += env[t - lag] * env[t - lag]; syy += magv[t] * magv[t];
          sxy += env[t - lag] * magv[t]; n += 1.0;
        end
        r = (sxy - sx * sy / n) / $sqrt((sxx - sx * sx / n) * (syy - sy * sy / n));
        if (r > best) begin best = r; bl = lag; end
      end
      $display("envelope correlation %0.4f at a delay of %0d samples", best, bl);
      checks++;
      if (best < 0.97) begin failures++; $display("FAIL envelope"); end
    end
    checks++;
    if (nv < NS - 10) begin failures++; $display("FAIL only %0d vector results", nv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
