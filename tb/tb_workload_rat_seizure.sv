// Workload testbench: closed-loop seizure detection and stimulation as in the
// rodent experiments: eight depth electrodes recorded and stimulated, a 4 Hz
// band, and a 5 Hz biphasic burst of about 100 uA.
//
// The eight electrodes are analytic channels 0..7 (group 0), and the detector
// watches the seven neighbour pairs (k, k+1). Each electrode carries a
// band-limited oscillation at a quarter of the sample rate. That is where a
// 4 Hz band sits when the sample period is set to 16 S/s. Here the period is
// 2000 cycles instead of 1.25 M, to keep the simulation short; the digital
// behaviour depends only on the sample index.
//
// Before sample ONSET, each electrode's phase wanders at random and
// independently (no synchrony). From ONSET on, all phases lock, which stands
// for the rise in synchrony that precedes a seizure. Checks:
//  * no trigger before ONSET;
//  * a trigger within 40 samples after ONSET;
//  * the burst drives electrodes 0..7 only, with code 21 (≈100 uA on a
//    1.2 mA / 255 scale);
//  * the pulse period is 32 x 125000 cycles (200 ms, 5 Hz at 20 MHz);
//  * recording resumes after the burst.
// All parameters are at their defaults.
module tb_workload_rat_seizure;
  import nvas_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int ONSET = 80, NPUL = 2, AMP = 21;
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

  int checks = 0, failures = 0, sample_n = 0, trig_sample = -1, n_vec = 0, n_vec_after = 0;
  int bad_stim = 0, cyc = 0, last_rise = -1, n_rise = 0;
  int rises [$];
  real theta [8];
  logic on0_q = 0;

  nvas_soc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // new electrode samples after every conversion frame
  always @(negedge clk) if (rst_n && dut.frame_done) begin
    sample_n++;
    for (int a = 0; a < 8; a++) begin
      if (sample_n < ONSET) theta[a] += (real'($urandom_range(0, 3000)) / 1000.0 - 1.5);
      else                  theta[a] = 0.2 * real'(a);
      afe_in[a] = AIN_W'(int'(1800.0 * $sin(2.0 * PI * 0.25 * real'(sample_n) + theta[a])));
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (vec_valid) begin
      n_vec <= n_vec + 1;
      if (bursts != 0 && !stim_mode) n_vec_after <= n_vec_after + 1;
    end
    if (trigger && trig_sample < 0) trig_sample <= sample_n;
    on0_q <= stim_on[0];
    if (stim_on[0] && !on0_q) rises.push_back(cyc);
    for (int c = 0; c < NCH; c++)
      if ((stim_on[c] && (c >= 8 || int'(stim_amp[c]) != AMP)) || (!stim_on[c] && stim_amp[c] != 0)) bad_stim++;
  end

  initial begin
    chan_cfg_t cc;
    foreach (theta[a]) theta[a] = real'($urandom_range(0, 6283)) / 1000.0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin
      real m, w, h;
      int q;
      m = real'(c % 8) - 7.5;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(c % 8) / 15.0);
      h = ((c % 16) < 8) ? $sin(PI * m) / (PI * m) * w : w / (PI * m);
      q = int'($floor(h * 128.0 + 0.5));
      cc = '0;
      cc.coef    = 8'(q);
      cc.amp     = 8'(AMP);
      cc.duty    = 4'd3;
      cc.stim_en = (c < 8);
      wr(8'(A_CHAN_BASE + c), 32'(cc));
    end
    for (int p = 0; p < 7; p++) wr(8'(A_PAIR_BASE + p), {22'd0, 5'(p + 1), 5'(p)});
    wr(A_MASK, 32'h7F); wr(A_THRESH, 420); wr(A_HOLD, 3);
    wr(A_STIM_NPUL, NPUL);        // stimulation unit stays at its reset value
    wr(A_PERIOD, 2000);
    wr(A_MODE, 3'b111);           // run, closed loop, I/Q mode
    while (bursts == 0 && sample_n < ONSET + 60) @(negedge clk);
    while (stim_mode) @(negedge clk);
    begin
      int v0;
      v0 = n_vec;
      while (n_vec < v0 + 3) @(negedge clk);
    end
    $display("trigger at sample %0d (onset %0d), bursts %0d, pulse starts %0d, vector frames after burst %0d",
             trig_sample, ONSET, bursts, rises.size(), n_vec_after);
    checks++;
    if (trig_sample < ONSET) begin failures++; $display("FAIL trigger before onset or none (%0d)", trig_sample); end
    checks++;
    if (trig_sample > ONSET + 40) begin failures++; $display("FAIL late trigger"); end
    checks++;
    if (bursts != 1) begin failures++; $display("FAIL bursts %0d", bursts); end
    checks++;
    if (bad_stim != 0) begin failures++; $display("FAIL stimulation outputs wrong in %0d channel-cycles", bad_stim); end
    // two phases per pulse period: rising edges at 0, 16, 32, 48 units
    checks++;
    if (rises.size() != 2 * NPUL) begin failures++; $display("FAIL %0d current phases", rises.size()); end
    for (int i = 2; i < rises.size(); i++) begin
      checks++;
      if (rises[i] - rises[i-2] != 32 * 125000) begin
        failures++; $display("FAIL pulse period %0d cycles", rises[i] - rises[i-2]);
      end
    end
    checks++;
    if (n_vec_after < 3) begin failures++; $display("FAIL recording did not resume"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
