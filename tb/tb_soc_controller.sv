// Self-checking testbench of soc_controller: register writes must reach the
// outputs (global registers, analog control codes, pair table, one-hot
// channel-memory writes);
// frames must start every `period` cycles with one conversion in raw mode and
// eight slots 0..7 in I/Q mode; a trigger must start a burst only with closed
// loop enabled, lasting npulses*32 units of stim_unit cycles, during which
// sample ticks are skipped.
module tb_soc_controller;
  import nvas_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, conv_done = 0, trigger = 0;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [NCH-1:0] chan_we;
  chan_cfg_t chan_wdata;
  logic [NPAIR-1:0][4:0] pair_a, pair_b;
  logic [DW-1:0] threshold;
  logic [7:0] hold;
  logic [NPAIR-1:0] mask;
  logic [3:0] ema_shift;
  analog_ctrl_t analog_ctrl;
  logic iq_mode, closed_loop, conv_start, frame_done, frame_iq, stim_mode, unit_tick;
  logic [2:0] slot;
  logic [15:0] bursts, skipped;
  int checks = 0, failures = 0;
  int nstart = 0, nframe = 0, last_frame = -1, cyc = 0, nticks = 0, stim_cyc = 0;
  int slots [$];
  int frame_gap [$];

  soc_controller dut (.*);
  always #5 clk = ~clk;

  // converter model: done 9 cycles after each start
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (conv_start) begin
      nstart <= nstart + 1;
      slots.push_back(int'(slot));
      fork begin repeat (9) @(posedge clk); #1 conv_done = 1; @(posedge clk); #1 conv_done = 0; end join_none
    end
    if (frame_done) begin
      nframe <= nframe + 1;
      if (last_frame >= 0) frame_gap.push_back(cyc - last_frame);
      last_frame <= cyc;
    end
    if (unit_tick) nticks <= nticks + 1;
    if (stim_mode) stim_cyc <= stim_cyc + 1;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    #1;
    if (a[7:6] == 2'b01) begin
      checks++;
      if (chan_we != (64'd1 << a[5:0]) || chan_wdata != chan_cfg_t'(d[21:0])) begin
        failures++; $display("FAIL channel write %h", a);
      end
    end
    @(negedge clk); cfg_we = 0;
    #1;
    checks++;
    if (chan_we != '0) begin failures++; $display("FAIL stray channel write"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(A_THRESH, 321); wr(A_HOLD, 7); wr(A_MASK, 32'hF0F0_1234); wr(A_EMA_SHIFT, 3);
    wr(8'h85, {22'd0, 5'd9, 5'd20});
    checks++;
    if (analog_ctrl != '{1'b1, 1'b1, 4'd0, 4'd0, 3'd0}) begin failures++; $display("FAIL analog reset value"); end
    wr(A_ANALOG, 32'h0000_0A5B);
    checks++;
    if (analog_ctrl.gain_sel != 3'd3 || analog_ctrl.bpf_tune != 4'hB || analog_ctrl.rc_lpf_tune != 4'h4 ||
        analog_ctrl.chop_en != 1'b1 || analog_ctrl.uwb_high_band != 1'b0) begin
      failures++; $display("FAIL analog control %h", analog_ctrl);
    end
    for (int k = 0; k < 8; k++) wr(8'(A_CHAN_BASE + 8 * k + 3), $urandom);
    checks++;
    if (threshold != 321 || hold != 7 || mask != 32'hF0F0_1234 || ema_shift != 3 ||
        pair_a[5] != 20 || pair_b[5] != 9 || pair_a[6] != 6 || pair_b[6] != 7) begin
      failures++; $display("FAIL registers");
    end
    // raw mode frames
    wr(A_PERIOD, 40); wr(A_STIM_UNIT, 3); wr(A_STIM_NPUL, 2);
    wr(A_MODE, 3'b100);
    repeat (400) @(negedge clk);
    wr(A_MODE, 3'b000);
    repeat (50) @(negedge clk);
    checks++;
    if (nframe < 9 || nstart != nframe || frame_iq) begin
      failures++; $display("FAIL raw frames %0d starts %0d", nframe, nstart);
    end
    foreach (frame_gap[i]) begin
      checks++;
      if (frame_gap[i] != 40) begin failures++; $display("FAIL frame spacing %0d at %0d", frame_gap[i], i); end
    end
    // I/Q mode frames: eight slots each
    nframe = 0; nstart = 0; slots.delete(); frame_gap.delete(); last_frame = -1;
    wr(A_PERIOD, 120);
    wr(A_MODE, 3'b101);
    repeat (600) @(negedge clk);
    wr(A_MODE, 3'b001);
    repeat (150) @(negedge clk);
    checks++;
    if (nframe < 4 || nstart != 8 * nframe || !frame_iq) begin
      failures++; $display("FAIL iq frames %0d starts %0d", nframe, nstart);
    end
    foreach (slots[i]) begin
      checks++;
      if (slots[i] != i % 8) begin failures++; $display("FAIL slot order"); end
    end
    // trigger without closed loop: ignored
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (stim_cyc != 0 || bursts != 0) begin failures++; $display("FAIL open-loop trigger started a burst"); end
    // closed loop: burst of 2 pulses x 32 units x 3 cycles
    wr(A_MODE, 3'b111);
    repeat (30) @(negedge clk);
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (400) @(negedge clk);
    wr(A_MODE, 3'b000);
    checks++;
    if (bursts != 1 || stim_cyc != 2 * 32 * 3 || nticks != 64 || skipped == 0) begin
      failures++; $display("FAIL burst: bursts %0d cycles %0d ticks %0d skipped %0d", bursts, stim_cyc, nticks, skipped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
