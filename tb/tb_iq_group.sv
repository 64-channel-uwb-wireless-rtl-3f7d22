// Self-checking testbench of iq_group: sixteen channels with random allpass and
// Hilbert coefficients filter eight random input streams. Every I and Q output
// is compared with a reference that quantises each tap product the way the
// converter does (clamp(floor(x*c/2048))) and sums the 16-tap symmetric /
// antisymmetric FIR over the input history, saturated to 10 bits; the output must come ADC_W+2
// cycles after conv_start. Raw mode and stimulation are checked as well.
module tb_iq_group;
  import nvas_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0, iq_mode = 0, conv_start = 0, clear = 0, stim_mode = 0, unit_tick = 0;
  logic [NC-1:0] cfg_we = '0;
  chan_cfg_t cfg_wdata = '0;
  logic signed [NC-1:0][AIN_W-1:0] afe_in = '0;
  logic [2:0] slot = 0, i_sel, q_sel;
  logic conv_done, raw_valid, i_valid, q_valid;
  logic signed [NC-1:0][ADC_W-1:0] raw_data;
  logic signed [DW-1:0] i_y, q_y;
  logic [NC-1:0] stim_on, stim_anodic;
  logic [NC-1:0][ADC_W-1:0] stim_amp;
  int checks = 0, failures = 0;
  int coef [NC];
  int amp [NC];
  int xh [8][16];   // input history per filter

  iq_group dut (.*);
  always #5 clk = ~clk;

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction
  function automatic int sat10(int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction
  function automatic int prod(int x, int c);
    int v = floordiv(x * c, 2048);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_cfg_t c;
    int ei, eq, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ch = 0; ch < NC; ch++) begin
      c = chan_cfg_t'($urandom);
      c.stim_en = (ch != 3);
      coef[ch] = int'(c.coef);
      amp[ch]  = int'(c.amp);
      @(negedge clk); cfg_we = '0; cfg_we[ch] = 1'b1; cfg_wdata = c;
    end
    @(negedge clk); cfg_we = '0;
    for (int f = 0; f < 8; f++) for (int d = 0; d < 16; d++) xh[f][d] = 0;

    // I/Q mode: 30 sample periods of eight slots
    iq_mode = 1;
    for (int n = 0; n < 30; n++) begin
      for (int ch = 0; ch < NC; ch++) afe_in[ch] = AIN_W'($urandom);
      for (int j = 0; j < 8; j++) begin
        for (int d = 15; d > 0; d--) xh[j][d] = xh[j][d-1];
        xh[j][0] = int'($signed(afe_in[j]));
        ei = 0; eq = 0;
        for (int k = 0; k < 16; k++) begin
          int u;
          u = (k < 8) ? k : 15 - k;
          ei += prod(xh[j][k], coef[u]);
          eq += (k < 8) ? prod(xh[j][k], coef[8+u]) : -prod(xh[j][k], coef[8+u]);
        end
        @(negedge clk); slot = 3'(j); conv_start = 1;
        @(negedge clk); conv_start = 0; cyc = 1;
        while (!i_valid) begin @(negedge clk); cyc++; end
        checks++;
        if (!q_valid || i_sel != 3'(j) || q_sel != 3'(j) || cyc != ADC_W + 2 ||
            int'(i_y) != sat10(ei) || int'(q_y) != sat10(eq)) begin
          failures++;
          $display("FAIL n %0d slot %0d I %0d/%0d Q %0d/%0d cycles %0d", n, j, i_y, sat10(ei), q_y, sat10(eq), cyc);
        end
      end
    end

    // raw mode: every channel converts its own input
    iq_mode = 0;
    for (int n = 0; n < 10; n++) begin
      for (int ch = 0; ch < NC; ch++) afe_in[ch] = AIN_W'($urandom);
      @(negedge clk); conv_start = 1;
      @(negedge clk); conv_start = 0;
      while (!raw_valid) @(negedge clk);
      for (int ch = 0; ch < NC; ch++) begin
        checks++;
        if (int'($signed(raw_data[ch])) != floordiv(int'($signed(afe_in[ch])), 16)) begin
          failures++; $display("FAIL raw ch %0d", ch);
        end
      end
      checks++;
      if (i_valid) begin failures++; $display("FAIL FIR ran in raw mode"); end
    end

    // stimulation: enabled channels drive their amplitude in the first unit
    @(negedge clk); stim_mode = 1;
    @(negedge clk);
    checks++;
    if (stim_on[3] || !stim_on[0] || int'(stim_amp[5]) != amp[5]) begin
      failures++; $display("FAIL stim");
    end
    stim_mode = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
