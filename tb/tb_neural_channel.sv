// Self-checking testbench of neural_channel: raw conversions must give
// clamp(floor(vin/16)), multiplying conversions clamp(floor(vin*coef/2048)),
// both N+1 cycles after conv_start; in stimulation the stored amplitude must
// appear on stim_amp exactly while the duty-cycle pattern has current on.
module tb_neural_channel;
  import nvas_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, conv_start = 0, mult_en = 0;
  logic stim_mode = 0, unit_tick = 0;
  chan_cfg_t cfg_wdata = '0, cfg;
  logic signed [AIN_W-1:0] vin = '0;
  logic adc_valid, stim_on, stim_anodic;
  logic signed [ADC_W-1:0] adc_data;
  logic [ADC_W-1:0] stim_amp;
  int checks = 0, failures = 0;

  neural_channel dut (.*);
  always #5 clk = ~clk;

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction
  function automatic int clamp8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_cfg(chan_cfg_t c);
    @(negedge clk); cfg_we = 1; cfg_wdata = c;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    chan_cfg_t c;
    int expv, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      c = chan_cfg_t'($urandom);
      if (t % 50 == 0) write_cfg(c);
      mult_en = t[0];
      @(negedge clk); vin = AIN_W'($urandom); conv_start = 1;
      expv = clamp8(mult_en ? floordiv(int'(vin) * int'(cfg.coef), 2048) : floordiv(int'(vin), 16));
      @(negedge clk); conv_start = 0; vin = AIN_W'($urandom);  // input must be held
      cyc = 1;
      while (!adc_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (int'(adc_data) != expv || cyc != ADC_W + 1) begin
        failures++;
        $display("FAIL mult %0b coef %0d data %0d exp %0d cycles %0d", mult_en, cfg.coef, adc_data, expv, cyc);
      end
    end
    // stimulation
    for (int t = 0; t < 6; t++) begin
      c = chan_cfg_t'($urandom);
      c.stim_en = (t != 5);
      write_cfg(c);
      @(negedge clk); stim_mode = 1;
      for (int u = 0; u < 32; u++) begin
        logic exp_on;
        @(negedge clk);
        exp_on = c.stim_en && ((u % 16) <= int'(c.duty));
        checks++;
        if (stim_on != exp_on || stim_amp != (exp_on ? c.amp : 8'd0) ||
            stim_anodic != (exp_on && ((u >= 16) ^ c.anodic_first))) begin
          failures++;
          $display("FAIL stim unit %0d on %0b amp %0d (cfg amp %0d duty %0d)", u, stim_on, stim_amp, c.amp, c.duty);
        end
        unit_tick = 1; @(negedge clk); unit_tick = 0;
      end
      stim_mode = 0;
      // no conversion is started while stimulating; recording resumes after
      @(negedge clk); vin = 12'sd160; mult_en = 0; conv_start = 1;
      @(negedge clk); conv_start = 0;
      while (!adc_valid) @(negedge clk);
      checks++;
      if (adc_data != 8'sd10) begin failures++; $display("FAIL conversion after stimulation"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
