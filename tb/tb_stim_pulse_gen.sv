// Self-checking testbench of stim_pulse_gen: with unit ticks every few cycles,
// the on/off and polarity pattern of each of 32 units is compared with the
// rule "on for duty+1 units of each 16-unit half, second half reversed".
module tb_stim_pulse_gen;
  logic clk = 0, rst_n = 0, en = 0, unit_tick = 0, anodic_first = 0;
  logic [3:0] duty = 0;
  logic stim_on, stim_anodic;
  int checks = 0, failures = 0, on_units;

  stim_pulse_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      duty = 4'($urandom); anodic_first = 1'($urandom);
      if (t == 0) duty = 0;
      if (t == 1) duty = 15;
      @(negedge clk); en = 1;
      on_units = 0;
      for (int u = 0; u < 64; u++) begin
        int uu;
        logic exp_on, exp_an;
        uu = u % 32;
        exp_on = ((uu % 16) <= int'(duty));
        exp_an = exp_on && ((uu >= 16) ^ anodic_first);
        #1;
        checks++;
        if (stim_on != exp_on || stim_anodic != exp_an) begin
          failures++;
          $display("FAIL duty %0d unit %0d on %0b/%0b an %0b/%0b", duty, u, stim_on, exp_on, stim_anodic, exp_an);
        end
        if (stim_on) on_units++;
        repeat (2) @(negedge clk);
        unit_tick = 1; @(negedge clk); unit_tick = 0;
      end
      checks++;
      if (on_units != 4 * (int'(duty) + 1)) begin failures++; $display("FAIL charge balance"); end
      en = 0; @(negedge clk);
      checks++;
      if (stim_on) begin failures++; $display("FAIL on while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
