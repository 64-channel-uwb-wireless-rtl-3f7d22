// Self-checking testbench of sar_logic: a comparator model with a known target
// makes the SAR search for it; the result must equal the target and arrive
// N+1 cycles after start. The load path (stimulation DAC code) is checked too.
module tb_sar_logic;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, load = 0, cmp, busy, done;
  logic [N-1:0] load_val = '0, trial, result;
  int target, checks = 0, failures = 0, cyc;

  sar_logic #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  assign cmp = (int'(trial) <= target);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      target = (t < 256) ? t : int'($urandom_range(0, 255));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (int'(result) != target || cyc != N + 1) begin
        failures++;
        $display("FAIL target %0d result %0d cycles %0d", target, result, cyc);
      end
    end
    // DAC reuse: load holds the code on trial
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); load = 1; load_val = N'($urandom);
      @(negedge clk); load = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (trial != load_val || busy) begin failures++; $display("FAIL load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
