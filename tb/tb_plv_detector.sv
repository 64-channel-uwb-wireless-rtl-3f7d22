// Self-checking testbench of plv_detector: random PLV sets, thresholds, masks
// and hold counts; a reference run-length counter decides when a trigger is
// due, and the per-pair comparison flags are checked on every sample.
module tb_plv_detector;
  localparam int NP = 32, DW = 10;
  logic clk = 0, rst_n = 0, enable = 1, valid = 0, trigger;
  logic [NP-1:0][DW-1:0] plv = '0;
  logic [DW-1:0] threshold = 400;
  logic [7:0] hold = 3, run_len;
  logic [NP-1:0] mask = '1, above;
  int checks = 0, failures = 0, run = 0, ntrig = 0;

  plv_detector #(.NP(NP), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_trig, any;
    logic [NP-1:0] exp_above;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      if (t % 200 == 0) begin
        threshold = DW'($urandom_range(100, 900));
        hold      = 8'($urandom_range(0, 5));
        mask      = NP'($urandom);
        enable    = (t != 1000);
        run       = 0;
        @(negedge clk); valid = 1; plv = '0; @(negedge clk); valid = 0;  // restart run
      end
      for (int p = 0; p < NP; p++)
        plv[p] = ($urandom_range(0, 3) == 0) ? DW'($urandom_range(threshold, 1023)) : DW'($urandom_range(0, threshold));
      if ($urandom_range(0, 2) == 0) plv = '0;
      for (int p = 0; p < NP; p++) exp_above[p] = (plv[p] > threshold);
      any = |(exp_above & mask);
      exp_trig = 1'b0;
      if (!any) run = 0;
      else if (run + 1 >= ((hold == 0) ? 1 : int'(hold))) begin run = 0; exp_trig = enable; end
      else run++;
      @(negedge clk); valid = 1;
      @(negedge clk); valid = 0;
      checks++;
      if (trigger != exp_trig || above != exp_above || int'(run_len) != run) begin
        failures++; $display("FAIL t %0d trig %0b/%0b run %0d/%0d", t, trigger, exp_trig, run_len, run);
      end
      if (trigger) ntrig++;
      @(negedge clk);
      checks++;
      if (trigger) begin failures++; $display("FAIL trigger longer than one cycle"); end
    end
    checks++;
    if (ntrig < 10) begin failures++; $display("FAIL too few triggers %0d", ntrig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
