// Self-checking testbench of tx_framer: raw and vector frames are built from
// random data, read out with random back-pressure and compared bit by bit with
// the frame format (sync 0xA5C3, type byte, payload channel 0 first, MSB
// first). A frame offered while another is being sent must be dropped and
// counted.
module tb_tx_framer;
  import nvas_pkg::*;
  logic clk = 0, rst_n = 0, raw_valid = 0, vec_valid = 0, bit_out, bit_valid, bit_ready = 0;
  logic [NCH-1:0][ADC_W-1:0] raw_data;
  logic [NIQ-1:0][DW-1:0] mag, phase;
  logic [NPAIR-1:0][DW-1:0] dphi, plv;
  logic [15:0] frames_sent, frames_dropped;
  int checks = 0, failures = 0;
  logic expq [$];

  tx_framer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(logic [31:0] v, int w);
    for (int i = w - 1; i >= 0; i--) expq.push_back(v[i]);
  endtask

  task automatic drain();
    int n = 0, bad = 0;
    while (expq.size() > 0) begin
      @(negedge clk); bit_ready = ($urandom_range(0, 3) != 0);
      if (bit_ready && bit_valid) begin
        if (bit_out != expq.pop_front()) bad++;
        n++;
      end
      if (n > 2000) break;
    end
    @(negedge clk); bit_ready = 0;
    checks++;
    if (bad != 0 || expq.size() != 0 || bit_valid) begin
      failures++; $display("FAIL frame: %0d wrong bits, %0d missing", bad, expq.size());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int c = 0; c < NCH; c++) raw_data[c] = ADC_W'($urandom);
      for (int c = 0; c < NIQ; c++) begin mag[c] = DW'($urandom); phase[c] = DW'($urandom); end
      for (int p = 0; p < NPAIR; p++) begin dphi[p] = DW'($urandom); plv[p] = DW'($urandom); end
      push(32'hA5C3, 16);
      if (f[0]) begin
        push(32'h02, 8);
        for (int c = 0; c < NIQ; c++) begin push(32'(mag[c]), DW); push(32'(phase[c]), DW); end
        for (int p = 0; p < NPAIR; p++) begin push(32'(dphi[p]), DW); push(32'(plv[p]), DW); end
        @(negedge clk); vec_valid = 1; @(negedge clk); vec_valid = 0;
      end else begin
        push(32'h01, 8);
        for (int c = 0; c < NCH; c++) push(32'(raw_data[c]), ADC_W);
        @(negedge clk); raw_valid = 1; @(negedge clk); raw_valid = 0;
      end
      // a second frame during transmission is dropped
      if (f == 2) begin
        repeat (5) @(negedge clk);
        raw_valid = 1; @(negedge clk); raw_valid = 0;
      end
      drain();
    end
    checks++;
    if (frames_sent != 6 || frames_dropped != 1) begin
      failures++; $display("FAIL counters sent %0d dropped %0d", frames_sent, frames_dropped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
