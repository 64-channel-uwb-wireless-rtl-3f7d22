// Self-checking testbench of manchester_enc: a random bit stream, offered with
// random gaps, is decoded from the chips (first half must be the inverse of the
// second) and compared with what was sent; a back-to-back stream must take
// exactly 2*HALF cycles per bit (10 Mb/s at HALF = 1 and 20 MHz).
module tb_manchester_enc;
  localparam int HALF = 2;
  logic clk = 0, rst_n = 0, bit_in = 0, bit_valid = 0, bit_ready, chip, tx_en, chip1, tx_en1, r1;
  int checks = 0, failures = 0;
  logic sent [$];
  logic chips [$];

  manchester_enc #(.HALF(HALF)) dut (.*);
  manchester_enc #(.HALF(1)) dut1 (.clk, .rst_n, .bit_in, .bit_valid, .bit_ready(r1), .chip(chip1), .tx_en(tx_en1));
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tx_en) chips.push_back(chip);

  initial begin
    int n, c0, c1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // stream with gaps, HALF = 2
    for (int b = 0; b < 300; b++) begin
      @(negedge clk); bit_in = 1'($urandom); bit_valid = 1;
      while (!bit_ready) @(negedge clk);
      sent.push_back(bit_in);
      @(posedge clk); #1 bit_valid = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk); bit_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (chips.size() != 300 * 2 * HALF) begin failures++; $display("FAIL chip count %0d", chips.size()); end
    n = 0;
    while (chips.size() >= 2 * HALF && n < sent.size()) begin
      c0 = chips[0]; c1 = chips[HALF];
      for (int k = 0; k < 2 * HALF; k++) void'(chips.pop_front());
      checks++;
      if (c0 == c1 || c1 != int'(sent[n])) begin failures++; $display("FAIL bit %0d", n); end
      n++;
    end
    // throughput at HALF = 1: 100 bits back to back
    begin
      int t0, t1;
      bit_valid = 1;
      @(negedge clk); t0 = 0; n = 0; t1 = 0;
      while (n < 100) begin
        bit_in = 1'($urandom);
        @(posedge clk); if (r1) n++;
        @(negedge clk); t1++;
      end
      bit_valid = 0;
      checks++;
      if (t1 > 2 * 100 + 1) begin failures++; $display("FAIL throughput %0d cycles for 100 bits", t1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
