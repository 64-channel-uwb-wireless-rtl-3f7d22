// Self-checking testbench of add_delay_line: random product vectors for eight
// interleaved filters; each output is compared with the direct-form sum over
// the filter's own product history, tap k using the products k samples back
// (k < 8: p[k]; k >= 8: +/- p[15-k]), saturated to 10 bits. Both the symmetric
// and the antisymmetric line are tested.
module tb_add_delay_line;
  localparam int NF = 8, NU = 8;
  logic clk = 0, rst_n = 0, clear = 0, p_valid = 0;
  logic [2:0] sel = 0;
  logic signed [NU-1:0][7:0] p = '0;
  logic yv_s, yv_a;
  logic [2:0] ys_s, ys_a;
  logic signed [9:0] y_s, y_a;
  int checks = 0, failures = 0;
  int hist [NF][16][NU];   // hist[f][d][k]: product k of the sample d back

  add_delay_line #(.ANTISYM(1'b0)) dut_s (.clk, .rst_n, .clear, .p_valid, .sel, .p,
    .y_valid(yv_s), .y_sel(ys_s), .y(y_s));
  add_delay_line #(.ANTISYM(1'b1)) dut_a (.clk, .rst_n, .clear, .p_valid, .sel, .p,
    .y_valid(yv_a), .y_sel(ys_a), .y(y_a));
  always #5 clk = ~clk;

  function automatic int sat10(int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ea, f;
    for (int a = 0; a < NF; a++) for (int d = 0; d < 16; d++) for (int k = 0; k < NU; k++) hist[a][d][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      f = int'($urandom_range(0, NF-1));
      @(negedge clk);
      for (int d = 15; d > 0; d--) hist[f][d] = hist[f][d-1];
      for (int k = 0; k < NU; k++) begin
        p[k] = 8'($urandom);
        if (t < 200) p[k] = 8'sd127;        // full-scale stress
        hist[f][0][k] = int'($signed(p[k]));
      end
      sel = 3'(f); p_valid = 1;
      es = 0; ea = 0;
      for (int k = 0; k < 16; k++) begin
        int pk;
        pk = (k < NU) ? hist[f][k][k] : hist[f][k][15-k];
        es += pk;
        ea += (k < NU) ? pk : -pk;
      end
      @(negedge clk); p_valid = 0;
      checks++;
      if (!yv_s || !yv_a || ys_s != 3'(f) || int'(y_s) != sat10(es) || int'(y_a) != sat10(ea)) begin
        failures++;
        $display("FAIL t %0d f %0d sym %0d/%0d anti %0d/%0d", t, f, y_s, sat10(es), y_a, sat10(ea));
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    // clear empties every filter
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    p = '0; sel = 3; p_valid = 1; @(negedge clk); p_valid = 0;
    checks++;
    if (y_s != 0 || y_a != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
