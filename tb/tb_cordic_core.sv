// Self-checking testbench of cordic_core against real-number math: vectoring
// must give magnitude and atan2 angle, rotation must give A*cos and A*sin,
// within a few LSB, with done ITER+2 cycles after start.
module tb_cordic_core;
  localparam int DW = 10, ITER = 10;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, start = 0, mode = 0, busy, done;
  logic signed [DW-1:0] x_in = 0, y_in = 0;
  logic [DW-1:0] z_in = 0, z_out;
  logic signed [DW:0] x_out, y_out;
  int checks = 0, failures = 0, cyc;

  cordic_core #(.DW(DW), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int angdiff(int a, int b);  // wrapped difference, DW bits
    int d = (a - b) & ((1 << DW) - 1);
    if (d >= (1 << (DW-1))) d -= (1 << DW);
    return d;
  endfunction

  initial begin
    real m, ang, ex, ey;
    int ea;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      mode = t[0];
      x_in = DW'($urandom_range(0, 1022) - 511);
      y_in = DW'($urandom_range(0, 1022) - 511);
      z_in = DW'($urandom);
      if (mode) y_in = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ITER + 2) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (!mode) begin
        m   = $sqrt(real'(x_in) * real'(x_in) + real'(y_in) * real'(y_in));
        ang = $atan2(real'(y_in), real'(x_in));
        ea  = int'($floor(ang / (2.0 * PI) * 1024.0 + 0.5));
        if (rabs(real'(x_out) - m) > 3.0 || (m > 40.0 && (angdiff(int'(z_out), ea) > 2 || angdiff(int'(z_out), ea) < -2))) begin
          failures++;
          $display("FAIL vec (%0d,%0d): mag %0d/%0.1f ang %0d/%0d", x_in, y_in, x_out, m, z_out, ea);
        end
      end else begin
        ang = real'(z_in) / 1024.0 * 2.0 * PI;
        ex  = real'(x_in) * $cos(ang);
        ey  = real'(x_in) * $sin(ang);
        if (rabs(real'(x_out) - ex) > 4.0 || rabs(real'(y_out) - ey) > 4.0) begin
          failures++;
          $display("FAIL rot %0d by %0d: (%0d,%0d) exp (%0.1f,%0.1f)", x_in, z_in, x_out, y_out, ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
