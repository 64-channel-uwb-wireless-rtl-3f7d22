// Self-checking testbench of cordic_processor. Random analytic samples are fed
// for 48 sample periods; half of the channels keep a fixed phase relation, the
// other half have random phases. Magnitude and phase are compared with
// real-number math, phase differences with the wrapped difference of the phases,
// and PLV with a real-number moving average of the unit phasors of those
// differences. Locked pairs must end with PLV near 1.0 (511), unlocked ones
// clearly lower. The run time per sample is checked against its closed form.
module tb_cordic_processor;
  import nvas_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int ITER = 10;
  localparam int EXP_CYC = NIQ * (ITER + 3) + (NPAIR + 1) * (ITER + 3) + 1;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [NIQ-1:0][DW-1:0] i_in, q_in;
  logic [NPAIR-1:0][4:0] pair_a, pair_b;
  logic [3:0] ema_shift = 4;
  logic [NIQ-1:0][DW-1:0] mag, phase;
  logic [NPAIR-1:0][DW-1:0] dphi, plv;
  int checks = 0, failures = 0, cyc;
  real rc [NPAIR], rs [NPAIR], offs [NIQ];

  cordic_processor #(.ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic int angdiff(int a, int b);
    int d = (a - b) & 1023;
    if (d >= 512) d -= 1024;
    return d;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real base, th, m, a, ref_plv;
    int ea, ed;
    for (int p = 0; p < NPAIR; p++) begin
      pair_a[p] = 5'(p);
      pair_b[p] = 5'((p < 16) ? (p + 1) % 16 : (p + 7) % 32);
      rc[p] = 0.0; rs[p] = 0.0;
    end
    for (int c = 0; c < NIQ; c++) offs[c] = real'($urandom_range(0, 999)) / 1000.0 * 2.0 * PI;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 48; n++) begin
      base = real'($urandom_range(0, 999)) / 1000.0 * 2.0 * PI;
      for (int c = 0; c < NIQ; c++) begin
        th = (c < 16) ? base + offs[c] : real'($urandom_range(0, 999)) / 1000.0 * 2.0 * PI;
        m  = real'($urandom_range(120, 500));
        i_in[c] = DW'(int'(m * $cos(th)));
        q_in[c] = DW'(int'(m * $sin(th)));
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != EXP_CYC) begin failures++; $display("FAIL cycles %0d, expected %0d", cyc, EXP_CYC); end
      for (int c = 0; c < NIQ; c++) begin
        m  = $sqrt(real'($signed(i_in[c])) ** 2 + real'($signed(q_in[c])) ** 2);
        a  = $atan2(real'($signed(q_in[c])), real'($signed(i_in[c])));
        ea = int'($floor(a / (2.0 * PI) * 1024.0 + 0.5));
        checks++;
        if (rabs(real'(mag[c]) - m) > 3.0 || angdiff(int'(phase[c]), ea) > 2 || angdiff(int'(phase[c]), ea) < -2) begin
          failures++; $display("FAIL ch %0d mag %0d/%0.1f phase %0d/%0d", c, mag[c], m, phase[c], ea);
        end
      end
      for (int p = 0; p < NPAIR; p++) begin
        ed = (int'(phase[pair_a[p]]) - int'(phase[pair_b[p]])) & 1023;
        a  = real'(ed) / 1024.0 * 2.0 * PI;
        rc[p] = rc[p] + (511.0 * $cos(a) - rc[p]) / 16.0;
        rs[p] = rs[p] + (511.0 * $sin(a) - rs[p]) / 16.0;
        ref_plv = $sqrt(rc[p] * rc[p] + rs[p] * rs[p]);
        checks++;
        if (int'(dphi[p]) != ed || rabs(real'(plv[p]) - ref_plv) > 12.0) begin
          failures++; $display("FAIL n %0d pair %0d dphi %0d/%0d plv %0d/%0.1f", n, p, dphi[p], ed, plv[p], ref_plv);
        end
      end
    end
    for (int p = 0; p < NPAIR; p++) begin
      checks++;
      if ((p < 16 && plv[p] < 480) || (p >= 16 && plv[p] > 400)) begin
        failures++; $display("FAIL final plv pair %0d = %0d", p, plv[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
