// Self-checking testbench of the MDAC/comparator model: the comparator
// decision is checked against an integer reference, and a full SAR search over
// the model must return clamp(floor(vin*coef/2^(AIN_W-1))) (coef = 128 when
// multiplication is off).
module tb_madc_analog;
  localparam int AIN_W = 12;
  logic signed [AIN_W-1:0] vin;
  logic signed [7:0]       coef;
  logic                    mult_en, cmp;
  logic [7:0]              code;
  int checks = 0, failures = 0;

  madc_analog #(.AIN_W(AIN_W)) dut (.*);

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_eff, expv, got;
    logic [7:0] d;
    for (int t = 0; t < 2000; t++) begin
      vin = AIN_W'($urandom); coef = 8'($urandom); mult_en = 1'($urandom);
      if (t < 4) begin vin = (t[0]) ? 12'sh7FF : 12'sh800; coef = t[1] ? 8'sh7F : 8'sh80; mult_en = 1; end
      c_eff = mult_en ? int'(coef) : 128;
      // single comparator decision
      code = 8'($urandom); #1;
      checks++;
      if (cmp != (int'(vin) * c_eff >= (int'(code) - 128) * 2048)) begin
        failures++; $display("FAIL cmp vin %0d coef %0d code %0d", vin, coef, code);
      end
      // SAR search
      d = '0;
      for (int b = 7; b >= 0; b--) begin
        d[b] = 1'b1; code = d; #1;
        if (!cmp) d[b] = 1'b0;
      end
      got  = int'(d) - 128;
      expv = floordiv(int'(vin) * c_eff, 2048);
      if (expv > 127) expv = 127;
      if (expv < -128) expv = -128;
      checks++;
      if (got != expv) begin
        failures++; $display("FAIL sar vin %0d coef %0d got %0d exp %0d", vin, c_eff, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
