// Iterative shift-and-add CORDIC core (one of the processor's three).
//
// `mode` 0, vectoring: the vector (x_in, y_in) is turned onto the positive x
// axis; x_out is its magnitude and z_out its angle atan2(y_in, x_in).
// `mode` 1, rotation: (x_in, y_in) is rotated by z_in; x_out/y_out are the
// rotated components (with x_in = A, y_in = 0 they are A*cos, A*sin).
// Angles are binary: the full circle is 2^DW, so z is a wrapping two's-
// complement phase. Data are signed DW-bit words; outputs are DW+1 bits.
//
// A quadrant pre-rotation by +/-90 degrees extends the range to the whole
// circle, then ITER micro-rotations run, one per clock. The CORDIC gain
// (about 1.647) is removed at the end by a shift-and-add constant
// (2^-1+2^-4+2^-5+2^-7+2^-8+2^-10 = 0.6064), so no multiplier is used.
// Internally x/y carry FB extra fraction bits and z has 16 bits.
// Timing: `start` while not busy; `done` pulses ITER+2 cycles later with the
// outputs, which hold until the next start.
// Shift-only CORDIC cores with a 10-bit word follow the design description;
// iteration count, widths and gain compensation are this design's choice.
module cordic_core #(
  parameter int unsigned DW   = 10,
  parameter int unsigned ITER = 10,
  parameter int unsigned FB   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                mode,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  input  logic [DW-1:0]       z_in,
  output logic                busy,
  output logic                done,
  output logic signed [DW:0]  x_out,
  output logic signed [DW:0]  y_out,
  output logic [DW-1:0]       z_out
);
  localparam int unsigned XW = DW + 2 + FB + 1;
  localparam int unsigned ZW = 16;

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OUT} state_t;
  state_t state;

  logic signed [XW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic                 md;
  logic [4:0]           it;

  function automatic logic signed [ZW-1:0] atan_tab(input logic [4:0] i);
    // round(atan(2^-i) / (2*pi) * 2^16)
    case (i)
      5'd0:  return 16'sd8192;
      5'd1:  return 16'sd4836;
      5'd2:  return 16'sd2555;
      5'd3:  return 16'sd1297;
      5'd4:  return 16'sd651;
      5'd5:  return 16'sd326;
      5'd6:  return 16'sd163;
      5'd7:  return 16'sd81;
      5'd8:  return 16'sd41;
      5'd9:  return 16'sd20;
      5'd10: return 16'sd10;
      5'd11: return 16'sd5;
      5'd12: return 16'sd3;
      5'd13: return 16'sd1;
      5'd14: return 16'sd1;
      default: return 16'sd0;
    endcase
  endfunction

  function automatic logic signed [XW-1:0] gain_comp(input logic signed [XW-1:0] v);
    return (v >>> 1) + (v >>> 4) + (v >>> 5) + (v >>> 7) + (v >>> 8) + (v >>> 10);
  endfunction

  function automatic logic signed [DW:0] to_out(input logic signed [XW-1:0] v);
    logic signed [XW-1:0] r;
    r = (v + (XW'(1) <<< (FB-1))) >>> FB;
    return (DW+1)'(r);
  endfunction

  logic signed [XW-1:0] xs, ys, xi, yi;
  logic signed [ZW-1:0] zi;
  logic                 dir;  // 1: rotate counter-clockwise
  logic signed [ZW-1:0] zin_w;
  logic signed [XW-1:0] xa, ya;

  always_comb begin
    xs    = x >>> it;
    ys    = y >>> it;
    dir   = md ? !z[ZW-1] : y[XW-1];
    xi    = dir ? x - ys : x + ys;
    yi    = dir ? y + xs : y - xs;
    zi    = dir ? z - atan_tab(it) : z + atan_tab(it);
    zin_w = {z_in, {(ZW-DW){1'b0}}};
    xa    = XW'(x_in) <<< FB;
    ya    = XW'(y_in) <<< FB;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x <= '0; y <= '0; z <= '0; md <= 1'b0; it <= '0;
      done  <= 1'b0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          md <= mode;
          it <= '0;
          state <= S_ITER;
          if (!mode) begin
            // vectoring: bring the vector into the right half plane
            if (xa < 0) begin
              if (ya >= 0) begin x <= ya;  y <= -xa; z <= 16'sh4000; end
              else         begin x <= -ya; y <= xa;  z <= -16'sh4000; end
            end else begin
              x <= xa; y <= ya; z <= '0;
            end
          end else begin
            // rotation: reduce the angle to [-90, 90) degrees
            if (zin_w[ZW-1:ZW-2] == 2'b01) begin
              x <= -ya; y <= xa; z <= zin_w - 16'sh4000;
            end else if (zin_w[ZW-1:ZW-2] == 2'b10) begin
              x <= ya; y <= -xa; z <= zin_w + 16'sh4000;
            end else begin
              x <= xa; y <= ya; z <= zin_w;
            end
          end
        end
        S_ITER: begin
          x <= xi; y <= yi; z <= zi;
          it <= it + 1'b1;
          if (it == 5'(ITER-1)) state <= S_OUT;
        end
        default: begin  // S_OUT
          x_out <= to_out(gain_comp(x));
          y_out <= to_out(gain_comp(y));
          z_out <= DW'((z + (ZW'(1) <<< (ZW-DW-1))) >>> (ZW-DW));
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
