// Folded 16-tap transposed add-and-delay line, time-multiplexed over eight FIR
// filters.
//
// A bank of eight MADCs delivers the eight products p[k] = c[k]*x of one input
// sample x of filter `sel` (k = 0..7, c[k] the unique coefficients). The line
// applies them as the 16 taps h[k] = c[k] and h[15-k] = +/-c[k] of a symmetric
// (ANTISYM = 0, allpass/I path) or antisymmetric (ANTISYM = 1, Hilbert/Q path)
// filter in transposed form:
//   y = h[0]*x + r[0];  r[i] <= h[i+1]*x + r[i+1];  r[14] <= h[15]*x
// Each of the eight filters keeps its own 15 partial sums, so one line serves
// eight inputs. The folded, transposed, time-multiplexed structure follows the
// design description; the antisymmetric option for the Hilbert set, the word
// widths and the output scaling are this design's choice.
//
// Timing: `p_valid` with products and `sel`; `y_valid`, `y_sel` and `y` one
// cycle later. `y` is the ACC_W-bit sum saturated to OUT_W bits (the 10-bit
// processor word). `clear` zeroes all partial sums.
module add_delay_line #(
  parameter int unsigned NF        = 8,
  parameter int unsigned NU        = 8,    // unique coefficients (taps/2)
  parameter int unsigned PW        = 8,    // product width
  parameter int unsigned ACC_W     = 12,
  parameter int unsigned OUT_W     = 10,
  parameter bit          ANTISYM   = 1'b0
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             clear,
  input  logic                             p_valid,
  input  logic [$clog2(NF)-1:0]            sel,
  input  logic signed [NU-1:0][PW-1:0]     p,
  output logic                             y_valid,
  output logic [$clog2(NF)-1:0]            y_sel,
  output logic signed [OUT_W-1:0]          y
);
  localparam int unsigned NT = 2 * NU;

  logic signed [ACC_W-1:0] r [NF][NT-1];
  logic signed [ACC_W-1:0] h [NT];
  logic signed [ACC_W-1:0] ysum;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'((1 << (OUT_W-1)) - 1))  return OUT_W'((1 << (OUT_W-1)) - 1);
    else if (v < -ACC_W'(1 << (OUT_W-1)))  return OUT_W'(-(1 << (OUT_W-1)));
    else                                   return OUT_W'(v);
  endfunction

  always_comb begin
    for (int k = 0; k < NU; k++) begin
      h[k]        = ACC_W'($signed(p[k]));
      h[NT-1-k]   = ANTISYM ? -ACC_W'($signed(p[k])) : ACC_W'($signed(p[k]));
    end
    ysum = h[0] + r[sel][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < NT-1; i++) r[f][i] <= '0;
      y_valid <= 1'b0;
      y_sel   <= '0;
      y       <= '0;
    end else begin
      y_valid <= 1'b0;
      if (clear) begin
        for (int f = 0; f < NF; f++)
          for (int i = 0; i < NT-1; i++) r[f][i] <= '0;
      end else if (p_valid) begin
        for (int i = 0; i < NT-2; i++) r[sel][i] <= h[i+1] + r[sel][i+1];
        r[sel][NT-2] <= h[NT-1];
        y_valid <= 1'b1;
        y_sel   <= sel;
        y       <= sat(ysum);
      end
    end
  end
endmodule
