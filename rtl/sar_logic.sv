// Successive-approximation register of one channel.
//
// In conversion it performs a binary search: on `start` the register is set to
// mid-scale, and on each following cycle the comparator decision `cmp` (1 = the
// input is at or above the trial code) keeps or clears the bit under test and
// the next lower bit is tried. `trial` drives the channel's MDAC. After N
// decisions `done` pulses for one cycle with `result` valid, N+1 cycles after
// `start`. Codes are offset binary.
//
// In stimulation the same register is reused as the DAC code register: `load`
// (only while idle) writes `load_val`, which then stays on `trial` and sets the
// MDAC output that the V-I converter turns into the stimulus current. That
// reuse follows the design description; the handshake is this design's choice.
module sar_logic #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         cmp,
  input  logic         load,
  input  logic [N-1:0] load_val,
  output logic [N-1:0] trial,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);
  logic [N-1:0]         sreg;
  logic [$clog2(N)-1:0] bitpos;

  assign trial  = sreg;
  assign result = sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg   <= '0;
      bitpos <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sreg            <= '0;
          sreg[N-1]       <= 1'b1;
          bitpos          <= $clog2(N)'(N-1);
          busy            <= 1'b1;
        end else if (load) begin
          sreg <= load_val;
        end
      end else begin
        if (!cmp) sreg[bitpos] <= 1'b0;
        if (bitpos == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          sreg[bitpos-1] <= 1'b1;
          bitpos         <= bitpos - 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
