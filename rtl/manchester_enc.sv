// Manchester encoder feeding the UWB pulse generator.
//
// Each data bit becomes two half-bit chips with a transition in the middle
// (IEEE 802.3 convention: 1 = low then high, 0 = high then low). A half-bit
// lasts HALF clock cycles, so with HALF = 1 and a 20 MHz clock the link runs
// at the 10 Mb/s of the design; the clock frequency is this design's choice.
// Bits arrive on a valid/ready handshake; the next bit is taken in the last
// cycle of the current one so a stream leaves without gaps. `tx_en` is high
// while chips are being sent; `chip` is 0 otherwise.
module manchester_enc #(
  parameter int unsigned HALF = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_in,
  input  logic bit_valid,
  output logic bit_ready,
  output logic chip,
  output logic tx_en
);
  localparam int unsigned CW = (HALF > 1) ? $clog2(HALF) : 1;
  logic          cur, second, active;
  logic [CW-1:0] cnt;
  logic          last;

  assign last      = (cnt == CW'(HALF-1));
  assign bit_ready = !active || (second && last);
  assign chip      = active && (second ? cur : !cur);
  assign tx_en     = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= 1'b0; second <= 1'b0; active <= 1'b0; cnt <= '0;
    end else if (bit_ready && bit_valid) begin
      cur <= bit_in; second <= 1'b0; active <= 1'b1; cnt <= '0;
    end else if (active) begin
      if (!last) cnt <= cnt + 1'b1;
      else begin
        cnt <= '0;
        if (!second) second <= 1'b1;
        else         active <= 1'b0;
      end
    end
  end
endmodule
