// Frame builder of the wireless link.
//
// In raw recording a frame carries the 64 8-bit ADC samples of one sample
// period; in phase-synchrony mode it carries, per analytic channel, magnitude
// and phase (10 bits each) and, per pair, phase difference and PLV (10 bits
// each). A frame is the 16-bit sync word 0xA5C3, a type byte (0x01 raw,
// 0x02 vector) and the payload, sent MSB first: 536 bits raw, 1304 bits vector.
// What is sent follows the design description; the frame format is this
// design's choice.
//
// A frame is captured into a shift register when `raw_valid` or `vec_valid`
// pulses and then leaves one bit per accepted handshake (`bit_valid` /
// `bit_ready`). A frame that arrives while the previous one is still being
// sent is dropped and counted in `frames_dropped`.
module tx_framer
  import nvas_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         raw_valid,
  input  logic [NCH-1:0][ADC_W-1:0]    raw_data,
  input  logic                         vec_valid,
  input  logic [NIQ-1:0][DW-1:0]       mag,
  input  logic [NIQ-1:0][DW-1:0]       phase,
  input  logic [NPAIR-1:0][DW-1:0]     dphi,
  input  logic [NPAIR-1:0][DW-1:0]     plv,
  output logic                         bit_out,
  output logic                         bit_valid,
  input  logic                         bit_ready,
  output logic [15:0]                  frames_sent,
  output logic [15:0]                  frames_dropped
);
  localparam int unsigned HDR   = 24;
  localparam int unsigned RAWP  = NCH * ADC_W;
  localparam int unsigned VECP  = NIQ * 2 * DW + NPAIR * 2 * DW;
  localparam int unsigned FMAX  = HDR + ((VECP > RAWP) ? VECP : RAWP);
  localparam int unsigned LW    = $clog2(FMAX + 1);

  logic [FMAX-1:0] sr;
  logic [LW-1:0]   left;
  logic [VECP-1:0] vec_flat;
  logic [RAWP-1:0] raw_flat;

  // channel 0 first
  always_comb begin
    for (int c = 0; c < NCH; c++)
      raw_flat[RAWP-1-c*ADC_W -: ADC_W] = raw_data[c];
    for (int c = 0; c < NIQ; c++)
      vec_flat[VECP-1-c*2*DW -: 2*DW] = {mag[c], phase[c]};
    for (int p = 0; p < NPAIR; p++)
      vec_flat[VECP-1-NIQ*2*DW-p*2*DW -: 2*DW] = {dphi[p], plv[p]};
  end

  assign bit_out   = sr[FMAX-1];
  assign bit_valid = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; left <= '0; frames_sent <= '0; frames_dropped <= '0;
    end else begin
      if (bit_valid && bit_ready) begin
        sr   <= sr << 1;
        left <= left - 1'b1;
      end
      if (raw_valid || vec_valid) begin
        if (bit_valid) begin
          frames_dropped <= frames_dropped + 1'b1;
        end else begin
          frames_sent <= frames_sent + 1'b1;
          if (vec_valid) begin
            sr   <= {TX_SYNC, TX_T_VECTOR, vec_flat};
            left <= LW'(HDR + VECP);
          end else begin
            sr   <= {TX_SYNC, TX_T_RAW, raw_flat, {(FMAX-HDR-RAWP){1'b0}}};
            left <= LW'(HDR + RAWP);
          end
        end
      end
    end
  end
endmodule
