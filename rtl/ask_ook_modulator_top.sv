// ask_ook_modulator_top: BASK and OOK modulators sharing one quarter-wave
// sine synthesizer.
//
// A single sine_dds (8-bit phase accumulator, 64-entry quarter-wave table,
// 16-bit signed output) makes the carrier. The BASK path sends the carrier
// and its half-amplitude copy (shift right by one) to a two-way selector
// driven by the message bit: full amplitude for 1, half for 0. The OOK path
// sends the carrier and zero to a selector: carrier for 1, silence for 0.
// The message is a bit of a free-running counter on the same clock. The
// eight most significant bits of the BASK output are also brought out on
// pmod_je, an 8-pin board connector.
//
// The blocks and their connection follow the document; sharing one carrier
// between both modulators, the constant phase increment PHASE_INC, the
// message counter bit MSG_BIT and the reset are this design's choices.
//
// Timing: the carrier sample for the phase held in cycle n appears one clock
// later; the message register is delayed by one clock as well, so carrier,
// message and both modulated outputs change on the same edge. Carrier
// frequency f_clk * PHASE_INC / 256; one message bit lasts 2**MSG_BIT clocks.
module ask_ook_modulator_top
  import dds_pkg::*;
#(
  parameter int unsigned PHASE_INC = 1,
  parameter int unsigned MSG_BIT   = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  output sample_t carrier,
  output logic    message,
  output sample_t bask,
  output sample_t ook,
  output logic [7:0] pmod_je
);

  phase_t  phase;
  sample_t s0;
  logic    msg_raw;

  sine_dds u_dds (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_inc (PHASE_W'(PHASE_INC)),
    .phase     (phase),
    .sine      (carrier)
  );

  message_counter #(.MSG_BIT(MSG_BIT)) u_msg (
    .clk     (clk),
    .rst_n   (rst_n),
    .message (msg_raw)
  );

  // Delay the message by the carrier's one-clock latency.
  always_ff @(posedge clk) begin
    if (!rst_n) message <= 1'b0;
    else        message <= msg_raw;
  end

  amplitude_halver u_half (
    .din  (carrier),
    .dout (s0)
  );

  bask_mux u_bask (
    .s0   (s0),
    .s1   (carrier),
    .sel  (message),
    .bask (bask)
  );

  ook_mux u_ook (
    .s1  (carrier),
    .sel (message),
    .ook (ook)
  );

  always_comb pmod_je = bask[SAMPLE_W-1 -: 8];

  logic unused_phase;
  assign unused_phase = ^phase;

endmodule
