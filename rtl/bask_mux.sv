// bask_mux: the selector of the binary amplitude-shift-keying modulator.
//
// Two versions of the carrier come in: s1, the full sine, stands for message
// bit 1, and s0, the sine at half amplitude, for message bit 0. The message
// bit drives the select line, so the output carries the full or the halved
// carrier. Purely combinational: the output follows the inputs in the same
// cycle. This follows the document.
module bask_mux #(
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W
) (
  input  logic signed [SAMPLE_W-1:0] s0,
  input  logic signed [SAMPLE_W-1:0] s1,
  input  logic                       sel,
  output logic signed [SAMPLE_W-1:0] bask
);

  always_comb bask = sel ? s1 : s0;

endmodule
