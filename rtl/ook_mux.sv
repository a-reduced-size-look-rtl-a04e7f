// ook_mux: the selector of the on-off-keying modulator.
//
// OOK is the BASK modulator with the message-0 input grounded: the output is
// the carrier s1 when the message bit is 1 and zero when it is 0. Purely
// combinational. This follows the document.
module ook_mux #(
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W
) (
  input  logic signed [SAMPLE_W-1:0] s1,
  input  logic                       sel,
  output logic signed [SAMPLE_W-1:0] ook
);

  always_comb ook = sel ? s1 : '0;

endmodule
