// amplitude_halver: divides a signed sample by two with an arithmetic shift
// right by one bit.
//
// In the BASK modulator this makes the message-0 signal from the carrier:
// the same sine at half amplitude. The document names the shift right as
// the way to halve the amplitude; keeping the sign bit (arithmetic rather
// than logical shift) is required for a signed carrier. Odd negative values
// round towards minus infinity (-7 -> -4). Purely combinational.
module amplitude_halver #(
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W
) (
  input  logic signed [SAMPLE_W-1:0] din,
  output logic signed [SAMPLE_W-1:0] dout
);

  always_comb dout = din >>> 1;

endmodule
