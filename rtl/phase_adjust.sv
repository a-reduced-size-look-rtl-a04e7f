// phase_adjust: maps a full-period phase onto the quarter-wave table.
//
// The two most significant phase bits give the quarter of the period, the
// remaining bits the offset k inside it. The table holds the first quarter
// only, so the other three are rebuilt from it by symmetry:
//   quarter 1 (phase   0..63 ):  +table[k]
//   quarter 2 (phase  64..127):  +table[63-k]   (address mirrored)
//   quarter 3 (phase 128..191):  -table[k]      (value negated)
//   quarter 4 (phase 192..255):  -table[63-k]   (mirrored and negated)
// This is the same construction the document gives for building the
// full wave from the stored quarter. The mirror 63-k is the bitwise
// complement of k. Purely combinational.
//
// Interface: phase in; lut_addr, negate and quadrant out.
module phase_adjust #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic [PHASE_W-1:0] phase,
  output logic [PHASE_W-3:0] lut_addr,
  output logic               negate,
  output dds_pkg::quadrant_e quadrant
);

  logic [PHASE_W-3:0] offset;

  always_comb begin
    quadrant = dds_pkg::quadrant_e'(phase[PHASE_W-1 -: 2]);
    offset   = phase[PHASE_W-3:0];
    // Second and fourth quarters run the table backwards.
    lut_addr = phase[PHASE_W-2] ? ~offset : offset;
    // Third and fourth quarters are the negative half of the wave.
    negate   = phase[PHASE_W-1];
  end

endmodule
