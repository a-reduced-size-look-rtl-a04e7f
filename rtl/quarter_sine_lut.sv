// quarter_sine_lut: 64-entry table of the first quarter of a sine period.
//
// Holds only the samples 0..63 of a 256-sample full period; the rest of the
// wave is rebuilt from these by mirroring the address and negating the value
// (see phase_adjust and sine_dds). Entry k is
//     round(AMPLITUDE * sin(2*pi*k / (4*2**ADDR_W))),
// computed at elaboration time, so no data file is needed and the table
// follows the parameters. The read is combinational (a small distributed
// ROM); the document places the table in FPGA memory but does not fix its
// read timing, so that part is this design's choice.
//
// Interface: addr (ADDR_W bits) in, value (SAMPLE_W bits, signed, 0..AMPLITUDE) out.
module quarter_sine_lut #(
  parameter int unsigned ADDR_W    = dds_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W  = dds_pkg::SAMPLE_W,
  parameter int          AMPLITUDE = dds_pkg::LUT_AMPLITUDE
) (
  input  logic        [ADDR_W-1:0]   addr,
  output logic signed [SAMPLE_W-1:0] value
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic signed [SAMPLE_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < int'(DEPTH); k++)
      t[k] = SAMPLE_W'(dds_pkg::quarter_sine(k, AMPLITUDE, int'(ADDR_W)));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  initial begin
    assert (AMPLITUDE < (1 << (SAMPLE_W - 1)))
      else $error("AMPLITUDE %0d does not fit a signed %0d-bit sample", AMPLITUDE, SAMPLE_W);
  end

  always_comb value = TABLE[addr];

endmodule
