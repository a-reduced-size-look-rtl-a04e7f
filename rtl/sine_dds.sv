// sine_dds: direct digital synthesizer for a full-period sine carrier built
// from a quarter-wave table.
//
// Data path: phase_accumulator -> phase_adjust (quadrant bits 7:6, offset
// bits 5:0, address mirror) -> quarter_sine_lut (64 entries) -> sign
// correction -> output register. With an 8-bit phase, one period has 256
// samples, of which only 64 are stored. The structure follows the document;
// the output register, the reset value and the increment input are this
// design's choices.
//
// Timing: `phase` is the accumulator register. The sample computed from the
// phase held during cycle n appears on `sine` after the next rising edge,
// i.e. sine lags phase by one clock. After reset both read 0 (sine(0) = 0).
// Carrier frequency: f_clk * phase_inc / 256.
module sine_dds #(
  parameter int unsigned PHASE_W   = dds_pkg::PHASE_W,
  parameter int unsigned SAMPLE_W  = dds_pkg::SAMPLE_W,
  parameter int          AMPLITUDE = dds_pkg::LUT_AMPLITUDE
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic        [PHASE_W-1:0]  phase_inc,
  output logic        [PHASE_W-1:0]  phase,
  output logic signed [SAMPLE_W-1:0] sine
);

  localparam int unsigned ADDR_W = PHASE_W - 2;

  logic        [ADDR_W-1:0]   lut_addr;
  logic                       negate;
  dds_pkg::quadrant_e                quadrant;
  logic signed [SAMPLE_W-1:0] magnitude;
  logic signed [SAMPLE_W-1:0] sample;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_inc (phase_inc),
    .phase     (phase)
  );

  phase_adjust #(.PHASE_W(PHASE_W)) u_adjust (
    .phase    (phase),
    .lut_addr (lut_addr),
    .negate   (negate),
    .quadrant (quadrant)
  );

  quarter_sine_lut #(
    .ADDR_W    (ADDR_W),
    .SAMPLE_W  (SAMPLE_W),
    .AMPLITUDE (AMPLITUDE)
  ) u_lut (
    .addr  (lut_addr),
    .value (magnitude)
  );

  // Sign correction for the negative half period.
  always_comb sample = negate ? -magnitude : magnitude;

  always_ff @(posedge clk) begin
    if (!rst_n) sine <= '0;
    else        sine <= sample;
  end

  // The quadrant is implied by negate and the address mirror; it is kept
  // as a named signal for waveform viewing.
  logic unused_quadrant;
  assign unused_quadrant = ^quadrant;

endmodule
