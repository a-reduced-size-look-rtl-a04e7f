// phase_accumulator: the phase generator of the sine synthesizer.
//
// An 8-bit register that adds phase_inc to itself on every rising clock edge
// and wraps modulo 2**PHASE_W, so that its value sweeps the angles 0..360
// degrees in 256 steps. phase_inc sets the carrier frequency:
// f_out = f_clk * phase_inc / 256. The 8-bit width and rising-edge operation
// follow the document; the increment input and the synchronous active-low
// reset to phase 0 are this design's choices.
//
// Timing: phase is the register output; after reset it reads 0, and each
// clock edge with rst_n high advances it by phase_inc.
module phase_accumulator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase_inc,
  output logic [PHASE_W-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + phase_inc;   // wraps modulo 2**PHASE_W
  end

endmodule
