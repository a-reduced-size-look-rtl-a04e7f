// tb_phase_adjust: sweeps all 256 phases and checks the quadrant, the table
// address (mirrored in the second and fourth quarters) and the negate flag
// (third and fourth quarters) against the quarter boundaries 0-63, 64-127,
// 128-191 and 192-255.
module tb_phase_adjust;
  int checks = 0, failures = 0;
  logic [7:0] phase;
  logic [5:0] lut_addr;
  logic       negate;
  dds_pkg::quadrant_e quadrant;
  int exp_q, exp_addr;
  bit exp_neg;

  phase_adjust dut (.phase(phase), .lut_addr(lut_addr), .negate(negate), .quadrant(quadrant));

  initial begin
    for (int p = 0; p < 256; p++) begin
      phase = 8'(p);
      #1;
      exp_q    = p / 64;
      exp_addr = (exp_q == 1 || exp_q == 3) ? 63 - (p % 64) : (p % 64);
      exp_neg  = (exp_q >= 2);
      checks++;
      if (int'(quadrant) != exp_q || int'(lut_addr) != exp_addr || negate != exp_neg) begin
        failures++;
        $display("FAIL: phase %0d: quadrant %0d addr %0d negate %0b, expected %0d %0d %0b",
                 p, quadrant, lut_addr, negate, exp_q, exp_addr, exp_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
