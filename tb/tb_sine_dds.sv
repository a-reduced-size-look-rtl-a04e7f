// tb_sine_dds: runs the synthesizer at several phase increments and checks
// every output sample against the reference full-period wave built from the
// 64-sample quarter (tb_ref_pkg), with the one-clock latency from phase to
// sine. Checks the 256-clock period at increment 1, the peak +/-9997 and
// that all four quarters were produced.
module tb_sine_dds;
  int checks = 0, failures = 0;
  int quarter_seen [4];
  logic              clk = 0, rst_n = 0;
  logic [7:0]        phase_inc = 8'd1;
  logic [7:0]        phase;
  logic signed [15:0] sine;
  logic [7:0]        prev_phase;
  int                maxv, minv;
  logic signed [15:0] first_period [256];

  sine_dds dut (.clk(clk), .rst_n(rst_n), .phase_inc(phase_inc), .phase(phase), .sine(sine));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One clock: the sample after the edge belongs to the phase before it.
  task automatic step();
    prev_phase = phase;
    @(posedge clk); #1;
    check(int'(sine) == tb_ref_pkg::ref_sine(int'(prev_phase)),
          $sformatf("phase %0d: sine %0d expected %0d", prev_phase, sine,
                    tb_ref_pkg::ref_sine(int'(prev_phase))));
    quarter_seen[prev_phase[7:6]]++;
    if (int'(sine) > maxv) maxv = int'(sine);
    if (int'(sine) < minv) minv = int'(sine);
  endtask

  initial begin
    maxv = 0; minv = 0;
    repeat (2) @(posedge clk); #1;
    check(sine == 16'sd0 && phase == 8'd0, "reset state");
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      step();
      first_period[i] = sine;
    end
    // The next period at increment 1 repeats the first one.
    for (int i = 0; i < 256; i++) begin
      @(posedge clk); #1;
      check(sine == first_period[i], $sformatf("period repeat, sample %0d", i));
    end
    check(maxv == 9997 && minv == -9997, $sformatf("peaks %0d/%0d", maxv, minv));
    phase_inc = 8'd32;
    repeat (64) step();
    phase_inc = 8'd5;
    repeat (300) step();
    for (int i = 0; i < 300; i++) begin
      phase_inc = 8'($urandom_range(0, 255));
      step();
    end
    for (int q = 0; q < 4; q++)
      check(quarter_seen[q] > 0, $sformatf("quarter %0d never produced", q + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
