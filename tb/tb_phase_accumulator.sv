// tb_phase_accumulator: checks reset to 0, accumulation by the increment on
// every rising edge, wrap-around modulo 256 (counted; at least one needed),
// one full 256-cycle period at increment 1, and random increments.
module tb_phase_accumulator;
  int checks = 0, failures = 0, wraps = 0;
  logic       clk = 0, rst_n = 0;
  logic [7:0] phase_inc = 0;
  logic [7:0] phase;
  int model;

  phase_accumulator dut (.clk(clk), .rst_n(rst_n), .phase_inc(phase_inc), .phase(phase));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Advance one clock with the given increment and compare with the model.
  task automatic step(input int inc);
    phase_inc = 8'(inc);
    @(posedge clk); #1;
    if (model + inc >= 256) wraps++;
    model = (model + inc) % 256;
    check(int'(phase) == model, $sformatf("phase %0d expected %0d (inc %0d)", phase, model, inc));
  endtask

  initial begin
    rst_n = 0; phase_inc = 8'd77;
    repeat (2) @(posedge clk); #1;
    check(phase == 8'd0, "reset value");
    rst_n = 1; model = 0;
    // One full period at increment 1 must return to 0 after 256 clocks.
    for (int i = 0; i < 256; i++) step(1);
    check(phase == 8'd0, "period of 256 clocks at increment 1");
    for (int i = 0; i < 64; i++) step(32);
    for (int i = 0; i < 500; i++) step(int'($urandom_range(0, 255)));
    check(wraps > 0, "accumulator never wrapped");
    // Reset in the middle.
    rst_n = 0; @(posedge clk); #1; check(phase == 8'd0, "mid-run reset");
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
