// tb_amplitude_halver: checks division by two (rounding towards minus
// infinity) for the extreme, small and random signed values.
module tb_amplitude_halver;
  int checks = 0, failures = 0;
  logic signed [15:0] din, dout;
  int v, e;

  amplitude_halver dut (.din(din), .dout(dout));

  task automatic try(input int x);
    din = 16'(x);
    #1;
    e = (x >= 0) ? x / 2 : -((-x + 1) / 2);   // floor(x / 2)
    checks++;
    if (int'(dout) != e) begin
      failures++;
      $display("FAIL: %0d / 2 gave %0d expected %0d", x, dout, e);
    end
  endtask

  initial begin
    try(0); try(1); try(-1); try(2); try(-2); try(-7); try(7);
    try(10000); try(-10000); try(9997); try(-9997); try(32767); try(-32768);
    for (int i = 0; i < 1000; i++) begin
      v = int'($urandom_range(0, 65535)) - 32768;
      try(v);
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
