// tb_message_counter: with the default MSG_BIT = 10, checks that the message
// is 0 after reset, first rises after 1024 clocks and then toggles every
// 1024 clocks; counts the toggles.
module tb_message_counter;
  int checks = 0, failures = 0, toggles = 0;
  logic clk = 0, rst_n = 0, message;
  logic prev;

  message_counter dut (.clk(clk), .rst_n(rst_n), .message(message));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1;
    checks++; if (message !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    prev = message;
    for (int n = 1; n <= 6 * 1024; n++) begin
      @(posedge clk); #1;
      checks++;
      // After n edges the count is n, so the message is bit 10 of n.
      if (message !== 1'((n >> 10) & 1)) begin
        failures++;
        $display("FAIL: after %0d clocks message %0b", n, message);
      end
      if (message != prev) toggles++;
      prev = message;
    end
    checks++;
    if (toggles != 6) begin failures++; $display("FAIL: %0d toggles, expected 6", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
