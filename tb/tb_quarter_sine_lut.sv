// tb_quarter_sine_lut: checks all 64 entries of the quarter-wave table
// against a sine computed in the testbench, plus its end points (0 and the
// peak 9997 for amplitude 10000) and that it rises monotonically.
module tb_quarter_sine_lut;
  int checks = 0, failures = 0;
  logic        [5:0]  addr;
  logic signed [15:0] value;
  int prev;

  quarter_sine_lut dut (.addr(addr), .value(value));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    prev = -1;
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k);
      #1;
      check(int'(value) == tb_ref_pkg::rom1(k + 1, 10000),
            $sformatf("addr %0d: got %0d expected %0d", k, value, tb_ref_pkg::rom1(k + 1, 10000)));
      check(int'(value) > prev, $sformatf("addr %0d: table not rising (%0d after %0d)", k, value, prev));
      prev = int'(value);
    end
    addr = 6'd0;  #1; check(value == 16'sd0,    $sformatf("entry 0 = %0d", value));
    addr = 6'd63; #1; check(value == 16'sd9997, $sformatf("entry 63 = %0d", value));
    addr = 6'd32; #1; check(value == 16'sd7071, $sformatf("entry 32 = %0d", value));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
