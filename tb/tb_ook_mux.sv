// tb_ook_mux: checks that the output is the carrier for message bit 1 and
// exactly zero for message bit 0, over random samples.
module tb_ook_mux;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic signed [15:0] s1, ook;
  logic sel;

  ook_mux dut (.s1(s1), .sel(sel), .ook(ook));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      s1  = 16'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (sel) ones++; else zeros++;
      if (ook !== (sel ? s1 : 16'sd0)) begin
        failures++;
        $display("FAIL: sel %0b s1 %0d gave %0d", sel, s1, ook);
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL: a selection never occurred"); end
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
