// tb_bask_mux: checks that the output is s1 for message bit 1 and s0 for
// message bit 0, over random samples, and that both selections occur.
module tb_bask_mux;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic signed [15:0] s0, s1, bask;
  logic sel;

  bask_mux dut (.s0(s0), .s1(s1), .sel(sel), .bask(bask));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      s0  = 16'($urandom);
      s1  = 16'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (sel) ones++; else zeros++;
      if (bask !== (sel ? s1 : s0)) begin
        failures++;
        $display("FAIL: sel %0b s0 %0d s1 %0d gave %0d", sel, s0, s1, bask);
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
