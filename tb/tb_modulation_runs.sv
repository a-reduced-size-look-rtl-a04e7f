// tb_modulation_runs: BASK and OOK modulation runs with a fast carrier.
//
// The modulator is built with PHASE_INC = 32 (eight samples per carrier
// period) and MSG_BIT = 5 (32 clocks, four carrier periods, per message
// bit), a setting close to the short simulation traces one would plot to
// look at the modulated waves. Over 16 message bits it checks every sample
// of BASK and OOK against the reference model, and checks the envelopes:
// BASK peaks at the full carrier amplitude (9997) during message 1 and at
// half of it (4999 in magnitude, the shift rounds -9997/2 down) during message 0; OOK peaks at 9997 during message 1
// and is exactly zero during message 0.
module tb_modulation_runs;
  localparam int INC = 32;
  localparam int MB  = 5;
  localparam int CYCLES = 16 << MB;

  int checks = 0, failures = 0;
  int peak_bask1 = 0, peak_bask0 = 0, peak_ook1 = 0, peak_ook0 = 0;
  logic clk = 0, rst_n = 0;
  dds_pkg::sample_t carrier, bask, ook;
  logic message;
  logic [7:0] pmod_je;
  int t, exp_c, exp_b, exp_o;
  bit exp_m;

  ask_ook_modulator_top #(.PHASE_INC(INC), .MSG_BIT(MB)) dut (
    .clk(clk), .rst_n(rst_n), .carrier(carrier), .message(message),
    .bask(bask), .ook(ook), .pmod_je(pmod_je)
  );

  always #5 clk = ~clk;

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int n = 1; n <= CYCLES; n++) begin
      @(posedge clk); #1;
      t     = n - 1;
      exp_c = tb_ref_pkg::ref_sine((t * INC) % 256);
      exp_m = 1'((t >> MB) & 1);
      exp_b = exp_m ? exp_c : ((exp_c >= 0) ? exp_c / 2 : -((-exp_c + 1) / 2));
      exp_o = exp_m ? exp_c : 0;
      check(int'(carrier) == exp_c && message == exp_m && int'(bask) == exp_b && int'(ook) == exp_o && pmod_je == 8'(exp_b >>> 8),
            $sformatf("clock %0d: msg %0b bask %0d ook %0d, expected %0b %0d %0d",
                      n, message, bask, ook, exp_m, exp_b, exp_o));
      if (message) begin
        if (iabs(int'(bask)) > peak_bask1) peak_bask1 = iabs(int'(bask));
        if (iabs(int'(ook))  > peak_ook1)  peak_ook1  = iabs(int'(ook));
      end else begin
        if (iabs(int'(bask)) > peak_bask0) peak_bask0 = iabs(int'(bask));
        if (iabs(int'(ook))  > peak_ook0)  peak_ook0  = iabs(int'(ook));
      end
    end
    $display("BASK peaks %0d (message 1) / %0d (message 0); OOK peaks %0d / %0d",
             peak_bask1, peak_bask0, peak_ook1, peak_ook0);
    check(peak_bask1 == 9997, "BASK full-amplitude peak");
    check(peak_bask0 == 4999, "BASK half-amplitude peak");  // -9997 >>> 1 = -4999
    check(peak_ook1 == 9997,  "OOK on peak");
    check(peak_ook0 == 0,     "OOK off level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
