// tb_ask_ook_modulator_top: end-to-end test of the BASK/OOK modulator at its
// default parameters (phase increment 1, message bit 10).
//
// After reset it runs 6144 clocks (24 carrier periods, six message bits) and
// checks on every clock: the carrier against the reference wave built from
// the 64-sample quarter; the message against the counter model; BASK equal
// to the carrier for message 1 and to the carrier halved for message 0; OOK
// equal to the carrier or zero; pmod_je equal to the eight BASK MSBs. The
// sample after edge n belongs to phase n-1 and counter value n-1.
// It counts the mechanisms the design has (each quarter of the wave, BASK at
// full and half amplitude, OOK on and off, message rising and falling) and
// fails for any that never happened.
module tb_ask_ook_modulator_top;
  localparam int CYCLES = 6 * 1024;

  int checks = 0, failures = 0;
  int n_quarter [4];
  int n_bask_full = 0, n_bask_half = 0, n_ook_on = 0, n_ook_off = 0;
  int n_msg_rise = 0, n_msg_fall = 0;

  logic clk = 0, rst_n = 0;
  dds_pkg::sample_t carrier, bask, ook;
  logic message, prev_msg;
  logic [7:0] pmod_je;
  int exp_c, exp_b, exp_o, t;
  bit exp_m;

  ask_ook_modulator_top dut (
    .clk(clk), .rst_n(rst_n), .carrier(carrier), .message(message),
    .bask(bask), .ook(ook), .pmod_je(pmod_je)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    check(carrier == 0 && bask == 0 && ook == 0 && message == 0, "reset state");
    rst_n = 1;
    prev_msg = 1'b0;
    for (int n = 1; n <= CYCLES; n++) begin
      @(posedge clk); #1;
      t     = n - 1;
      exp_c = tb_ref_pkg::ref_sine(t % 256);
      exp_m = 1'((t >> 10) & 1);
      exp_b = exp_m ? exp_c : ((exp_c >= 0) ? exp_c / 2 : -((-exp_c + 1) / 2));  // floor(c/2)
      exp_o = exp_m ? exp_c : 0;
      check(int'(carrier) == exp_c, $sformatf("clock %0d: carrier %0d expected %0d", n, carrier, exp_c));
      check(message == exp_m,       $sformatf("clock %0d: message %0b expected %0b", n, message, exp_m));
      check(int'(bask) == exp_b,    $sformatf("clock %0d: bask %0d expected %0d", n, bask, exp_b));
      check(int'(ook) == exp_o,     $sformatf("clock %0d: ook %0d expected %0d", n, ook, exp_o));
      check(pmod_je == 8'(exp_b >>> 8), $sformatf("clock %0d: pmod %02h", n, pmod_je));
      n_quarter[(t % 256) / 64]++;
      if (exp_c != 0) begin
        if (message) begin n_bask_full++; n_ook_on++; end
        else         begin n_bask_half++; n_ook_off++; end
      end
      if (message && !prev_msg) n_msg_rise++;
      if (!message && prev_msg) n_msg_fall++;
      prev_msg = message;
    end
    $display("quarters %0d %0d %0d %0d, bask full %0d half %0d, ook on %0d off %0d, message rise %0d fall %0d",
             n_quarter[0], n_quarter[1], n_quarter[2], n_quarter[3], n_bask_full, n_bask_half,
             n_ook_on, n_ook_off, n_msg_rise, n_msg_fall);
    for (int q = 0; q < 4; q++) check(n_quarter[q] > 0, $sformatf("quarter %0d never produced", q + 1));
    check(n_bask_full > 0, "BASK full amplitude never produced");
    check(n_bask_half > 0, "BASK half amplitude never produced");
    check(n_ook_on > 0,    "OOK carrier never sent");
    check(n_ook_off > 0,   "OOK silence never produced");
    check(n_msg_rise == 3 && n_msg_fall == 2, "message edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
