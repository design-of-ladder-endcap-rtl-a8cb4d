// tb_supply_ctrl: self-checking test of the hybrid supply control.
// Uses short timers (STARTUP_CYCLES=50, OC_CYCLES=10). Checks the start-up
// length with the current limit off and power-on reset asserted, that an
// over-current during start-up is ignored, that a short over-current does not
// trip, that a sustained one trips after exactly OC_CYCLES cycles and latches
// the error with the output off, and that off-then-on clears the latch.
`timescale 1ns/1ps
module tb_supply_ctrl;
  localparam int SU = 50, OC = 10;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, supply_on = 0, overcurrent = 0;
  logic out_en, ilim_en, po_reset, ok, err;

  supply_ctrl #(.STARTUP_CYCLES(SU), .OC_CYCLES(OC)) dut (.clk, .rst_n, .supply_on,
    .overcurrent, .out_en, .ilim_en, .po_reset, .ok, .err);

  always #50 clk = ~clk;

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #220 rst_n = 1;
    @(negedge clk);
    check(!out_en && !ok && !err, "off after reset");
    supply_on = 1;
    @(negedge clk);
    check(out_en && po_reset && !ilim_en && !ok, "start-up: output on, limit off, reset");
    // count start-up cycles, with an over-current in the middle that must be ignored
    n = 1;
    while (!ok && n < 10 * SU) begin
      overcurrent = (n > 5 && n < 5 + 2 * OC);
      @(negedge clk);
      n++;
    end
    overcurrent = 0;
    check(n == SU + 1, $sformatf("start-up took %0d cycles", n - 1));
    check(ok && ilim_en && !po_reset && !err, "running after start-up");
    // short over-current: no trip
    overcurrent = 1; repeat (OC - 1) @(negedge clk); overcurrent = 0;
    @(negedge clk);
    check(ok && out_en && !err, "short over-current does not trip");
    // sustained over-current: trips after OC cycles
    overcurrent = 1;
    n = 0;
    while (out_en && n < 10 * OC) begin @(negedge clk); n++; end
    check(n == OC, $sformatf("over-current trip after %0d cycles", n));
    check(err && !ok && !out_en, "error latched, output off");
    overcurrent = 0;
    repeat (20) @(negedge clk);
    check(err && !out_en, "stays off while requested on");
    supply_on = 0; @(negedge clk);
    check(err && !out_en, "error kept while off");
    supply_on = 1; @(negedge clk);
    check(!err && out_en && po_reset, "switch-on clears the latch and restarts");
    repeat (SU + 2) @(negedge clk);
    check(ok, "running again");
    supply_on = 0; @(negedge clk);
    check(!out_en && !ok && !err, "switched off by request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
