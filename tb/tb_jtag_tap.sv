// tb_jtag_tap: self-checking test of the TAP controller.
// Checks the instruction reset value, the Capture-IR pattern 0001, instruction
// update, the number of Capture/Shift/Update-DR strobes in a DR scan, and the
// return to Test-Logic-Reset after five TMS=1 clocks.
`timescale 1ns/1ps
module tb_jtag_tap;
  import endcap_pkg::*;
  int checks = 0, failures = 0;
  jtag_drv_if j();

  ir_e  ir;
  logic ir_tdo, shift_ir, capture_dr, shift_dr, update_dr, tlr;
  jtag_tap dut (.tck(j.tck), .trst_n(j.trst_n), .tms(j.tms), .tdi(j.tdi), .ir, .ir_tdo,
                .shift_ir, .capture_dr, .shift_dr, .update_dr, .test_logic_reset(tlr));

  // TDO retimed on the falling edge, as the chip does
  always @(negedge j.tck) j.tdo <= shift_ir ? ir_tdo : 1'b0;

  int n_cap, n_sh, n_upd;
  always @(posedge j.tck) begin
    if (capture_dr) n_cap++;
    if (shift_dr)   n_sh++;
    if (update_dr)  n_upd++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] dout;
    logic o;
    j.reset();
    check(ir == IR_BYPASS, "IR resets to BYPASS");
    j.shift_ir(1024'(IR_DAC), IR_W, dout);
    check(dout[IR_W-1:0] == 4'b0001, "Capture-IR pattern");
    check(ir == IR_DAC, "IR updated to DAC");
    j.shift_ir(1024'(IR_STATUS), IR_W, dout);
    check(dout[IR_W-1:0] == 4'b0001, "Capture-IR pattern again");
    check(ir == IR_STATUS, "IR updated to STATUS");
    // random instructions
    for (int k = 0; k < 10; k++) begin
      logic [IR_W-1:0] v;
      v = IR_W'($urandom);
      j.shift_ir(1024'(v), IR_W, dout);
      check(ir == ir_e'(v), "random instruction");
    end
    n_cap = 0; n_sh = 0; n_upd = 0;
    j.shift_dr('0, 7, dout);
    check(n_cap == 1 && n_sh == 7 && n_upd == 1, "DR scan strobes 1/7/1");
    check(!tlr, "not in Test-Logic-Reset");
    // Walk into Shift-DR and escape with five TMS=1
    j.tick(1'b1, 1'b0, o); j.tick(1'b0, 1'b0, o); j.tick(1'b0, 1'b0, o);
    check(shift_dr, "in Shift-DR");
    repeat (5) j.tick(1'b1, 1'b0, o);
    check(tlr, "five TMS=1 reach Test-Logic-Reset");
    check(ir == IR_BYPASS, "Test-Logic-Reset selects BYPASS");
    // Pause-IR path: shift 2 bits, pause, shift 2 more
    j.tick(1'b0, 1'b0, o);           // RTI
    j.tick(1'b1, 1'b0, o); j.tick(1'b1, 1'b0, o); j.tick(1'b0, 1'b0, o); j.tick(1'b0, 1'b0, o); // Shift-IR
    j.tick(1'b0, 1'b0, o);           // bit0 = 0 (code 0110 = RODELAY)
    j.tick(1'b1, 1'b1, o);           // bit1 = 1 -> Exit1
    j.tick(1'b0, 1'b0, o);           // Pause
    j.tick(1'b1, 1'b0, o);           // Exit2
    j.tick(1'b0, 1'b0, o);           // Shift
    j.tick(1'b0, 1'b1, o);           // bit2 = 1
    j.tick(1'b1, 1'b0, o);           // bit3 = 0 -> Exit1
    j.tick(1'b1, 1'b0, o);           // Update
    j.tick(1'b0, 1'b0, o);           // RTI
    check(ir == IR_RODELAY, "IR scan through Pause-IR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
