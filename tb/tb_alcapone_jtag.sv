// tb_alcapone_jtag: self-checking test of the chip's JTAG logic and registers.
// Over the JTAG pins: bypass length, reset values, write and read-back of the
// control, DAC, readout delay and length registers, capture of the status and
// ADC inputs, SAMPLE and EXTEST through the boundary scan register, and the
// parity check (a bit flipped inside a register is reported; rewriting clears
// it).
`timescale 1ns/1ps
module tb_alcapone_jtag;
  import endcap_pkg::*;
  int checks = 0, failures = 0;
  jtag_drv_if j();

  ctrl_t              ctrl;
  logic [DAC_W-1:0]   dac_code;
  logic [RO_W-1:0]    ro_delay, ro_len;
  logic               parity_err;
  status_t            status;
  logic [ADC_W-1:0]   adc_temp, adc_cur;
  logic [BSR_IN-1:0]  bs_pin_in;
  logic [BSR_OUT-1:0] bs_core_out, bs_pin_out;

  alcapone_jtag dut (.tck(j.tck), .trst_n(j.trst_n), .tms(j.tms), .tdi(j.tdi), .tdo(j.tdo),
    .ctrl, .dac_code, .ro_delay, .ro_len, .parity_err, .status, .adc_temp, .adc_cur,
    .bs_pin_in, .bs_core_out, .bs_pin_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // write a register and return what was in it
  task automatic wr(input ir_e ins, input logic [63:0] v, input int len, output logic [63:0] old);
    logic [1023:0] d;
    j.shift_ir(1024'(ins), IR_W, d);
    j.shift_dr(1024'(v), len, d);
    old = d[63:0];
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] d;
    logic [63:0] old;
    status = '0; adc_temp = '0; adc_cur = '0; bs_pin_in = '0; bs_core_out = '0;
    j.reset();
    check(ctrl == '0 && dac_code == 8'h80 && ro_delay == 0 && ro_len == 768, "reset values");
    check(!parity_err, "no parity error after reset");
    // bypass: one-bit delay
    j.shift_ir(1024'(IR_BYPASS), IR_W, d);
    j.shift_dr(1024'(16'hA5C3), 17, d);
    check(d[16:1] == 16'hA5C3 && d[0] == 1'b0, "bypass is one bit, captures 0");
    // an unused code also selects bypass
    j.shift_ir(1024'(4'hC), IR_W, d);
    j.shift_dr(1024'(8'h5A), 9, d);
    check(d[8:1] == 8'h5A, "unused instruction acts as bypass");
    // writable registers
    for (int k = 0; k < 5; k++) begin
      logic [CTRL_W-1:0] c; logic [DAC_W-1:0] dv; logic [RO_W-1:0] dl, ln;
      logic [CTRL_W-1:0] c0; logic [DAC_W-1:0] dv0; logic [RO_W-1:0] dl0, ln0;
      c0 = ctrl; dv0 = dac_code; dl0 = ro_delay; ln0 = ro_len;
      c = CTRL_W'($urandom); dv = DAC_W'($urandom); dl = RO_W'($urandom); ln = RO_W'($urandom);
      wr(IR_CTRL, 64'(c), CTRL_W, old);    check(old[CTRL_W-1:0] == c0, "CTRL read-back");
      wr(IR_DAC, 64'(dv), DAC_W, old);     check(old[DAC_W-1:0] == dv0, "DAC read-back");
      wr(IR_RODELAY, 64'(dl), RO_W, old);  check(old[RO_W-1:0] == dl0, "RODELAY read-back");
      wr(IR_ROLEN, 64'(ln), RO_W, old);    check(old[RO_W-1:0] == ln0, "ROLEN read-back");
      check(ctrl == ctrl_t'(c) && dac_code == dv && ro_delay == dl && ro_len == ln, "registers written");
      check(!parity_err, "no parity error after writes");
    end
    // read-only registers
    status = STATUS_W'($urandom);
    adc_temp = ADC_W'($urandom); adc_cur = ADC_W'($urandom);
    wr(IR_STATUS, 64'h0, STATUS_W, old);
    check(old[STATUS_W-1:0] == status, "STATUS capture");
    wr(IR_ADC, 64'h0, 2 * ADC_W, old);
    check(old[2*ADC_W-1:0] == {adc_cur, adc_temp}, "ADC capture");
    // single event upset in the DAC register
    dut.u_dac.q[3] = ~dut.u_dac.q[3];
    #1;
    check(parity_err, "upset in DAC register detected");
    wr(IR_DAC, 64'h42, DAC_W, old);
    check(!parity_err && dac_code == 8'h42, "rewrite clears parity error");
    dut.u_len.par = ~dut.u_len.par;
    #1;
    check(parity_err, "upset in ROLEN parity bit detected");
    wr(IR_ROLEN, 64'(ro_len), RO_W, old);
    check(!parity_err, "rewrite clears parity error");
    // boundary scan: SAMPLE then EXTEST
    bs_pin_in = 4'b1010; bs_core_out = 3'b011;
    wr(IR_SAMPLE, 64'b101_0000, BSR_W_TB, old);
    check(old[BSR_W_TB-1:0] == {3'b011, 4'b1010}, "SAMPLE captures pins");
    check(bs_pin_out == 3'b011, "SAMPLE leaves outputs to the core");
    wr(IR_EXTEST, 64'b110_0000, BSR_W_TB, old);
    check(bs_pin_out == 3'b110, "EXTEST drives the output pins");
    j.shift_ir(1024'(IR_BYPASS), IR_W, d);
    check(bs_pin_out == bs_core_out, "outputs back to the core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int BSR_W_TB = BSR_IN + BSR_OUT;
endmodule
