// tb_alcapone: self-checking test of one control chip driving one hybrid.
// Short supply timers (STARTUP_CYCLES=50, OC_CYCLES=10). The hybrid model holds
// 6 chips of 128 channels with 2 cycles of token overhead each. Steps: JTAG
// chain without the hybrid; supply switched on over JTAG; hybrid joins the
// chain; readout with the programmed length; a bypassed front-end chip makes
// the token come back early (token error, error line, status flag, masking,
// clear); reprogrammed length reads out cleanly; fast clear; an upset register
// raises the error line; a sustained over-current switches the hybrid off,
// disables the drivers, takes it out of the chain and raises the error line;
// off/on restarts it; the error input passes to the error output.
`timescale 1ns/1ps
module tb_alcapone;
  import endcap_pkg::*;
  localparam int NFE = 6, CH = 128, OVH = 2, SU = 50, OC = 10;
  int checks = 0, failures = 0;
  jtag_drv_if j();

  logic clk = 0, rst_n = 0, token_in = 0, fast_clear_in = 0, error_in = 0, overcurrent = 0;
  logic bus_token, bus_fast_clear, error_out;
  logic hyb_drv_en, hyb_token, hyb_fast_clear, hyb_reset, hyb_tck, hyb_tms, hyb_tdi, hyb_tdo, hyb_ret_token;
  logic sel_readout, sup_out_en, sup_ilim_en;
  logic [DAC_W-1:0] dac_code;
  logic [ADC_W-1:0] adc_temp = 10'h155, adc_cur = 10'h2AA;
  logic [NFE-1:0] fe_bypass = '0;
  real analog;

  alcapone #(.STARTUP_CYCLES(SU), .OC_CYCLES(OC)) dut (
    .clk, .rst_n, .tck(j.tck), .trst_n(j.trst_n), .tms(j.tms), .tdi(j.tdi), .tdo(j.tdo),
    .token_in, .fast_clear_in, .bus_token, .bus_fast_clear, .error_in, .error_out,
    .hyb_drv_en, .hyb_token, .hyb_fast_clear, .hyb_reset, .hyb_tck, .hyb_tms, .hyb_tdi,
    .hyb_tdo, .hyb_ret_token, .sel_readout, .overcurrent, .sup_out_en, .sup_ilim_en,
    .dac_code, .adc_temp, .adc_cur);

  hal25_hybrid_model #(.NCHIP(NFE), .CH(CH), .OVH(OVH)) u_hyb (
    .clk, .drv_en(hyb_drv_en), .token(hyb_token), .fast_clear(hyb_fast_clear),
    .bypass(fe_bypass), .ret_token(hyb_ret_token), .analog, .tck(hyb_tck), .tms(hyb_tms), .tdi(hyb_tdi),
    .tdo(hyb_tdo));

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Scans with the hybrid's NFE bits after the chip when it is in the chain.
  bit hyb_in = 0;
  task automatic scan(input bit ir, input logic [63:0] v, input int len, output logic [63:0] rd);
    logic [1023:0] din, dout;
    int h;
    h = hyb_in ? NFE : 0;
    din = 1024'(v) << h;
    j.shift(ir, din, len + h, dout);
    rd = 64'(dout >> h);
  endtask
  task automatic wr(input ir_e ins, input logic [63:0] v, input int len, output logic [63:0] rd);
    logic [63:0] x;
    scan(1'b1, 64'(ins), IR_W, x);
    scan(1'b0, v, len, rd);
  endtask
  task automatic read_status(output status_t s);
    logic [63:0] rd;
    wr(IR_STATUS, 64'h0, STATUS_W, rd);
    s = status_t'(rd[STATUS_W-1:0]);
  endtask
  // total DR length in bypass: 1 + NFE when the hybrid is in the chain
  task automatic bypass_len(output int n);
    logic [1023:0] dout;
    logic [63:0] x;
    scan(1'b1, 64'(IR_BYPASS), IR_W, x);
    j.shift(1'b0, 1024'(1), 40, dout);
    n = -1;
    for (int i = 39; i >= 0; i--) if (dout[i]) n = i;
  endtask

  task automatic readout(output int n_err, output int n_sel, output bit returned);
    n_err = 0; n_sel = 0; returned = 0;
    @(negedge clk); token_in = 1; @(negedge clk); token_in = 0;
    repeat (NFE * (CH + OVH) + 20) begin
      @(posedge clk);
      if (dut.ro_err) n_err++;
      if (dut.ro_done) returned = 1;
      if (sel_readout) n_sel++;
    end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rd;
    status_t s;
    int n, ne, ns;
    bit ret;
    #220 rst_n = 1;
    j.reset();
    check(!sup_out_en && !hyb_drv_en && !error_out, "after reset: supply off, quiet");
    bypass_len(n);
    check(n == 1, $sformatf("chain without hybrid: bypass length %0d", n));
    // ADC readback and DAC setting
    wr(IR_ADC, 0, 2 * ADC_W, rd);
    check(rd[2*ADC_W-1:0] == {adc_cur, adc_temp}, "ADC readback");
    wr(IR_DAC, 64'hB7, DAC_W, rd);
    check(dac_code == 8'hB7, "DAC code set");
    // program the readout and switch the hybrid on
    wr(IR_ROLEN, 64'(NFE * (CH + OVH)), RO_W, rd);
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 0, mask: '0, ro_en: 1, supply_on: 1}), CTRL_W, rd);
    repeat (4) @(negedge clk);
    check(sup_out_en && hyb_reset && !sup_ilim_en, "start-up: hybrid powered and reset");
    repeat (SU + 4) @(negedge clk);
    check(sup_ilim_en && !hyb_reset && hyb_drv_en, "running: current limit on");
    j.idle(2);
    hyb_in = 1;
    read_status(s);
    check(s.supply_ok && s.hyb_in_chain && s.err == '0, "status: supply ok, hybrid in chain");
    bypass_len(n);
    check(n == 1 + NFE, $sformatf("chain with hybrid: bypass length %0d", n));
    // clean readout
    readout(ne, ns, ret);
    check(ret && ne == 0 && !error_out, "full readout, token back on time");
    check(ns == NFE * (CH + OVH) + 1, $sformatf("select window %0d cycles", ns));
    // bypassed front-end chip: token early
    fe_bypass = 6'b000100;
    readout(ne, ns, ret);
    check(ne == 1 && !ret, "bypassed chip: token error");
    check(error_out, "error line raised by token error");
    read_status(s);
    check(s.err[ERR_TOKEN], "status shows token error");
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 0, mask: 3'b010, ro_en: 1, supply_on: 1}), CTRL_W, rd);
    repeat (4) @(negedge clk);
    check(!error_out, "token error masked");
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 1, mask: 3'b000, ro_en: 1, supply_on: 1}), CTRL_W, rd);
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 0, mask: 3'b000, ro_en: 1, supply_on: 1}), CTRL_W, rd);
    repeat (4) @(negedge clk);
    read_status(s);
    check(!s.err[ERR_TOKEN] && !error_out, "token error cleared");
    // reprogrammed length for 5 active chips
    wr(IR_ROLEN, 64'(5 * (CH + OVH) + 1), RO_W, rd);
    readout(ne, ns, ret);
    check(ret && ne == 0 && !error_out, "shorter readout after reprogramming");
    fe_bypass = '0;
    wr(IR_ROLEN, 64'(NFE * (CH + OVH)), RO_W, rd);
    // fast clear during readout
    @(negedge clk); token_in = 1; @(negedge clk); token_in = 0;
    repeat (200) @(negedge clk);
    check(sel_readout, "readout running");
    fast_clear_in = 1; @(negedge clk); fast_clear_in = 0;
    check(!sel_readout && !dut.ro_busy, "fast clear ends the readout");
    repeat (NFE * (CH + OVH)) @(negedge clk);
    check(!error_out, "no error after fast clear");
    readout(ne, ns, ret);
    check(ret && ne == 0, "readout after fast clear");
    // upset in a configuration register
    dut.u_jtag.u_dac.q[0] = ~dut.u_jtag.u_dac.q[0];
    repeat (4) @(negedge clk);
    check(error_out, "register upset raises the error line");
    wr(IR_DAC, 64'hB7, DAC_W, rd);
    repeat (4) @(negedge clk);
    check(!error_out, "rewrite clears the upset");
    // latch-up: sustained over-current
    overcurrent = 1;
    repeat (OC + 3) @(negedge clk);
    overcurrent = 0;
    check(!sup_out_en && !hyb_drv_en && error_out, "latch-up: supply off, drivers off, error");
    j.idle(2);
    hyb_in = 0;
    bypass_len(n);
    check(n == 1, "latch-up: hybrid bypassed, chain intact");
    read_status(s);
    check(s.err[ERR_SUPPLY] && !s.supply_ok && !s.hyb_in_chain, "status: supply error");
    readout(ne, ns, ret);
    check(ns == 0 && ne == 0, "no readout while the hybrid is off");
    // off and on again
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 0, mask: '0, ro_en: 1, supply_on: 0}), CTRL_W, rd);
    wr(IR_CTRL, 64'(ctrl_t'{clr_err: 0, mask: '0, ro_en: 1, supply_on: 1}), CTRL_W, rd);
    repeat (SU + 8) @(negedge clk);
    check(!error_out && sup_out_en && sup_ilim_en, "restarted after off/on");
    j.idle(2);
    hyb_in = 1;
    bypass_len(n);
    check(n == 1 + NFE, $sformatf("hybrid restored in the chain: %0d", n));
    // error input passes through
    error_in = 1; #1;
    check(error_out, "error_in reaches error_out");
    error_in = 0;
    check(bus_token == token_in && bus_fast_clear == fast_clear_in, "bus buffers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
