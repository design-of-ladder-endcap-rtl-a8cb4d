// tb_endcap: end-to-end test of a complete EndCap at full size.
// All parameters at their defaults: 31 control chips, 28 hybrids of 6 HAL25
// chips x 128 channels (hybrid model, 2 cycles of token overhead per chip),
// 250 us start-up and 25 us over-current timers at 10 MHz.
// Everything is done over the one JTAG chain, the token and fast clear lines,
// the error line and the 14 analogue outputs:
//   1. chain without hybrids (31 bypass bits, IR capture pattern), ADC readback
//   2. program readout lengths and token delays (P: delay 0, N: after P), switch
//      on all supplies, wait for start-up, check the hybrids joined the chain
//   3. a readout: every module shows its P-side samples (positive, gain 2.6)
//      then its N-side samples inverted, no error
//   4. a bypassed front-end chip: token error on the error line, located via
//      STATUS, masked, cleared, length reprogrammed
//   5. fast clear in mid-readout, then a clean readout
//   6. latch-up on one hybrid: supply off, hybrid out of the chain, error line;
//      the other modules still read out; off/on restores the chain
//   7. a register upset (parity) on the error line, cleared by rewriting
//   8. a boundary scan interconnection test between two chips (EXTEST)
//   9. the ALABUF buffers disabled during a readout
// Each of these mechanisms is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_endcap;
  import endcap_pkg::*;
  localparam int NMOD = MODULES, NCHIP = 3 + 2 * MODULES;
  localparam int NFE = FE_CHIPS_PER_HYBRID, CH = FE_CHANNELS, OVH = 2;
  localparam int LEN = NFE * (CH + OVH);                 // 780 cycles per hybrid
  localparam int SU = CLK_MHZ * STARTUP_US, OC = CLK_MHZ * OVERCURRENT_US;
  localparam int PB = 1, NB = 2 + NMOD;
  int checks = 0, failures = 0;
  jtag_drv_if j();

  logic clk = 0, rst_n = 0, token = 0, fast_clear = 0, abuf_disable = 0;
  logic error;
  real  analog_out [NMOD];
  logic [1:0][NMOD-1:0] hyb_drv_en, hyb_token, hyb_fast_clear, hyb_reset, hyb_tck, hyb_tms, hyb_tdi;
  logic [1:0][NMOD-1:0] hyb_tdo, hyb_ret_token;
  real  hyb_analog_p [NMOD], hyb_analog_n [NMOD];
  logic [NCHIP-1:0] overcurrent = '0, sup_out_en, sup_ilim_en;
  logic [NCHIP-1:0][DAC_W-1:0] dac_code;
  logic [NCHIP-1:0][ADC_W-1:0] adc_temp, adc_cur;
  logic [1:0][NMOD-1:0][NFE-1:0] fe_bypass = '0;

  endcap dut (.clk, .rst_n, .tck(j.tck), .trst_n(j.trst_n), .tms(j.tms), .tdi(j.tdi), .tdo(j.tdo),
    .token, .fast_clear, .error, .abuf_disable, .analog_out,
    .hyb_drv_en, .hyb_token, .hyb_fast_clear, .hyb_reset, .hyb_tck, .hyb_tms, .hyb_tdi,
    .hyb_tdo, .hyb_ret_token, .hyb_analog_p, .hyb_analog_n,
    .overcurrent, .sup_out_en, .sup_ilim_en, .dac_code, .adc_temp, .adc_cur);

  for (genvar s = 0; s < 2; s++) begin : g_side
    for (genvar m = 0; m < NMOD; m++) begin : g_mod
      real a;
      hal25_hybrid_model #(.NCHIP(NFE), .CH(CH), .OVH(OVH)) u_hyb (
        .clk, .drv_en(hyb_drv_en[s][m]), .token(hyb_token[s][m]),
        .fast_clear(hyb_fast_clear[s][m]), .bypass(fe_bypass[s][m]),
        .ret_token(hyb_ret_token[s][m]), .analog(a), .tck(hyb_tck[s][m]),
        .tms(hyb_tms[s][m]), .tdi(hyb_tdi[s][m]), .tdo(hyb_tdo[s][m]));
      if (s == 0) begin : g_p
        assign hyb_analog_p[m] = a;
      end else begin : g_n
        assign hyb_analog_n[m] = a;
      end
    end
  end

  for (genvar i = 0; i < NCHIP; i++) begin : g_adc
    assign adc_temp[i] = ADC_W'(100 + i);
    assign adc_cur[i]  = ADC_W'(500 + 3 * i);
  end

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_readout_ok = 0, n_token_err = 0, n_fe_bypass = 0, n_mask = 0, n_fast_clear = 0;
  int n_latchup = 0, n_restore = 0, n_parity = 0, n_bscan = 0, n_abuf_dis = 0;

  // ---- chain access -------------------------------------------------------
  function automatic int chip_side(input int i);   // -1 for control chips
    if (i >= PB + 1 && i < NB) return 0;
    if (i > NB) return 1;
    return -1;
  endfunction
  function automatic int chip_mod(input int i);
    return (i > NB) ? i - NB - 1 : i - PB - 1;
  endfunction
  bit in_chain [NCHIP];          // expected: the chip's hybrid is in the chain

  // The same instruction in every chip; W-bit register values per chip.
  task automatic chain(input bit ir, input int w, input logic [63:0] v [NCHIP],
                       output logic [63:0] r [NCHIP]);
    logic [1023:0] din, dout;
    int pos = 0, p [NCHIP];
    din = '0;
    for (int i = NCHIP - 1; i >= 0; i--) begin
      if (in_chain[i] && chip_side(i) >= 0) pos += NFE;
      p[i] = pos;
      din |= 1024'(v[i] & ((64'(1) << w) - 1)) << pos;
      pos += w;
    end
    j.shift(ir, din, pos, dout);
    for (int i = 0; i < NCHIP; i++) r[i] = 64'(dout >> p[i]) & ((64'(1) << w) - 1);
  endtask
  task automatic all_ir(input ir_e ins);
    logic [63:0] v [NCHIP], r [NCHIP];
    foreach (v[i]) v[i] = 64'(ins);
    chain(1'b1, IR_W, v, r);
  endtask
  task automatic all_wr(input ir_e ins, input int w, input logic [63:0] v [NCHIP],
                        output logic [63:0] r [NCHIP]);
    all_ir(ins);
    chain(1'b0, w, v, r);
  endtask
  task automatic all_status(output status_t s [NCHIP]);
    logic [63:0] v [NCHIP], r [NCHIP];
    foreach (v[i]) v[i] = 0;
    all_wr(IR_STATUS, STATUS_W, v, r);
    foreach (s[i]) s[i] = status_t'(r[i][STATUS_W-1:0]);
  endtask
  logic [63:0] ctrl_v [NCHIP];
  task automatic write_ctrl();
    logic [63:0] r [NCHIP];
    all_wr(IR_CTRL, CTRL_W, ctrl_v, r);
  endtask
  // length of the bypass chain
  task automatic bypass_len(output int n);
    logic [1023:0] dout;
    all_ir(IR_BYPASS);
    j.shift(1'b0, 1024'(1), 400, dout);
    n = -1;
    for (int i = 399; i >= 0; i--) if (dout[i]) n = i;
  endtask

  // ---- one readout, watching the analogue outputs --------------------------
  int pos_cyc [NMOD], neg_cyc [NMOD], n_err_cyc;
  bit bad_gain;
  task automatic readout(input int stop_after);
    foreach (pos_cyc[m]) begin pos_cyc[m] = 0; neg_cyc[m] = 0; end
    n_err_cyc = 0; bad_gain = 0;
    @(negedge clk); token = 1; @(negedge clk); token = 0;
    for (int c = 0; c < 2 * LEN + 40; c++) begin
      if (c == stop_after) begin fast_clear = 1; @(negedge clk); fast_clear = 0; n_fast_clear++; end
      @(negedge clk);
      #1;
      if (error) n_err_cyc++;
      for (int m = 0; m < NMOD; m++) begin
        if (analog_out[m] > 1.0e-6) begin
          pos_cyc[m]++;
          if (analog_out[m] - 2.6 * hyb_analog_p[m] > 1.0e-6 || 2.6 * hyb_analog_p[m] - analog_out[m] > 1.0e-6)
            bad_gain = 1;
        end
        if (analog_out[m] < -1.0e-6) begin
          neg_cyc[m]++;
          if (analog_out[m] + 2.6 * hyb_analog_n[m] > 1.0e-6 || -2.6 * hyb_analog_n[m] - analog_out[m] > 1.0e-6)
            bad_gain = 1;
        end
      end
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v [NCHIP], r [NCHIP];
    status_t st [NCHIP];
    logic [1023:0] dout;
    int n;
    bit all_ok;
    foreach (in_chain[i]) in_chain[i] = 0;
    #220 rst_n = 1;
    j.reset();

    // 1. chain without hybrids
    j.shift(1'b1, '1, NCHIP * IR_W, dout);
    all_ok = 1;
    for (int i = 0; i < NCHIP; i++) if (dout[i*IR_W +: IR_W] != 4'b0001) all_ok = 0;
    check(all_ok, "IR capture pattern of all 31 chips");
    bypass_len(n);
    check(n == NCHIP, $sformatf("bypass chain of %0d chips", n));
    foreach (v[i]) v[i] = 0;
    all_wr(IR_ADC, 2 * ADC_W, v, r);
    all_ok = 1;
    for (int i = 0; i < NCHIP; i++) if (r[i][2*ADC_W-1:0] != {adc_cur[i], adc_temp[i]}) all_ok = 0;
    check(all_ok, "ADC readback from every chip");
    foreach (v[i]) v[i] = 64'(8'h90 + i);
    all_wr(IR_DAC, DAC_W, v, r);
    all_ok = 1;
    for (int i = 0; i < NCHIP; i++) if (dac_code[i] != 8'(8'h90 + i)) all_ok = 0;
    check(all_ok, "DAC code of every supply");

    // 2. program and switch on
    foreach (v[i]) v[i] = 64'(LEN);
    all_wr(IR_ROLEN, RO_W, v, r);
    foreach (v[i]) v[i] = (chip_side(i) == 1) ? 64'(LEN + 1) : 64'(0);
    all_wr(IR_RODELAY, RO_W, v, r);
    foreach (ctrl_v[i]) ctrl_v[i] = 64'(ctrl_t'{clr_err: 0, mask: '0, ro_en: chip_side(i) >= 0, supply_on: 1});
    write_ctrl();
    repeat (20) @(negedge clk);
    check(&sup_out_en && !(|sup_ilim_en) && &hyb_reset, "start-up: all supplies on, limits off, hybrids in reset");
    repeat (SU) @(negedge clk);
    check(&sup_ilim_en && !(|hyb_reset), "start-up over after 250 us");
    j.idle(2);
    foreach (in_chain[i]) in_chain[i] = 1;
    all_status(st);
    all_ok = 1;
    foreach (st[i]) if (!st[i].supply_ok || !st[i].hyb_in_chain || st[i].err != '0) all_ok = 0;
    check(all_ok, "all chips: supply ok, hybrid in chain, no error");
    bypass_len(n);
    check(n == NCHIP + 2 * NMOD * NFE, $sformatf("bypass chain with hybrids: %0d", n));
    n_restore++;

    // 3. a full readout
    readout(-1);
    all_ok = 1;
    foreach (pos_cyc[m]) if (pos_cyc[m] != LEN || neg_cyc[m] != LEN) all_ok = 0;
    check(all_ok, $sformatf("every module: %0d P then %0d N samples (module 0: %0d/%0d)", LEN, LEN, pos_cyc[0], neg_cyc[0]));
    check(!bad_gain, "analogue gain 2.6, N side inverted");
    check(n_err_cyc == 0 && !error, "no error in a clean readout");
    if (all_ok) n_readout_ok++;

    // 4. bypassed front-end chip on module 3, P side
    fe_bypass[0][3] = 6'b001000;
    n_fe_bypass++;
    readout(-1);
    check(error, "bypassed chip: error line raised");
    if (error) n_token_err++;
    all_status(st);
    all_ok = 1;
    foreach (st[i]) if (st[i].err[ERR_TOKEN] != (i == PB + 1 + 3)) all_ok = 0;
    check(all_ok, "STATUS locates the token error in module 3 P");
    ctrl_v[PB + 1 + 3] = 64'(ctrl_t'{clr_err: 0, mask: 3'b010, ro_en: 1, supply_on: 1});
    write_ctrl();
    repeat (4) @(negedge clk);
    check(!error, "masked token error");
    if (!error) n_mask++;
    ctrl_v[PB + 1 + 3] = 64'(ctrl_t'{clr_err: 1, mask: 3'b000, ro_en: 1, supply_on: 1});
    write_ctrl();
    ctrl_v[PB + 1 + 3] = 64'(ctrl_t'{clr_err: 0, mask: 3'b000, ro_en: 1, supply_on: 1});
    write_ctrl();
    // reprogram module 3: shorter P readout, N delayed accordingly
    foreach (v[i]) v[i] = 64'(LEN);
    v[PB + 1 + 3] = 64'(5 * (CH + OVH) + 1);
    all_wr(IR_ROLEN, RO_W, v, r);
    foreach (v[i]) v[i] = (chip_side(i) == 1) ? 64'(LEN + 1) : 64'(0);
    v[NB + 1 + 3] = 64'(5 * (CH + OVH) + 2);
    all_wr(IR_RODELAY, RO_W, v, r);
    readout(-1);
    check(!error && n_err_cyc == 0, "reprogrammed module reads out cleanly");
    check(pos_cyc[3] == 5 * (CH + OVH) + 1 && neg_cyc[3] == LEN,
          $sformatf("module 3 with a bypassed chip: %0d/%0d samples", pos_cyc[3], neg_cyc[3]));
    if (!error) n_readout_ok++;

    // 5. fast clear in mid-readout
    readout(300);
    check(n_err_cyc == 0 && !error, "no error after fast clear");
    check(pos_cyc[0] <= 301 && neg_cyc[0] == 0, $sformatf("fast clear stopped the readout (%0d/%0d)", pos_cyc[0], neg_cyc[0]));
    readout(-1);
    check(n_err_cyc == 0 && pos_cyc[0] == LEN && neg_cyc[0] == LEN, "readout after fast clear");

    // 6. latch-up on module 5, N side
    overcurrent[NB + 1 + 5] = 1;
    repeat (OC + 5) @(negedge clk);
    overcurrent[NB + 1 + 5] = 0;
    check(!sup_out_en[NB + 1 + 5] && !hyb_drv_en[1][5] && error, "latch-up: supply off, drivers off, error");
    if (!sup_out_en[NB + 1 + 5]) n_latchup++;
    j.idle(2);
    in_chain[NB + 1 + 5] = 0;
    bypass_len(n);
    check(n == NCHIP + (2 * NMOD - 1) * NFE, "latch-up: hybrid left the chain, chain intact");
    all_status(st);
    check(st[NB + 1 + 5].err[ERR_SUPPLY] && !st[NB + 1 + 5].supply_ok, "STATUS locates the latch-up");
    ctrl_v[NB + 1 + 5] = 64'(ctrl_t'{clr_err: 0, mask: 3'b001, ro_en: 1, supply_on: 1});
    write_ctrl();
    repeat (4) @(negedge clk);
    check(!error, "supply error masked");
    readout(-1);
    check(pos_cyc[5] == LEN && neg_cyc[5] == 0 && pos_cyc[6] == LEN && neg_cyc[6] == LEN,
          "module 5 reads its P side only, others unaffected");
    ctrl_v[NB + 1 + 5] = 64'(ctrl_t'{clr_err: 0, mask: 3'b000, ro_en: 1, supply_on: 0});
    write_ctrl();
    ctrl_v[NB + 1 + 5] = 64'(ctrl_t'{clr_err: 0, mask: 3'b000, ro_en: 1, supply_on: 1});
    write_ctrl();
    repeat (SU + 10) @(negedge clk);
    j.idle(2);
    in_chain[NB + 1 + 5] = 1;
    bypass_len(n);
    check(n == NCHIP + 2 * NMOD * NFE && !error, "hybrid restored in the chain after off/on");
    if (n == NCHIP + 2 * NMOD * NFE) n_restore++;
    readout(-1);
    check(neg_cyc[5] == LEN && n_err_cyc == 0, "module 5 N side reads out again");

    // 7. register upset
    dut.g_chip[20].u_chip.u_jtag.u_len.q[7] = ~dut.g_chip[20].u_chip.u_jtag.u_len.q[7];
    repeat (4) @(negedge clk);
    check(error, "register upset on the error line");
    all_status(st);
    check(st[20].err[ERR_PARITY], "STATUS locates the parity error");
    if (error) n_parity++;
    foreach (v[i]) v[i] = 64'(LEN);
    v[PB + 1 + 3] = 64'(5 * (CH + OVH) + 1);
    all_wr(IR_ROLEN, RO_W, v, r);
    repeat (4) @(negedge clk);
    check(!error, "rewrite clears the upset");

    // 8. boundary scan interconnection test: chip 2 drives its error pin, chip 1
    //    must see it on its error input
    foreach (v[i]) v[i] = 0;
    v[PB + 1] = 64'(1) << (BSR_IN + 2);               // error_out cell of chip 2
    all_wr(IR_EXTEST, BSR_IN + BSR_OUT, v, r);
    check(!error, "EXTEST: outputs driven from the boundary scan register");
    all_wr(IR_EXTEST, BSR_IN + BSR_OUT, v, r);
    check(r[PB][3] && !r[0][3] && !r[PB + 2][3], "EXTEST: error line from chip 2 reaches chip 1 only");
    if (r[PB][3]) n_bscan++;
    all_ir(IR_BYPASS);
    repeat (4) @(negedge clk);
    check(!error, "outputs back to the core after EXTEST");

    // 9. ALABUF disable during a readout
    abuf_disable = 1;
    readout(-1);
    abuf_disable = 0;
    all_ok = 1;
    foreach (pos_cyc[m]) if (pos_cyc[m] != 0 || neg_cyc[m] != 0) all_ok = 0;
    check(all_ok && n_err_cyc == 0, "disabled buffers: no analogue output, readout still checked");
    if (all_ok) n_abuf_dis++;

    // mechanisms seen
    check(n_bscan > 0, "mechanism: boundary scan interconnection test");
    check(n_abuf_dis > 0, "mechanism: buffer disable");
    check(n_readout_ok > 0, "mechanism: clean readout");
    check(n_fe_bypass > 0 && n_token_err > 0, "mechanism: bypassed chip / token error");
    check(n_mask > 0, "mechanism: error mask");
    check(n_fast_clear > 0, "mechanism: fast clear");
    check(n_latchup > 0, "mechanism: latch-up switch-off");
    check(n_restore > 1, "mechanism: JTAG chain restore");
    check(n_parity > 0, "mechanism: parity error");
    $display("mechanisms: readout=%0d bypass=%0d token_err=%0d mask=%0d fast_clear=%0d latchup=%0d restore=%0d parity=%0d bscan=%0d abuf_disable=%0d",
             n_readout_ok, n_fe_bypass, n_token_err, n_mask, n_fast_clear, n_latchup, n_restore, n_parity, n_bscan, n_abuf_dis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
