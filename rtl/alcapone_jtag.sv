// alcapone_jtag: the JTAG logic and control registers of one control chip.
//
// A TAP controller (jtag_tap) selects one data register at a time between TDI
// and TDO by the current instruction:
//   BYPASS  (1111)  1-bit bypass register; also any code not listed here
//   EXTEST  (0000)  boundary scan register, output pins driven from it
//   SAMPLE  (0001)  boundary scan register, capture only
//   CTRL    (0100)  control register: supply on/off, error masks, error clear
//   DAC     (0101)  supply output voltage DAC code
//   RODELAY (0110)  readout token delay in clock cycles
//   ROLEN   (0111)  expected readout length: cycles from token out to token return
//   STATUS  (1000)  error flags and state (read only)
//   ADC     (1001)  monitor ADC codes, temperature and detector current (read only)
// The four writable registers carry a parity bit (parity_reg); the OR of their
// parity checks is the chip's parity error. Read-only registers capture their
// inputs in Capture-DR and ignore Update-DR.
//
// TDO is retimed on the falling TCK edge as the standard requires. All
// register outputs change on falling TCK edges and are quasi-static for the
// clock domain that uses them: they are meant to be written while no readout
// runs. The registers the design lists (supply voltage DAC, readout control,
// monitor ADC, boundary scan) follow the design; instruction codes, widths and
// layouts are this implementation's own.
module alcapone_jtag
  import endcap_pkg::*;
#(
  parameter logic [RO_W-1:0] ROLEN_RESET = RO_W'(FE_CHIPS_PER_HYBRID * FE_CHANNELS)
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo,
  // register contents
  output ctrl_t               ctrl,
  output logic [DAC_W-1:0]    dac_code,
  output logic [RO_W-1:0]     ro_delay,
  output logic [RO_W-1:0]     ro_len,
  output logic                parity_err,
  input  status_t             status,
  input  logic [ADC_W-1:0]    adc_temp,
  input  logic [ADC_W-1:0]    adc_cur,
  // boundary scan
  input  logic [BSR_IN-1:0]   bs_pin_in,
  input  logic [BSR_OUT-1:0]  bs_core_out,
  output logic [BSR_OUT-1:0]  bs_pin_out
);

  ir_e  ir;
  logic ir_tdo, shift_ir, capture_dr, shift_dr, update_dr, tlr;

  jtag_tap u_tap (
    .tck, .trst_n, .tms, .tdi, .ir, .ir_tdo, .shift_ir,
    .capture_dr, .shift_dr, .update_dr, .test_logic_reset(tlr)
  );

  // ---- instruction decode ----
  logic sel_bsr, sel_ctrl, sel_dac, sel_dly, sel_len, sel_stat, sel_adc;
  always_comb begin
    sel_bsr  = (ir == IR_EXTEST) || (ir == IR_SAMPLE);
    sel_ctrl = (ir == IR_CTRL);
    sel_dac  = (ir == IR_DAC);
    sel_dly  = (ir == IR_RODELAY);
    sel_len  = (ir == IR_ROLEN);
    sel_stat = (ir == IR_STATUS);
    sel_adc  = (ir == IR_ADC);
  end

  // ---- bypass ----
  logic byp;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)         byp <= 1'b0;
    else if (capture_dr) byp <= 1'b0;
    else if (shift_dr)   byp <= tdi;

  // ---- writable registers with parity ----
  logic [CTRL_W-1:0] ctrl_q;
  logic tdo_ctrl, tdo_dac, tdo_dly, tdo_len;
  logic pe_ctrl, pe_dac, pe_dly, pe_len;

  parity_reg #(.W(CTRL_W), .RESET('0)) u_ctrl (
    .tck, .trst_n, .tlr, .sel(sel_ctrl), .capture_dr, .shift_dr, .update_dr,
    .tdi, .tdo(tdo_ctrl), .q(ctrl_q), .parity_err(pe_ctrl));
  assign ctrl = ctrl_t'(ctrl_q);

  parity_reg #(.W(DAC_W), .RESET(DAC_W'(1) << (DAC_W-1))) u_dac (
    .tck, .trst_n, .tlr, .sel(sel_dac), .capture_dr, .shift_dr, .update_dr,
    .tdi, .tdo(tdo_dac), .q(dac_code), .parity_err(pe_dac));

  parity_reg #(.W(RO_W), .RESET('0)) u_dly (
    .tck, .trst_n, .tlr, .sel(sel_dly), .capture_dr, .shift_dr, .update_dr,
    .tdi, .tdo(tdo_dly), .q(ro_delay), .parity_err(pe_dly));

  parity_reg #(.W(RO_W), .RESET(ROLEN_RESET)) u_len (
    .tck, .trst_n, .tlr, .sel(sel_len), .capture_dr, .shift_dr, .update_dr,
    .tdi, .tdo(tdo_len), .q(ro_len), .parity_err(pe_len));

  assign parity_err = pe_ctrl | pe_dac | pe_dly | pe_len;

  // ---- read-only registers ----
  logic [STATUS_W-1:0] stat_sr;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                     stat_sr <= '0;
    else if (sel_stat && capture_dr) stat_sr <= status;
    else if (sel_stat && shift_dr)   stat_sr <= {tdi, stat_sr[STATUS_W-1:1]};

  logic [2*ADC_W-1:0] adc_sr;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                    adc_sr <= '0;
    else if (sel_adc && capture_dr) adc_sr <= {adc_cur, adc_temp};
    else if (sel_adc && shift_dr)   adc_sr <= {tdi, adc_sr[2*ADC_W-1:1]};

  // ---- boundary scan ----
  logic tdo_bsr;
  boundary_scan_reg #(.NIN(BSR_IN), .NOUT(BSR_OUT)) u_bsr (
    .tck, .trst_n, .tlr, .sel(sel_bsr), .extest(ir == IR_EXTEST),
    .capture_dr, .shift_dr, .update_dr, .tdi, .tdo(tdo_bsr),
    .pin_in(bs_pin_in), .core_out(bs_core_out), .pin_out(bs_pin_out));

  // ---- TDO multiplexer, retimed on the falling edge ----
  logic tdo_mux;
  always_comb begin
    if (shift_ir)      tdo_mux = ir_tdo;
    else if (sel_bsr)  tdo_mux = tdo_bsr;
    else if (sel_ctrl) tdo_mux = tdo_ctrl;
    else if (sel_dac)  tdo_mux = tdo_dac;
    else if (sel_dly)  tdo_mux = tdo_dly;
    else if (sel_len)  tdo_mux = tdo_len;
    else if (sel_stat) tdo_mux = stat_sr[0];
    else if (sel_adc)  tdo_mux = adc_sr[0];
    else               tdo_mux = byp;
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_mux;

endmodule
