// alcapone: digital core of the EndCap control chip (ALice Control And Power NExus).
//
// One chip type serves three places in the EndCap: the interface chip at
// ground potential, the two bus buffer chips behind the AC coupling at the P-
// and N-side bias, and the hybrid supply chips, one per front-end hybrid. This
// module holds the chip's digital functions:
//   * JTAG logic and registers (alcapone_jtag): supply on/off, supply voltage
//     DAC code, readout token delay and length, error masks, status, monitor
//     ADC readback, boundary scan; parity-checked against single event upsets.
//   * Supply control (supply_ctrl): start-up timer, over-current timer, error
//     latch, power-on reset and OK for the hybrid supply.
//   * Readout control (readout_ctrl): delayed token to the hybrid, analogue
//     multiplexer select, return-token time check, fast clear.
//   * Error control (error_ctrl): flags, masks, OR with the error line of the
//     chips below.
//   * Hybrid port (hybrid_port): drivers disabled and hybrid bypassed in the
//     JTAG chain while its supply is off.
// The readout control only acts when the control register enables it
// (ro_en) and the hybrid supply is OK; buffer and interface chips, which have
// no hybrid, leave it disabled.
// The JTAG chain runs TDI -> chip registers -> hybrid (if powered) -> TDO. The
// incoming token and fast clear are also passed on unchanged (bus_token,
// bus_fast_clear), as a buffer chip passes them to the chips below it.
//
// Two clocks: tck for JTAG, clk (10 MHz readout clock) for the rest. Control
// bits are synchronised into the clk domain with two flip-flops; the readout
// delay and length and the status word cross unsynchronised and must be
// quasi-static (written or read while no readout runs). rst_n is the chip's
// power-on reset. The analogue parts (LVDS/CMOS receivers and drivers, the
// regulator, the DAC and the ADC) are outside: their digital pins are ports.
// The split into these functions follows the chip's block diagram; how they
// are wired in detail is this implementation's choice.
module alcapone
  import endcap_pkg::*;
#(
  parameter int unsigned STARTUP_CYCLES = CLK_MHZ * STARTUP_US,
  parameter int unsigned OC_CYCLES      = CLK_MHZ * OVERCURRENT_US
) (
  input  logic             clk,
  input  logic             rst_n,
  // JTAG
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tms,
  input  logic             tdi,
  output logic             tdo,
  // readout bus in, and passed on
  input  logic             token_in,
  input  logic             fast_clear_in,
  output logic             bus_token,
  output logic             bus_fast_clear,
  // error line
  input  logic             error_in,
  output logic             error_out,
  // hybrid
  output logic             hyb_drv_en,
  output logic             hyb_token,
  output logic             hyb_fast_clear,
  output logic             hyb_reset,
  output logic             hyb_tck,
  output logic             hyb_tms,
  output logic             hyb_tdi,
  input  logic             hyb_tdo,
  input  logic             hyb_ret_token,
  // analogue multiplexer select for this hybrid
  output logic             sel_readout,
  // supply
  input  logic             overcurrent,
  output logic             sup_out_en,
  output logic             sup_ilim_en,
  output logic [DAC_W-1:0] dac_code,
  // monitor ADC
  input  logic [ADC_W-1:0] adc_temp,
  input  logic [ADC_W-1:0] adc_cur
);

  // ---- JTAG registers ----
  ctrl_t               ctrl;
  logic [RO_W-1:0]     ro_delay, ro_len;
  logic                parity_err_tck;
  status_t             status;
  logic                jtag_tdo;
  logic [BSR_OUT-1:0]  core_out, pin_out;

  alcapone_jtag u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo(jtag_tdo),
    .ctrl, .dac_code, .ro_delay, .ro_len, .parity_err(parity_err_tck),
    .status, .adc_temp, .adc_cur,
    .bs_pin_in({error_in, hyb_ret_token, fast_clear_in, token_in}),
    .bs_core_out(core_out), .bs_pin_out(pin_out));

  // ---- into the clk domain ----
  logic            supply_on, ro_en, clr_err, parity_err;
  logic [NERR-1:0] mask;
  sync2 #(.W(NERR + 4)) u_sync (
    .clk, .rst_n,
    .d({ctrl.mask, ctrl.supply_on, ctrl.ro_en, ctrl.clr_err, parity_err_tck}),
    .q({mask, supply_on, ro_en, clr_err, parity_err}));

  // ---- supply ----
  logic sup_po_reset, sup_ok, sup_err;
  supply_ctrl #(.STARTUP_CYCLES(STARTUP_CYCLES), .OC_CYCLES(OC_CYCLES)) u_supply (
    .clk, .rst_n, .supply_on, .overcurrent,
    .out_en(sup_out_en), .ilim_en(sup_ilim_en), .po_reset(sup_po_reset),
    .ok(sup_ok), .err(sup_err));

  // ---- readout ----
  logic ro_token, ro_sel, ro_busy, ro_err, ro_done;
  readout_ctrl u_readout (
    .clk, .rst_n, .enable(sup_ok & ro_en), .token_in, .fast_clear(fast_clear_in),
    .ro_delay, .ro_len, .ret_token(hyb_ret_token),
    .hyb_token(ro_token), .sel_readout(ro_sel), .busy(ro_busy),
    .token_err(ro_err), .done(ro_done));

  // ---- errors ----
  logic [NERR-1:0] flags;
  logic            err_core;
  error_ctrl u_err (
    .clk, .rst_n, .supply_err(sup_err), .token_err(ro_err), .parity_err,
    .mask, .clr_err, .error_in, .flags, .error_out(err_core));

  // ---- boundary scan on the output pins ----
  assign core_out    = {err_core, ro_sel, ro_token};
  assign error_out   = pin_out[2];
  assign sel_readout = pin_out[1];

  // ---- hybrid ----
  logic in_chain;
  hybrid_port u_hyb (
    .tck, .trst_n, .hyb_pwr(sup_out_en), .hyb_ok(sup_ok),
    .token(pin_out[0]), .fast_clear(fast_clear_in), .po_reset(sup_po_reset),
    .tms, .tdi(jtag_tdo),
    .drv_en(hyb_drv_en), .hyb_token, .hyb_fast_clear, .hyb_reset,
    .hyb_tck, .hyb_tms, .hyb_tdi, .hyb_tdo,
    .tdo, .in_chain);

  assign status = '{supply_ok: sup_ok, hyb_in_chain: in_chain, ro_busy: ro_busy, err: flags};

  assign bus_token      = token_in;
  assign bus_fast_clear = fast_clear_in;

endmodule
