// endcap: one ladder EndCap of the ALICE SSD, digital view.
//
// The EndCap sits at the end of half a ladder and connects its 14 double-sided
// detector modules (28 front-end hybrids of 6 HAL25 chips) to the read-out and
// control system 25 m away. It is one InterfaceCard and seven SupplyCards:
//   * InterfaceCard: the interface ALCAPONE at ground potential (chip 0) and
//     two buffer ALCAPONEs behind the AC coupling, one at the P-side bias
//     (chip 1) and one at the N-side bias (chip 16). The buffer chips pass
//     token and fast clear down to the supply chips of their side.
//   * SupplyCard c (c = 0..6): supply ALCAPONEs for the P-side hybrids of
//     modules 2c and 2c+1 (chips 2+m) and for their N-side hybrids (chips
//     17+m), and one ALABUF that multiplexes each module's P and N hybrid onto
//     one analogue output.
// Chip index i runs along the JTAG chain: TDI -> chip 0 -> 1 -> 2..15 (each
// followed by its hybrid) -> 16 -> 17..30 -> TDO. The per-chip ports (supply,
// DAC, ADC) are indexed the same way. Hybrid ports are indexed [side][module],
// side 0 = P, 1 = N.
//
// The error lines form an OR chain: each supply chip ORs the line of the next
// chip of its side into its own, the buffer chips take their side's chain, and
// the interface chip takes both buffer chips' lines; its output is the EndCap's
// single error signal. The three control chips have no hybrid: their hybrid
// JTAG pins are looped back and no return token reaches them.
//
// All chips use the one readout clock clk and one reset rst_n. The AC coupling
// between the chips, the LVDS/CMOS drivers and receivers and the regulators
// are analogue and are not modelled: the signals pass straight through.
// The card structure and chip counts follow the design; the chain order, the
// error OR chain and the role wiring of the control chips are this
// implementation's choices.
module endcap
  import endcap_pkg::*;
#(
  parameter int unsigned STARTUP_CYCLES = CLK_MHZ * STARTUP_US,
  parameter int unsigned OC_CYCLES      = CLK_MHZ * OVERCURRENT_US,
  localparam int unsigned NMOD  = MODULES,          // 14
  localparam int unsigned NCHIP = 3 + 2 * MODULES   // 31
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // to/from the read-out module (FEROM) and the control system
  input  logic                        tck,
  input  logic                        trst_n,
  input  logic                        tms,
  input  logic                        tdi,
  output logic                        tdo,
  input  logic                        token,
  input  logic                        fast_clear,
  output logic                        error,
  input  logic                        abuf_disable,
  output real                         analog_out [NMOD],
  // hybrids [side][module]
  output logic [1:0][NMOD-1:0]        hyb_drv_en,
  output logic [1:0][NMOD-1:0]        hyb_token,
  output logic [1:0][NMOD-1:0]        hyb_fast_clear,
  output logic [1:0][NMOD-1:0]        hyb_reset,
  output logic [1:0][NMOD-1:0]        hyb_tck,
  output logic [1:0][NMOD-1:0]        hyb_tms,
  output logic [1:0][NMOD-1:0]        hyb_tdi,
  input  logic [1:0][NMOD-1:0]        hyb_tdo,
  input  logic [1:0][NMOD-1:0]        hyb_ret_token,
  input  real                         hyb_analog_p [NMOD],
  input  real                         hyb_analog_n [NMOD],
  // per chip, along the JTAG chain
  input  logic [NCHIP-1:0]            overcurrent,
  output logic [NCHIP-1:0]            sup_out_en,
  output logic [NCHIP-1:0]            sup_ilim_en,
  output logic [NCHIP-1:0][DAC_W-1:0] dac_code,
  input  logic [NCHIP-1:0][ADC_W-1:0] adc_temp,
  input  logic [NCHIP-1:0][ADC_W-1:0] adc_cur
);

  localparam int unsigned IF_CHIP = 0;
  localparam int unsigned PB_CHIP = 1;
  localparam int unsigned NB_CHIP = 2 + NMOD;     // 16

  logic [NCHIP-1:0] c_tdi, c_tdo, c_token, c_fc, c_bus_token, c_bus_fc;
  logic [NCHIP-1:0] c_err_in, c_err_out, c_sel;
  logic [NCHIP-1:0] c_drv_en, c_hyb_token, c_hyb_fc, c_hyb_reset;
  logic [NCHIP-1:0] c_hyb_tck, c_hyb_tms, c_hyb_tdi, c_hyb_tdo, c_ret;

  for (genvar i = 0; i < NCHIP; i++) begin : g_chip
    alcapone #(.STARTUP_CYCLES(STARTUP_CYCLES), .OC_CYCLES(OC_CYCLES)) u_chip (
      .clk, .rst_n, .tck, .trst_n, .tms,
      .tdi(c_tdi[i]), .tdo(c_tdo[i]),
      .token_in(c_token[i]), .fast_clear_in(c_fc[i]),
      .bus_token(c_bus_token[i]), .bus_fast_clear(c_bus_fc[i]),
      .error_in(c_err_in[i]), .error_out(c_err_out[i]),
      .hyb_drv_en(c_drv_en[i]), .hyb_token(c_hyb_token[i]),
      .hyb_fast_clear(c_hyb_fc[i]), .hyb_reset(c_hyb_reset[i]),
      .hyb_tck(c_hyb_tck[i]), .hyb_tms(c_hyb_tms[i]), .hyb_tdi(c_hyb_tdi[i]),
      .hyb_tdo(c_hyb_tdo[i]), .hyb_ret_token(c_ret[i]),
      .sel_readout(c_sel[i]),
      .overcurrent(overcurrent[i]), .sup_out_en(sup_out_en[i]),
      .sup_ilim_en(sup_ilim_en[i]), .dac_code(dac_code[i]),
      .adc_temp(adc_temp[i]), .adc_cur(adc_cur[i]));

    // JTAG chain
    if (i == 0) begin : g_tdi0
      assign c_tdi[i] = tdi;
    end else begin : g_tdin
      assign c_tdi[i] = c_tdo[i-1];
    end

    if (i == IF_CHIP) begin : g_if
      assign c_token[i]   = token;
      assign c_fc[i]      = fast_clear;
      assign c_err_in[i]  = c_err_out[PB_CHIP] | c_err_out[NB_CHIP];
      assign c_hyb_tdo[i] = c_hyb_tdi[i];
      assign c_ret[i]     = 1'b0;
    end else if (i == PB_CHIP || i == NB_CHIP) begin : g_buf
      assign c_token[i]   = c_bus_token[IF_CHIP];
      assign c_fc[i]      = c_bus_fc[IF_CHIP];
      assign c_err_in[i]  = c_err_out[i+1];
      assign c_hyb_tdo[i] = c_hyb_tdi[i];
      assign c_ret[i]     = 1'b0;
    end else begin : g_sup
      localparam int unsigned SIDE = (i > NB_CHIP) ? 1 : 0;
      localparam int unsigned M    = (i > NB_CHIP) ? i - NB_CHIP - 1 : i - PB_CHIP - 1;
      localparam int unsigned BUF  = (SIDE == 1) ? NB_CHIP : PB_CHIP;
      assign c_token[i] = c_bus_token[BUF];
      assign c_fc[i]    = c_bus_fc[BUF];
      if (M == NMOD - 1) begin : g_last
        assign c_err_in[i] = 1'b0;
      end else begin : g_next
        assign c_err_in[i] = c_err_out[i+1];
      end
      assign hyb_drv_en[SIDE][M]     = c_drv_en[i];
      assign hyb_token[SIDE][M]      = c_hyb_token[i];
      assign hyb_fast_clear[SIDE][M] = c_hyb_fc[i];
      assign hyb_reset[SIDE][M]      = c_hyb_reset[i];
      assign hyb_tck[SIDE][M]        = c_hyb_tck[i];
      assign hyb_tms[SIDE][M]        = c_hyb_tms[i];
      assign hyb_tdi[SIDE][M]        = c_hyb_tdi[i];
      assign c_hyb_tdo[i]            = hyb_tdo[SIDE][M];
      assign c_ret[i]                = hyb_ret_token[SIDE][M];
    end
  end

  assign tdo   = c_tdo[NCHIP-1];
  assign error = c_err_out[IF_CHIP];

  // One ALABUF per SupplyCard, two modules each.
  for (genvar c = 0; c < SUPPLY_CARDS; c++) begin : g_card
    real  in_p [2], in_n [2], o_diff [2], o_p [2], o_n [2];
    logic s_p [2], s_n [2];
    for (genvar k = 0; k < 2; k++) begin : g_mod
      assign in_p[k] = hyb_analog_p[2*c+k];
      assign in_n[k] = hyb_analog_n[2*c+k];
      assign s_p[k]  = c_sel[PB_CHIP + 1 + 2*c + k];
      assign s_n[k]  = c_sel[NB_CHIP + 1 + 2*c + k];
      assign analog_out[2*c+k] = o_diff[k];
    end
    alabuf u_abuf (
      .in_p, .in_n, .sel_p(s_p), .sel_n(s_n), .disable_buf(abuf_disable),
      .out_diff(o_diff), .out_p(o_p), .out_n(o_n));
  end

endmodule
