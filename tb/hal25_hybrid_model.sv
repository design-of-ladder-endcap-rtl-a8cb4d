// hal25_hybrid_model: behavioural model of a front-end hybrid for testbenches.
// Not part of the design. A hybrid carries NCHIP HAL25 chips of CH channels.
// Readout: the token that arrives on 'token' walks through the chips; an
// active chip keeps it CH + OVH cycles, a bypassed chip (bypass[i]=1) 1 cycle;
// the last chip returns it on ret_token. While a chip reads out, 'analog'
// carries its channel values (a fixed pattern, AMP volts per step), otherwise
// 0 V. fast_clear abandons a readout. JTAG: the chips' bypass registers are
// modelled as one NCHIP-bit shift register between tdi and tdo, shifting in
// Shift-IR and Shift-DR of a standard TAP, so IR and DR scans both see NCHIP
// bits. Without drv_en the model ignores its inputs.
`timescale 1ns/1ps
module hal25_hybrid_model #(
  parameter int  NCHIP = 6,
  parameter int  CH    = 128,
  parameter int  OVH   = 2,
  parameter real AMP   = 0.01
) (
  input  logic             clk,
  input  logic             drv_en,
  input  logic             token,
  input  logic             fast_clear,
  input  logic [NCHIP-1:0] bypass,
  output logic             ret_token,
  output real              analog,
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  output logic             tdo
);
  logic [NCHIP-1:0] sr = '0;
  initial begin ret_token = 0; analog = 0.0; tdo = 0; end
  // a standard TAP decides when the chips shift; power-off resets it
  endcap_pkg::ir_e t_ir;
  logic t_ir_tdo, t_shift_ir, t_cap, t_shift_dr, t_upd, t_tlr;
  logic por = 1'b1;                 // reset pulse each time the hybrid is powered
  always @(posedge drv_en) begin por = 1'b0; #1 por = 1'b1; end
  jtag_tap u_tap (.tck, .trst_n(por), .tms, .tdi, .ir(t_ir), .ir_tdo(t_ir_tdo),
    .shift_ir(t_shift_ir), .capture_dr(t_cap), .shift_dr(t_shift_dr), .update_dr(t_upd),
    .test_logic_reset(t_tlr));
  always @(posedge tck or negedge drv_en)
    if (!drv_en)                        sr <= '0;
    else if (t_shift_ir || t_shift_dr)  sr <= {tdi, sr[NCHIP-1:1]};
  always @(negedge tck) tdo <= sr[0];

  function automatic int length();
    int l = 0;
    for (int i = 0; i < NCHIP; i++) l += bypass[i] ? 1 : CH + OVH;
    return l;
  endfunction

  int rem = 0, pos = 0;
  always @(posedge clk) begin
    if (fast_clear || !drv_en) begin
      rem <= 0;
    end else if (token && rem == 0) begin
      rem <= length();
      pos <= 0;
    end else if (rem > 0) begin
      rem <= rem - 1;
      pos <= pos + 1;
    end
  end
  always @(negedge clk) begin
    ret_token = (rem == 1);
    analog    = (rem > 0) ? AMP * real'((pos % 13) + 1) : 0.0;
  end
endmodule
