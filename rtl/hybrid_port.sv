// hybrid_port: the chip's connection to one front-end hybrid.
//
// When the hybrid's supply is off (e.g. after a latch-up), the drivers towards
// the hybrid must not feed current into it: drv_en goes low (the drivers'
// tri-state enable) and the driven values are forced low. While the supply is
// off or still starting up (hyb_ok low) the hybrid is also out of the JTAG chain: the chain input tdi is
// passed straight to tdo, so the JTAG chain of the EndCap is never broken by a
// dead hybrid. When the supply reports OK again the hybrid is put back in the
// chain and the original chain is restored.
//
// hyb_ok is sampled on the falling TCK edge, at the same time as TDO changes,
// so the chain does not switch inside a TCK half period; it should be changed
// only while no JTAG shift is under way. Driver disable and chain restore
// follow the design; the retiming and the switching point are this
// implementation's choices.
module hybrid_port (
  input  logic tck,
  input  logic trst_n,
  input  logic hyb_pwr,      // hybrid supply output enabled
  input  logic hyb_ok,       // hybrid supply running, start-up over
  // signals towards the hybrid, from the core
  input  logic token,
  input  logic fast_clear,
  input  logic po_reset,
  input  logic tms,
  input  logic tdi,          // chain data arriving at the hybrid's position
  // pins
  output logic drv_en,
  output logic hyb_token,
  output logic hyb_fast_clear,
  output logic hyb_reset,
  output logic hyb_tck,
  output logic hyb_tms,
  output logic hyb_tdi,
  input  logic hyb_tdo,
  // chain continues here
  output logic tdo,
  output logic in_chain
);

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) in_chain <= 1'b0;
    else         in_chain <= hyb_ok;

  assign drv_en         = hyb_pwr;
  assign hyb_token      = hyb_pwr & token;
  assign hyb_fast_clear = hyb_pwr & fast_clear;
  assign hyb_reset      = hyb_pwr & po_reset;
  assign hyb_tck        = in_chain & tck;
  assign hyb_tms        = in_chain & tms;
  assign hyb_tdi        = in_chain & tdi;
  assign tdo            = in_chain ? hyb_tdo : tdi;

endmodule
