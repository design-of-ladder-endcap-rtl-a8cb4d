// error_ctrl: error flags, error masking and the OR-ed error line of a chip.
//
// Three error sources are watched: the hybrid supply was switched off by an
// over-current (a level, latched inside the supply control), the readout return
// token came at the wrong time (a pulse, made sticky here) and a parity error in
// a configuration register (a level). flags shows all three to the status
// register whatever the mask. error_out is the OR of error_in, the error line of
// the chips below this one, and every flag whose mask bit is 0, so one line
// tells the detector control system at once that something in the EndCap went
// wrong; it then reads the status registers to find which supply or readout.
// A defect that cannot be repaired is masked so that it does not hold the line.
//
// The sticky token flag is cleared while clr_err is 1. Everything is clocked on
// the readout clock; inputs from the JTAG clock domain must already be
// synchronised. OR-ing the errors of all supplies and masking follow the
// design; the set of flags, the sticky rule and the clear bit are this
// implementation's choices.
module error_ctrl
  import endcap_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            supply_err,
  input  logic            token_err,
  input  logic            parity_err,
  input  logic [NERR-1:0] mask,
  input  logic            clr_err,
  input  logic            error_in,
  output logic [NERR-1:0] flags,
  output logic            error_out
);

  logic tok_sticky;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         tok_sticky <= 1'b0;
    else if (clr_err)   tok_sticky <= 1'b0;
    else if (token_err) tok_sticky <= 1'b1;

  always_comb begin
    flags             = '0;
    flags[ERR_SUPPLY] = supply_err;
    flags[ERR_TOKEN]  = tok_sticky;
    flags[ERR_PARITY] = parity_err;
  end

  assign error_out = error_in | (|(flags & ~mask));

endmodule
