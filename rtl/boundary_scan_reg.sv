// boundary_scan_reg: IEEE 1149.1 boundary scan register for the chip's pins.
//
// One cell per digital pin: NIN input cells followed by NOUT output cells in
// the scan chain (cell 0, the first input, is nearest TDO). In Capture-DR the
// cells load the pin values (inputs as received, outputs as the core drives
// them); Shift-DR shifts LSB first; Update-DR (falling TCK edge) copies the
// chain into the update latches. While extest is set the output pins are
// driven from the update latches instead of the core, which is what
// interconnection tests between chips use; SAMPLE only captures.
// The design names boundary scan interconnection tests as a use of the JTAG
// logic; the choice of pins and the cell order are this implementation's.
module boundary_scan_reg #(
  parameter int unsigned NIN  = 4,
  parameter int unsigned NOUT = 3
) (
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tlr,
  input  logic            sel,
  input  logic            extest,
  input  logic            capture_dr,
  input  logic            shift_dr,
  input  logic            update_dr,
  input  logic            tdi,
  output logic            tdo,
  input  logic [NIN-1:0]  pin_in,      // input pins, as received
  input  logic [NOUT-1:0] core_out,    // output values from the core
  output logic [NOUT-1:0] pin_out      // values driven onto the output pins
);

  localparam int unsigned W = NIN + NOUT;

  logic [W-1:0]    sr;
  logic [NOUT-1:0] upd;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                sr <= '0;
    else if (sel && capture_dr) sr <= {core_out, pin_in};
    else if (sel && shift_dr)   sr <= {tdi, sr[W-1:1]};

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)                   upd <= '0;
    else if (tlr)                  upd <= '0;
    else if (sel && update_dr)     upd <= sr[W-1:NIN];

  assign tdo     = sr[0];
  assign pin_out = extest ? upd : core_out;

endmodule
