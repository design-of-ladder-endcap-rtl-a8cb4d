// parity_reg: JTAG configuration data register with single-event-upset check.
//
// A W-bit shift stage sits between TDI and TDO while the register is selected.
// In Capture-DR it loads the register's present value, so every shift also
// reads the register back; in Shift-DR it shifts LSB first (tdo is the LSB of
// the shift stage); in Update-DR, on the falling TCK edge, the shifted word is
// copied into the holding register q together with its parity bit.
//
// The design asks for a parity check over all bits of the JTAG registers to
// detect single event upsets. Here the parity bit is computed by the chip at
// update time and stored next to the word; parity_err is the continuous
// comparison of the stored word against it, so a flipped bit in q or in the
// parity bit shows at once and stays until the register is written again.
// Reset (TRST_N or Test-Logic-Reset) loads RESET with matching parity.
module parity_reg #(
  parameter int unsigned    W     = 8,
  parameter logic [W-1:0]   RESET = '0
) (
  input  logic          tck,
  input  logic          trst_n,
  input  logic          tlr,        // TAP in Test-Logic-Reset
  input  logic          sel,        // register selected by the instruction
  input  logic          capture_dr,
  input  logic          shift_dr,
  input  logic          update_dr,
  input  logic          tdi,
  output logic          tdo,
  output logic [W-1:0]  q,
  output logic          parity_err
);

  logic [W-1:0] sr;
  logic         par;
  logic [W:0]   shifted;

  assign shifted = {tdi, sr};

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                 sr <= '0;
    else if (sel && capture_dr)  sr <= q;
    else if (sel && shift_dr)   sr <= shifted[W:1];

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) begin
      q   <= RESET;
      par <= ^RESET;
    end else if (tlr) begin
      q   <= RESET;
      par <= ^RESET;
    end else if (sel && update_dr) begin
      q   <= sr;
      par <= ^sr;
    end

  assign tdo        = sr[0];
  assign parity_err = (^q) ^ par;

endmodule
