// endcap_pkg: constants and types shared by the EndCap control logic.
//
// Holds the sizes taken from the design (6 HAL25 front-end chips per hybrid,
// 128 channels per chip, a 10 MHz readout clock, the 250 us start-up and 25 us
// over-current timers of the hybrid supply, 7 SupplyCards feeding 28 hybrids)
// and the choices this implementation makes where the design leaves them open:
// the JTAG instruction codes, the register widths and the layout of the
// control and status registers.
package endcap_pkg;

  // ---- numbers from the design --------------------------------------------
  localparam int unsigned FE_CHIPS_PER_HYBRID = 6;     // HAL25 chips per hybrid
  localparam int unsigned FE_CHANNELS         = 128;   // analogue channels per HAL25
  localparam int unsigned CLK_MHZ             = 10;    // readout clock
  localparam int unsigned STARTUP_US          = 250;   // current limit off after switch-on
  localparam int unsigned OVERCURRENT_US      = 25;    // over-current delay before switch-off
  localparam int unsigned SUPPLY_CARDS        = 7;
  localparam int unsigned HYBRIDS_PER_CARD    = 4;     // 2 P-side + 2 N-side
  localparam int unsigned MODULES             = SUPPLY_CARDS * HYBRIDS_PER_CARD / 2; // 14

  // ---- implementation choices ---------------------------------------------
  localparam int unsigned IR_W   = 4;    // JTAG instruction register length
  localparam int unsigned DAC_W  = 8;    // supply voltage DAC code
  localparam int unsigned ADC_W  = 10;   // monitor ADC code (one per channel)
  localparam int unsigned RO_W   = 12;   // readout delay / length counters
  localparam int unsigned NERR   = 3;    // error sources per chip

  // Instruction codes. BYPASS is all ones as IEEE 1149.1 requires, EXTEST all
  // zeros; the rest are private instructions of this design.
  typedef enum logic [IR_W-1:0] {
    IR_EXTEST   = 4'h0,
    IR_SAMPLE   = 4'h1,
    IR_CTRL     = 4'h4,   // control register (supply on/off, readout enable, masks, clear)
    IR_DAC      = 4'h5,   // supply voltage DAC
    IR_RODELAY  = 4'h6,   // readout token delay
    IR_ROLEN    = 4'h7,   // expected readout length (token return time)
    IR_STATUS   = 4'h8,   // status flags (read only)
    IR_ADC      = 4'h9,   // monitor ADC values (read only)
    IR_BYPASS   = 4'hF
  } ir_e;

  // Error sources, one bit each in the status flags and in the mask.
  typedef enum int unsigned {
    ERR_SUPPLY = 0,       // hybrid supply switched off by over-current
    ERR_TOKEN  = 1,       // return token not at the expected time
    ERR_PARITY = 2        // parity of a configuration register is wrong
  } err_e;

  // Control register layout (LSB first on TDI).
  typedef struct packed {
    logic            clr_err;    // while 1: sticky error flags are held clear
    logic [NERR-1:0] mask;       // 1 masks an error source from the error output
    logic            ro_en;      // readout control takes part in readouts
    logic            supply_on;  // hybrid supply on/off
  } ctrl_t;
  localparam int unsigned CTRL_W = $bits(ctrl_t);

  // Status register layout (read only).
  typedef struct packed {
    logic            supply_ok;  // supply running, start-up finished
    logic            hyb_in_chain; // hybrid JTAG chain is part of the chip chain
    logic            ro_busy;    // readout sequence in progress
    logic [NERR-1:0] err;        // error flags (unmasked)
  } status_t;
  localparam int unsigned STATUS_W = $bits(status_t);

  // Boundary scan register: cells on the chip's digital pins.
  localparam int unsigned BSR_IN  = 4;  // token_in, fast_clear_in, hyb_ret_token, error_in
  localparam int unsigned BSR_OUT = 3;  // hyb_token, sel_readout, error_out

endpackage
