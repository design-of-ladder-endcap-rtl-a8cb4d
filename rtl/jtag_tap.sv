// jtag_tap: IEEE 1149.1 test access port controller with instruction register.
//
// The sixteen-state TAP state machine advances on the rising edge of TCK under
// TMS and is forced to Test-Logic-Reset by TRST_N (asynchronous, active low) or
// by five TCK cycles with TMS high. The instruction register (IR_W bits) shifts
// LSB first from TDI; in Capture-IR it loads the fixed pattern ...01 that the
// standard asks for, and in Update-IR (falling TCK edge) the shifted value
// becomes the current instruction. Test-Logic-Reset selects BYPASS; the
// standard would select IDCODE, which this chip does not have.
//
// Outputs are one-cycle strobes, valid while TCK is high-to-high, for the data
// registers: capture_dr, shift_dr and update_dr (update_dr is asserted in the
// Update-DR state; data registers load on the falling TCK edge there, as the
// standard requires). ir_tdo is the IR's serial output; the chip-level TDO
// multiplexer selects it in Shift-IR and retimes it on the falling edge.
// The ALICE SSD EndCap controls its chips over JTAG "according to the IEEE
// standard"; the state machine here follows that standard.
module jtag_tap
  import endcap_pkg::*;
(
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tms,
  input  logic            tdi,
  output ir_e             ir,          // current instruction
  output logic            ir_tdo,      // IR serial output (LSB of IR shift)
  output logic            shift_ir,
  output logic            capture_dr,
  output logic            shift_dr,
  output logic            update_dr,
  output logic            test_logic_reset
);

  typedef enum logic [3:0] {
    S_TLR, S_RTI, S_SEL_DR, S_CAP_DR, S_SH_DR, S_EX1_DR, S_PA_DR, S_EX2_DR, S_UPD_DR,
    S_SEL_IR, S_CAP_IR, S_SH_IR, S_EX1_IR, S_PA_IR, S_EX2_IR, S_UPD_IR
  } tap_e;

  tap_e state, nxt;

  always_comb begin
    unique case (state)
      S_TLR:    nxt = tms ? S_TLR    : S_RTI;
      S_RTI:    nxt = tms ? S_SEL_DR : S_RTI;
      S_SEL_DR: nxt = tms ? S_SEL_IR : S_CAP_DR;
      S_CAP_DR: nxt = tms ? S_EX1_DR : S_SH_DR;
      S_SH_DR:  nxt = tms ? S_EX1_DR : S_SH_DR;
      S_EX1_DR: nxt = tms ? S_UPD_DR : S_PA_DR;
      S_PA_DR:  nxt = tms ? S_EX2_DR : S_PA_DR;
      S_EX2_DR: nxt = tms ? S_UPD_DR : S_SH_DR;
      S_UPD_DR: nxt = tms ? S_SEL_DR : S_RTI;
      S_SEL_IR: nxt = tms ? S_TLR    : S_CAP_IR;
      S_CAP_IR: nxt = tms ? S_EX1_IR : S_SH_IR;
      S_SH_IR:  nxt = tms ? S_EX1_IR : S_SH_IR;
      S_EX1_IR: nxt = tms ? S_UPD_IR : S_PA_IR;
      S_PA_IR:  nxt = tms ? S_EX2_IR : S_PA_IR;
      S_EX2_IR: nxt = tms ? S_UPD_IR : S_SH_IR;
      S_UPD_IR: nxt = tms ? S_SEL_DR : S_RTI;
      default:  nxt = S_TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= S_TLR;
    else         state <= nxt;

  // Instruction shift register: capture ...01, shift LSB first.
  logic [IR_W-1:0] ir_sr;
  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                 ir_sr <= '0;
    else if (state == S_CAP_IR)  ir_sr <= IR_W'(1);
    else if (state == S_SH_IR)   ir_sr <= {tdi, ir_sr[IR_W-1:1]};

  // Instruction latch, updated on the falling edge in Update-IR.
  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)                ir <= IR_BYPASS;
    else if (state == S_TLR)    ir <= IR_BYPASS;
    else if (state == S_UPD_IR) ir <= ir_e'(ir_sr);

  assign ir_tdo           = ir_sr[0];
  assign shift_ir         = (state == S_SH_IR);
  assign capture_dr       = (state == S_CAP_DR);
  assign shift_dr         = (state == S_SH_DR);
  assign update_dr        = (state == S_UPD_DR);
  assign test_logic_reset = (state == S_TLR);

endmodule
