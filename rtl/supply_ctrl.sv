// supply_ctrl: digital control of one hybrid (or chip) power supply.
//
// The supply is a regulator with an external pass transistor and a sense
// resistor. Its control part, modelled here, switches the output on and off,
// blanks the current limit while the load capacitance charges, and switches
// the output off after a sustained over-current (single event latch-up).
//
// When supply_on rises the output is enabled (out_en) and the start-up timer
// runs STARTUP_CYCLES clock cycles (250 us at 10 MHz): during it the current
// limit is off (ilim_en low), the over-current input is ignored and po_reset is
// asserted for the powered electronics. After the timer, ok goes high.
// An over-current seen while the limit is on starts the over-current timer;
// when over-current has lasted OC_CYCLES cycles (25 us) the output is switched
// off and the error latch (err) is set. If over-current goes away earlier the
// timer restarts from zero. The latch holds the supply off until supply_on is
// taken low; the next switch-on clears it (the power-on reset of the start-up
// circuit clears the error latch).
//
// Timings are counted on the 10 MHz readout clock here; the real circuit uses
// analogue timers. The two delays and the role of the power-on reset follow
// the design; counting them in clock cycles, the restart rule of the
// over-current timer and the off/on sequence that clears the latch are this
// implementation's choices.
module supply_ctrl #(
  parameter int unsigned STARTUP_CYCLES = 2500,
  parameter int unsigned OC_CYCLES      = 250
) (
  input  logic clk,
  input  logic rst_n,
  input  logic supply_on,    // requested state (from the control register)
  input  logic overcurrent,  // current sense comparator
  output logic out_en,       // enable of the regulator output
  output logic ilim_en,      // current limit active
  output logic po_reset,     // power-on reset for the supplied electronics
  output logic ok,           // running normally
  output logic err           // switched off by over-current (latched)
);

  localparam int unsigned TW = $clog2(STARTUP_CYCLES > OC_CYCLES ? STARTUP_CYCLES + 1 : OC_CYCLES + 1);

  typedef enum logic [1:0] {OFF, STARTUP, RUN, TRIPPED} st_e;
  st_e           st;
  logic [TW-1:0] t_start, t_oc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= OFF;
      t_start <= '0;
      t_oc    <= '0;
      err     <= 1'b0;
    end else begin
      unique case (st)
        OFF: begin
          t_oc <= '0;
          if (supply_on) begin
            st      <= STARTUP;
            t_start <= '0;
            err     <= 1'b0;          // power-on reset clears the error latch
          end
        end
        STARTUP: begin
          if (!supply_on)                          st <= OFF;
          else if (t_start == TW'(STARTUP_CYCLES - 1)) st <= RUN;
          else                                     t_start <= t_start + 1'b1;
        end
        RUN: begin
          if (!supply_on) begin
            st <= OFF;
          end else if (overcurrent) begin
            if (t_oc == TW'(OC_CYCLES - 1)) begin
              st  <= TRIPPED;
              err <= 1'b1;
            end else begin
              t_oc <= t_oc + 1'b1;
            end
          end else begin
            t_oc <= '0;
          end
        end
        TRIPPED: if (!supply_on) st <= OFF;
        default: st <= OFF;
      endcase
    end
  end

  assign out_en   = (st == STARTUP) || (st == RUN);
  assign ilim_en  = (st == RUN);
  assign po_reset = (st == STARTUP);
  assign ok       = (st == RUN);

  a_off_when_err: assert property (@(posedge clk) disable iff (!rst_n) err |-> !out_en);

endmodule
