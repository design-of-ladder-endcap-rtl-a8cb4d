// readout_ctrl: token readout control for one front-end hybrid.
//
// The hybrid's six HAL25 chips are read out by passing a token along the chain;
// every chip puts its 128 channels on the analogue line, one per 10 MHz clock,
// and the last chip returns the token to the EndCap. The P- and N-side hybrids
// of a detector module share one ADC line, so their tokens must be sent one
// after the other and the analogue multiplexer switched halfway.
//
// This block does that for one hybrid. A token_in pulse starts a sequence:
// after the programmable token delay (ro_delay clock cycles) the token is sent
// to the hybrid (hyb_token, one cycle, ro_delay+1 cycles after token_in) and
// sel_readout switches the analogue multiplexer to this hybrid. The return
// token is expected exactly ro_len cycles after hyb_token was high. A return
// token at another time, a missing one, or one outside a readout sets token_err
// for one cycle and ends the sequence. sel_readout is high from the cycle of
// hyb_token up to and including the cycle the return token is due (ro_len+1
// cycles), shorter if the token comes back early. A P-side chip is programmed
// with ro_delay=0 and the N-side chip with ro_delay = P-side ro_len + 1, so
// that the two hybrids are read one after the other and the N-side select
// follows the P-side select without gap or overlap. Both numbers are programmable
// because bypassing a broken front-end chip shortens the readout.
//
// fast_clear aborts any sequence at once and clears the counters; the block is
// ready for a new token in the next cycle. token_in during a sequence is
// ignored. enable (hybrid powered and ready) gates the start of a sequence
// and aborts a running one without error.
// The token delay, the return time check, the multiplexer switching and the
// fast clear follow the design; the exact-cycle check, the cycle offsets and
// the handling of an early return token are this implementation's choices.
module readout_ctrl
  import endcap_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            token_in,
  input  logic            fast_clear,
  input  logic [RO_W-1:0] ro_delay,
  input  logic [RO_W-1:0] ro_len,
  input  logic            ret_token,
  output logic            hyb_token,
  output logic            sel_readout,
  output logic            busy,
  output logic            token_err,
  output logic            done
);

  typedef enum logic [1:0] {IDLE, DELAY, READ} st_e;
  st_e             st;
  logic [RO_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      cnt       <= '0;
      hyb_token <= 1'b0;
      token_err <= 1'b0;
      done      <= 1'b0;
    end else begin
      hyb_token <= 1'b0;
      token_err <= 1'b0;
      done      <= 1'b0;
      if (fast_clear) begin
        st  <= IDLE;
        cnt <= '0;
      end else begin
        unique case (st)
          IDLE: begin
            if (ret_token) token_err <= 1'b1;
            if (token_in && enable) begin
              if (ro_delay == '0) begin
                hyb_token <= 1'b1;
                st        <= READ;
                cnt       <= '0;
              end else begin
                st  <= DELAY;
                cnt <= ro_delay - 1'b1;
              end
            end
          end
          DELAY: begin
            if (!enable) begin
              st <= IDLE;
            end else begin
              if (ret_token) token_err <= 1'b1;
              if (cnt == '0) begin
                hyb_token <= 1'b1;
                st        <= READ;
                cnt       <= '0;
              end else begin
                cnt <= cnt - 1'b1;
              end
            end
          end
          READ: begin
            if (!enable) begin
              st <= IDLE;
            end else if (ret_token) begin
              token_err <= (cnt != ro_len);
              done      <= (cnt == ro_len);
              st        <= IDLE;
            end else if (cnt >= ro_len) begin
              token_err <= 1'b1;       // return token did not arrive in time
              st        <= IDLE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: st <= IDLE;
        endcase
      end
    end
  end

  assign sel_readout = (st == READ);
  assign busy        = (st != IDLE);

  // The token to the hybrid is a single-cycle pulse.
  a_token_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    hyb_token |=> !hyb_token);

endmodule
