// alabuf: behavioural model of the analogue buffer chip (ALice Analogue BUffer).
// This is not synthesizable logic: it models an analogue circuit with real
// numbers so that the digital EndCap can be simulated with its analogue path.
//
// The chip has two identical channels, one per detector module. Each channel
// has an analogue multiplexer that connects either the P-side hybrid output
// (sel_p) or the N-side hybrid output (sel_n) of the module to a differential
// buffer; with neither selected both inputs sit at the reference voltage, so
// the output stays at its zero level between readouts and does not drift.
// The N-side signal is inverted so that both halves of the module's readout
// have the same polarity on the one ADC line. The buffer amplifies by GAIN
// (2.6) and drives the cable differentially around the zero level VREF (half
// the 2.5 V supply); disable switches the buffers off between readouts to save
// power (output then reads 0 V differential here).
//
// Inputs are the AC-coupled hybrid signals in volts relative to their
// baseline; out_diff is the differential output voltage, out_p/out_n the two
// legs. If both selects are high the P side wins (a state the readout never
// produces). Gain, reference, inversion and the multiplexer follow the design;
// the ideal, instantaneous response is this model's simplification.
module alabuf #(
  parameter real GAIN = 2.6,
  parameter real VREF = 1.25
) (
  input  real  in_p [2],
  input  real  in_n [2],
  input  logic sel_p [2],
  input  logic sel_n [2],
  input  logic disable_buf,
  output real  out_diff [2],
  output real  out_p [2],
  output real  out_n [2]
);

  for (genvar c = 0; c < 2; c++) begin : g_ch
    real v_mux;
    always_comb begin
      if (sel_p[c])      v_mux = in_p[c];
      else if (sel_n[c]) v_mux = -in_n[c];
      else               v_mux = 0.0;       // multiplexer at the reference
      out_diff[c] = disable_buf ? 0.0 : GAIN * v_mux;
      out_p[c]    = VREF + out_diff[c] / 2.0;
      out_n[c]    = VREF - out_diff[c] / 2.0;
    end
  end

endmodule
