// sync2: two-flip-flop synchroniser for quasi-static level signals that cross
// from the JTAG clock domain into the readout clock domain. Each bit is
// synchronised on its own, so a multi-bit value is only safe when it changes
// while the receiving logic does not use it. Resets to RESET.
module sync2 #(
  parameter int unsigned  W     = 1,
  parameter logic [W-1:0] RESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {q, meta} <= {RESET, RESET};
    else        {q, meta} <= {meta, d};
endmodule
