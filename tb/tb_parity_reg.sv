// tb_parity_reg: self-checking test of the parity-protected JTAG register.
// Drives the Capture/Shift/Update strobes directly. Checks the reset value,
// write and read-back of random words, that an unselected register keeps its
// value, that a single flipped bit in the held word is flagged as a parity
// error, and that rewriting the register clears it.
`timescale 1ns/1ps
module tb_parity_reg;
  localparam int W = 12;
  localparam logic [W-1:0] RST = 12'h300;
  int checks = 0, failures = 0;

  logic tck = 0, trst_n = 0, tlr = 0, sel = 0, cap = 0, sh = 0, upd = 0, tdi = 0;
  logic tdo, perr;
  logic [W-1:0] q;

  parity_reg #(.W(W), .RESET(RST)) dut (.tck, .trst_n, .tlr, .sel, .capture_dr(cap),
    .shift_dr(sh), .update_dr(upd), .tdi, .tdo, .q, .parity_err(perr));

  always #50 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One DR scan: capture, W shifts, update. Returns the captured word.
  task automatic scan(input logic s, input logic [W-1:0] din, output logic [W-1:0] dout);
    @(negedge tck); sel = s; cap = 1;
    @(negedge tck); cap = 0; sh = 1;
    for (int i = 0; i < W; i++) begin
      tdi = din[i];
      dout[i] = tdo;
      @(negedge tck);
    end
    sh = 0; upd = 1;
    @(posedge tck); @(negedge tck); upd = 0;   // update on this falling edge
    #1;
    sel = 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] rd, prev;
    #120 trst_n = 1;
    check(q == RST && !perr, "reset value, no parity error");
    prev = RST;
    for (int k = 0; k < 20; k++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      scan(1'b1, v, rd);
      check(rd == prev, "read-back of previous value");
      check(q == v, "written value");
      check(!perr, "no parity error after write");
      prev = v;
    end
    scan(1'b0, ~prev, rd);
    check(q == prev, "unselected register keeps its value");
    // single event upset in the held word
    for (int b = 0; b < W; b += 5) begin
      dut.q[b] = ~dut.q[b];
      #1;
      check(perr, "flipped bit detected");
      scan(1'b1, prev, rd);
      check(!perr && q == prev, "rewrite clears the parity error");
    end
    dut.par = ~dut.par;
    #1;
    check(perr, "flipped parity bit detected");
    // Test-Logic-Reset restores the reset value
    @(negedge tck); tlr = 1; @(negedge tck); tlr = 0; #1;
    check(q == RST && !perr, "Test-Logic-Reset loads reset value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
