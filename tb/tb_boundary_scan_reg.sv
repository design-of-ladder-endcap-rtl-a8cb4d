// tb_boundary_scan_reg: self-checking test of the boundary scan register.
// Checks that Capture-DR samples input pins and core outputs in cell order,
// that SAMPLE leaves the outputs to the core, and that EXTEST drives the
// output pins from the shifted pattern.
`timescale 1ns/1ps
module tb_boundary_scan_reg;
  localparam int NIN = 4, NOUT = 3, W = NIN + NOUT;
  int checks = 0, failures = 0;

  logic tck = 0, trst_n = 0, tlr = 0, sel = 0, extest = 0, cap = 0, sh = 0, upd = 0, tdi = 0;
  logic tdo;
  logic [NIN-1:0]  pin_in;
  logic [NOUT-1:0] core_out, pin_out;

  boundary_scan_reg #(.NIN(NIN), .NOUT(NOUT)) dut (.tck, .trst_n, .tlr, .sel, .extest,
    .capture_dr(cap), .shift_dr(sh), .update_dr(upd), .tdi, .tdo, .pin_in, .core_out, .pin_out);

  always #50 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input logic [W-1:0] din, output logic [W-1:0] dout);
    @(negedge tck); sel = 1; cap = 1;
    @(negedge tck); cap = 0; sh = 1;
    for (int i = 0; i < W; i++) begin
      tdi = din[i];
      dout[i] = tdo;
      @(negedge tck);
    end
    sh = 0; upd = 1;
    @(posedge tck); @(negedge tck); upd = 0;
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
    logic [W-1:0] rd, pat;
    pin_in = '0; core_out = '0;
    #120 trst_n = 1;
    for (int k = 0; k < 10; k++) begin
      pin_in   = NIN'($urandom);
      core_out = NOUT'($urandom);
      pat      = W'($urandom);
      extest   = 1'b0;
      scan(pat, rd);
      check(rd == {core_out, pin_in}, "capture of pins and core outputs");
      check(pin_out == core_out, "SAMPLE leaves outputs to the core");
      extest = 1'b1;
      #1;
      check(pin_out == pat[W-1:NIN], "EXTEST drives the shifted pattern");
      core_out = ~core_out;
      #1;
      check(pin_out == pat[W-1:NIN], "EXTEST ignores the core");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
