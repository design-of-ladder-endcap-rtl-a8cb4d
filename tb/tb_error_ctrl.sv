// tb_error_ctrl: self-checking test of error flags, masks and the error line.
// Random stimuli are compared with a reference model written in the testbench:
// supply and parity flags follow their inputs, the token flag is sticky until
// clr_err, and error_out is error_in OR any unmasked flag.
`timescale 1ns/1ps
module tb_error_ctrl;
  import endcap_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic supply_err = 0, token_err = 0, parity_err = 0, clr_err = 0, error_in = 0;
  logic [NERR-1:0] mask = '0, flags;
  logic error_out;

  error_ctrl dut (.clk, .rst_n, .supply_err, .token_err, .parity_err, .mask, .clr_err,
    .error_in, .flags, .error_out);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic tok_ref;
    logic [NERR-1:0] f_ref;
    int n_out = 0, n_masked = 0;
    tok_ref = 0;
    #220 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      supply_err = ($urandom_range(0, 9) == 0);
      token_err  = ($urandom_range(0, 7) == 0);
      parity_err = ($urandom_range(0, 9) == 0);
      clr_err    = ($urandom_range(0, 11) == 0);
      error_in   = ($urandom_range(0, 15) == 0);
      mask       = NERR'($urandom);
      #1;
      f_ref = '0;
      f_ref[ERR_SUPPLY] = supply_err;
      f_ref[ERR_TOKEN]  = tok_ref;
      f_ref[ERR_PARITY] = parity_err;
      check(flags == f_ref, "flags");
      check(error_out == (error_in | |(f_ref & ~mask)), "error line");
      if (error_out) n_out++;
      if (|f_ref && !error_out) n_masked++;
      @(posedge clk);
      if (clr_err) tok_ref = 0; else if (token_err) tok_ref = 1;
    end
    check(n_out > 10 && n_masked > 10, "error line both raised and masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
