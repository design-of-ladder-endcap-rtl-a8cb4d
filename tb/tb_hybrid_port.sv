// tb_hybrid_port: self-checking test of the hybrid port.
// A 6-bit shift register stands in for the hybrid's JTAG chain. Checks that
// with the supply off the drivers are disabled, the outputs held low and the
// hybrid bypassed (chain delay 0), that while starting up only the reset
// reaches the hybrid, and that with the supply OK the hybrid is back in the
// chain (chain delay 6) and token and fast clear pass.
`timescale 1ns/1ps
module tb_hybrid_port;
  int checks = 0, failures = 0;

  logic tck = 0, trst_n = 0, hyb_pwr = 0, hyb_ok = 0;
  logic token = 0, fast_clear = 0, po_reset = 0, tms = 0, tdi = 0;
  logic drv_en, hyb_token, hyb_fast_clear, hyb_reset, hyb_tck, hyb_tms, hyb_tdi, hyb_tdo;
  logic tdo, in_chain;

  hybrid_port dut (.tck, .trst_n, .hyb_pwr, .hyb_ok, .token, .fast_clear, .po_reset,
    .tms, .tdi, .drv_en, .hyb_token, .hyb_fast_clear, .hyb_reset, .hyb_tck, .hyb_tms,
    .hyb_tdi, .hyb_tdo, .tdo, .in_chain);

  // hybrid JTAG chain model: 6 bypass bits, TDO on the falling edge
  logic [5:0] hsr = '0;
  always @(posedge hyb_tck) hsr <= {hyb_tdi, hsr[5:1]};
  always @(negedge hyb_tck) hyb_tdo <= hsr[0];
  initial hyb_tdo = 0;

  always #50 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send a single 1 through the chain and count the TCK cycles until it shows
  task automatic chain_delay(output int d);
    d = -1;
    for (int i = 0; i < 20; i++) begin
      @(negedge tck);
      tdi = (i == 0);
      #1;
      if (tdo && d < 0) d = i;
    end
    tdi = 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    #120 trst_n = 1;
    token = 1; fast_clear = 1; po_reset = 1; tms = 1;
    @(negedge tck); #1;
    check(!drv_en && !hyb_token && !hyb_fast_clear && !hyb_reset && !hyb_tms, "off: drivers disabled, outputs low");
    check(!in_chain, "off: hybrid out of chain");
    tms = 0;
    chain_delay(d);
    check(d == 0, $sformatf("off: chain delay %0d", d));
    hyb_pwr = 1;
    @(negedge tck); #1;
    check(drv_en && hyb_reset && !in_chain, "start-up: drivers on, reset, still bypassed");
    po_reset = 0; hyb_ok = 1;
    @(negedge tck); @(negedge tck); #1;
    check(in_chain && hyb_token && hyb_fast_clear && !hyb_reset, "ok: in chain, token passes");
    chain_delay(d);
    check(d == 6, $sformatf("ok: chain delay %0d", d));
    // latch-up: supply off again
    hyb_pwr = 0; hyb_ok = 0;
    @(negedge tck); @(negedge tck); #1;
    check(!drv_en && !hyb_token && !in_chain, "latch-up: bypassed, drivers off");
    chain_delay(d);
    check(d == 0, "latch-up: chain uninterrupted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
