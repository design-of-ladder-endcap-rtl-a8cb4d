// tb_readout_ctrl: self-checking test of the token readout controller.
// A front-end chain model returns the token a programmable number of cycles
// after it received it. Checks the token delay (ro_delay+1 cycles), the select
// window, a correct return (done, no error), early and late returns, a missing
// return, a stray return token, fast clear in mid-readout and the enable gate.
`timescale 1ns/1ps
module tb_readout_ctrl;
  import endcap_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, enable = 1, token_in = 0, fast_clear = 0, ret_token = 0;
  logic [RO_W-1:0] ro_delay, ro_len;
  logic hyb_token, sel_readout, busy, token_err, done;

  readout_ctrl dut (.clk, .rst_n, .enable, .token_in, .fast_clear, .ro_delay, .ro_len,
    .ret_token, .hyb_token, .sel_readout, .busy, .token_err, .done);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Chain model: returns the token 'ret_after' cycles after seeing hyb_token
  // (0 = never).
  int ret_after = 0;
  int cyc = 0, t_tok = -1, t_ret = -1, n_err = 0, n_done = 0, sel_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (hyb_token) t_tok = cyc;
    if (token_err) n_err++;
    if (done) n_done++;
    if (sel_readout) sel_cycles++;
  end
  initial forever begin
    @(posedge clk);
    if (hyb_token && ret_after > 0) begin
      fork
        begin
          automatic int d = ret_after;
          repeat (d - 1) @(posedge clk);
          #1 ret_token = 1;
          @(posedge clk);
          #1 ret_token = 0;
        end
      join_none
    end
  end

  // Sends one token and waits for the sequence to end.
  task automatic run(input int dly, input int len, input int ret, output int tok_lat);
    int t0;
    ro_delay = RO_W'(dly); ro_len = RO_W'(len); ret_after = ret;
    n_err = 0; n_done = 0; sel_cycles = 0; t_tok = -1;
    @(negedge clk); token_in = 1; t0 = cyc + 1;
    @(negedge clk); token_in = 0;
    repeat (dly + len + 20) @(negedge clk);
    tok_lat = t_tok - t0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    ro_delay = 0; ro_len = 10;
    #220 rst_n = 1;
    // correct readouts with several delays and lengths
    for (int k = 0; k < 6; k++) begin
      int dly, len;
      dly = (k == 0) ? 0 : int'($urandom_range(1, 40));
      len = int'($urandom_range(2, 60));
      run(dly, len, len, lat);
      check(lat == dly + 1, $sformatf("token delay %0d gives latency %0d", dly, lat));
      check(n_done == 1 && n_err == 0, "return at the expected time");
      check(sel_cycles == len + 1, $sformatf("select window %0d cycles for length %0d", sel_cycles, len));
      check(!busy, "idle after readout");
    end
    // full hybrid: 6 chips x 128 channels
    run(0, FE_CHIPS_PER_HYBRID * FE_CHANNELS, FE_CHIPS_PER_HYBRID * FE_CHANNELS, lat);
    check(n_done == 1 && n_err == 0, "768-cycle readout");
    // early return token
    run(3, 20, 15, lat);
    check(n_err == 1 && n_done == 0, "early return token flagged");
    // late return token: error at the expected time, and the stray token too
    run(3, 20, 25, lat);
    check(n_err == 2 && n_done == 0, "late return token flagged");
    // missing return token
    run(0, 30, 0, lat);
    check(n_err == 1 && n_done == 0, "missing return token flagged");
    // fast clear in the middle of a readout
    ro_delay = 5; ro_len = 100; ret_after = 0; n_err = 0;
    @(negedge clk); token_in = 1; @(negedge clk); token_in = 0;
    repeat (30) @(negedge clk);
    check(sel_readout && busy, "readout running before fast clear");
    fast_clear = 1; @(negedge clk); fast_clear = 0;
    check(!sel_readout && !busy, "fast clear stops the readout in one cycle");
    repeat (120) @(negedge clk);
    check(n_err == 0, "no error after fast clear");
    run(2, 12, 12, lat);
    check(n_done == 1 && n_err == 0 && lat == 3, "ready for a new readout after fast clear");
    // disabled: token ignored
    enable = 0;
    run(0, 10, 10, lat);
    check(t_tok == -1 && n_done == 0, "no token while disabled");
    enable = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
