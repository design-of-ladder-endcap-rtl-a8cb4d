// tb_alabuf: self-checking test of the analogue buffer model.
// Checks for both channels: reference level with no select, gain 2.6 on the
// P side, inverted gain on the N side, the output legs around 1.25 V, and the
// disable function.
`timescale 1ns/1ps
module tb_alabuf;
  int checks = 0, failures = 0;

  real  in_p [2], in_n [2], out_diff [2], out_p [2], out_n [2];
  logic sel_p [2], sel_n [2];
  logic disable_buf;

  alabuf dut (.in_p, .in_n, .sel_p, .sel_n, .disable_buf, .out_diff, .out_p, .out_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    disable_buf = 0;
    for (int c = 0; c < 2; c++) begin sel_p[c] = 0; sel_n[c] = 0; end
    for (int k = 0; k < 20; k++) begin
      for (int c = 0; c < 2; c++) begin
        in_p[c] = real'($urandom_range(0, 600)) / 1000.0 - 0.3;
        in_n[c] = real'($urandom_range(0, 600)) / 1000.0 - 0.3;
      end
      for (int c = 0; c < 2; c++) begin sel_p[c] = 0; sel_n[c] = 0; end
      #10;
      for (int c = 0; c < 2; c++)
        check(near(out_diff[c], 0.0) && near(out_p[c], 1.25) && near(out_n[c], 1.25), "reference level");
      sel_p[0] = 1; sel_n[1] = 1;
      #10;
      check(near(out_diff[0], 2.6 * in_p[0]), "P side gain 2.6");
      check(near(out_diff[1], -2.6 * in_n[1]), "N side inverted");
      check(near(out_p[0] - out_n[0], out_diff[0]) && near(out_p[0] + out_n[0], 2.5), "legs around 1.25 V");
      sel_p[0] = 0; sel_n[0] = 1; sel_n[1] = 0; sel_p[1] = 1;
      #10;
      check(near(out_diff[0], -2.6 * in_n[0]), "N side inverted, channel 0");
      check(near(out_diff[1], 2.6 * in_p[1]), "P side, channel 1");
      disable_buf = 1;
      #10;
      check(near(out_diff[0], 0.0) && near(out_diff[1], 0.0), "disabled");
      disable_buf = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
