// jtag_drv_if: JTAG master for the testbenches.
//
// Drives TCK (period 2*HALF ns), TMS, TDI and TRST_N and samples TDO. TMS and
// TDI change while TCK is low; TDO is sampled just before each rising edge.
// Tasks leave the TAP in Run-Test/Idle. Vectors are shifted LSB first and are
// at most 1024 bits long.
`timescale 1ns/1ps
interface jtag_drv_if #(parameter int HALF = 50);
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1;
  logic tdo;

  task automatic tick(input logic m, input logic d, output logic o);
    tms = m;
    tdi = d;
    #HALF;
    o   = tdo;
    tck = 1'b1;
    #HALF;
    tck = 1'b0;
    #1;
  endtask

  // Asynchronous reset, then five TMS=1 clocks, then Run-Test/Idle.
  task automatic reset();
    logic o;
    trst_n = 1'b0;
    #(2*HALF);
    trst_n = 1'b1;
    repeat (5) tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);
  endtask

  task automatic idle(input int n);
    logic o;
    repeat (n) tick(1'b0, 1'b0, o);
  endtask

  // From Run-Test/Idle: shift len bits through IR (ir=1) or DR (ir=0).
  task automatic shift(input bit ir, input logic [1023:0] din, input int len,
                       output logic [1023:0] dout);
    logic o;
    dout = '0;
    tick(1'b1, 1'b0, o);            // Select-DR
    if (ir) tick(1'b1, 1'b0, o);    // Select-IR
    tick(1'b0, 1'b0, o);            // Capture
    tick(1'b0, 1'b0, o);            // Shift
    for (int i = 0; i < len; i++) begin
      tick((i == len - 1), din[i], o);
      dout[i] = o;
    end
    tick(1'b1, 1'b0, o);            // Update
    tick(1'b0, 1'b0, o);            // Run-Test/Idle
  endtask

  task automatic shift_ir(input logic [1023:0] din, input int len, output logic [1023:0] dout);
    shift(1'b1, din, len, dout);
  endtask

  task automatic shift_dr(input logic [1023:0] din, input int len, output logic [1023:0] dout);
    shift(1'b0, din, len, dout);
  endtask
endinterface
