// jtag_host_if: testbench JTAG host. Drives TCK/TMS/TDI like a cable would
// and samples TDO on the rising edge of TCK.
//
// Tasks (all start and end with TCK low, the TAP in Run-Test/Idle unless
// stated):
//   reset_tap()           five TCK cycles with TMS=1, then one with TMS=0
//   shift_ir(code)        IR scan of IR_W bits, LSB first
//   shift_dr(v, n, out)   DR scan of n bits, LSB first; out holds the n bits
//                         seen on TDO (first bit in out[0]) and `driven_ok` is
//                         cleared if TDO was not driven during any of them
//   idle(n)               n TCK cycles with TMS=0
`timescale 1ns/1ps
interface jtag_host_if #(
  parameter int unsigned IR_W     = 4,
  parameter int unsigned MAX_BITS = 64,
  parameter realtime     TCK_HALF = 33ns
);
  logic tck = 1'b0;
  logic tms = 1'b1;
  logic tdi = 1'b0;
  logic tdo;
  logic tdo_driven;
  bit   driven_ok;

  task automatic clock(input logic tms_v, input logic tdi_v, output logic tdo_v,
                       output logic drv_v);
    tms = tms_v;
    tdi = tdi_v;
    #(TCK_HALF);
    tdo_v = tdo;
    drv_v = tdo_driven;
    tck = 1'b1;
    #(TCK_HALF);
    tck = 1'b0;
  endtask

  task automatic step(input logic tms_v);
    logic d0, d1;
    clock(tms_v, 1'b0, d0, d1);
  endtask

  task automatic idle(input int n);
    repeat (n) step(1'b0);
  endtask

  task automatic reset_tap();
    repeat (5) step(1'b1);
    step(1'b0);
  endtask

  task automatic shift_ir(input logic [IR_W-1:0] code);
    logic d0, d1;
    step(1'b1); step(1'b1); step(1'b0); step(1'b0);
    for (int i = 0; i < IR_W; i++) clock(i == IR_W - 1, code[i], d0, d1);
    step(1'b1); step(1'b0);
  endtask

  task automatic shift_dr(input logic [MAX_BITS-1:0] v, input int n,
                          output logic [MAX_BITS-1:0] out);
    logic d, drv;
    out = '0;
    driven_ok = 1'b1;
    step(1'b1); step(1'b0); step(1'b0);
    for (int i = 0; i < n; i++) begin
      clock(i == n - 1, v[i], d, drv);
      out[i] = d;
      if (!drv) driven_ok = 1'b0;
    end
    step(1'b1); step(1'b0);
  endtask
endinterface
