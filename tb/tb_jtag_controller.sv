// tb_jtag_controller: self-checking test of the TCK-domain controller.
// A JTAG host (jtag_host_if) scans instructions and data words; the test
// checks the parallel instruction and data registers, the update toggle, the
// read-return handshake (valid_in / received_in / received_end), the word
// shifted out on TDO with TDO driven, a short scan that must not release the
// read buffer, Test-Logic-Reset restoring the initial instruction, and the
// asynchronous reset.
`timescale 1ns/1ps
module tb_jtag_controller;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 32, DR_W = 32;
  localparam logic [IR_W-1:0] INIT = 4'hF;

  jtag_host_if #(.IR_W(IR_W), .MAX_BITS(64)) jh ();

  logic              async_reset = 1'b0;
  logic [IR_W-1:0]   instruction;
  logic [DR_W-1:0]   data_out;
  logic              update_tgl;
  logic [DATA_W-1:0] data_in = '0;
  logic              valid_in = 1'b0;
  logic              received_in, received_end;
  tap_state_e        tap_state;
  int checks = 0, failures = 0;

  jtag_controller #(.IR_W(IR_W), .DATA_W(DATA_W), .DR_W(DR_W), .INIT_INSTR(INIT)) dut (
    .tck(jh.tck), .tms(jh.tms), .tdi(jh.tdi),
    .tdo_data(jh.tdo), .tdo_driven(jh.tdo_driven), .async_reset(async_reset),
    .instruction(instruction), .data_out(data_out), .update_tgl(update_tgl),
    .data_in(data_in), .valid_in(valid_in),
    .received_in(received_in), .received_end(received_end), .tap_state(tap_state)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] out;
  logic        t0;
  logic [31:0] v, rd;

  initial begin
    #5 async_reset = 1'b1;
    #20 async_reset = 1'b0;
    check(instruction == INIT && update_tgl == 1'b0 && received_end, "reset values");
    jh.reset_tap();
    check(tap_state == TAP_RUN_TEST_IDLE, "in Run-Test/Idle after reset sequence");

    // instruction scans
    for (int i = 0; i < 8; i++) begin
      logic [3:0] code;
      code = 4'($urandom);
      t0 = update_tgl;
      jh.shift_ir(code);
      check(instruction == code, $sformatf("instruction %h got %h", code, instruction));
      check(update_tgl != t0, "toggle on Update-IR");
      check(tap_state == TAP_RUN_TEST_IDLE, "back in idle after IR scan");
    end

    // data scans; no read pending, so TDO returns the (empty) buffer
    for (int i = 0; i < 8; i++) begin
      v = $urandom;
      t0 = update_tgl;
      jh.shift_dr(64'(v), DR_W, out);
      check(data_out == v, $sformatf("data_out %h expected %h", data_out, v));
      check(update_tgl != t0, "toggle on Update-DR");
      check(out[31:0] == 32'h0, "empty buffer reads zero");
      check(jh.driven_ok, "TDO driven during Shift-DR");
    end
    check(!jh.tdo_driven, "TDO not driven outside shift");

    // read-return handshake
    for (int i = 0; i < 4; i++) begin
      rd = $urandom;
      data_in  = rd;
      valid_in = 1'b1;
      jh.idle(4);
      check(received_in && !received_end, "word latched and acknowledged");
      // a second word must wait while the buffer is full
      valid_in = 1'b0;
      jh.idle(4);
      check(!received_in, "acknowledge released");
      data_in  = ~rd;
      valid_in = 1'b1;
      jh.idle(4);
      check(!received_in, "no acknowledge while buffer is full");
      valid_in = 1'b0;
      // a short scan does not release the buffer
      jh.shift_dr(64'h0, 16, out);
      check(out[15:0] == rd[15:0], "first half on TDO");
      check(!received_end, "buffer kept after a short scan");
      v = $urandom;
      jh.shift_dr(64'(v), DR_W, out);
      check(out[31:0] == rd, $sformatf("TDO word %h expected %h", out[31:0], rd));
      check(jh.driven_ok, "TDO driven during read-out");
      check(received_end, "buffer released after full scan");
      check(data_out == v, "read-out scan still updates data");
    end

    // Test-Logic-Reset restores the initial instruction and signals it
    jh.shift_ir(4'h2);
    t0 = update_tgl;
    jh.reset_tap();
    check(instruction == INIT && update_tgl != t0, "TLR restores initial instruction");

    // asynchronous reset in the middle of a scan
    jh.step(1'b1); jh.step(1'b0); jh.step(1'b0);
    #3 async_reset = 1'b1;
    #3;
    check(tap_state == TAP_TEST_LOGIC_RESET, "async reset forces TLR");
    async_reset = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
