// tb_jtag_tap_fsm: self-checking test of the TAP state machine.
// A reference model written as two next-state tables (TMS=0 / TMS=1) follows
// 4000 random TMS values; state and all decodes are compared after every
// rising TCK edge. It also checks that five TMS=1 cycles reach
// Test-Logic-Reset from every state, and that the asynchronous reset works
// between clock edges.
`timescale 1ns/1ps
module tb_jtag_tap_fsm;
  import jtag_bridge_pkg::*;

  logic tck = 1'b0, tms = 1'b1, async_reset = 1'b0;
  tap_state_e state;
  logic tlr, cdr, sdr, udr, cir, sir, uir;
  int checks = 0, failures = 0;

  jtag_tap_fsm dut (
    .tck(tck), .async_reset(async_reset), .tms(tms), .state(state),
    .test_logic_reset(tlr), .capture_dr(cdr), .shift_dr(sdr), .update_dr(udr),
    .capture_ir(cir), .shift_ir(sir), .update_ir(uir)
  );

  // reference: index = state code; values from the IEEE 1149.1 diagram
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int model;

  task automatic tick(input logic t);
    tms = t;
    #5 tck = 1'b1;
    model = t ? next1[model] : next0[model];
    #5 tck = 1'b0;
    checks++;
    if (int'(state) != model) begin
      failures++;
      $display("FAIL state %0d expected %0d", state, model);
    end
    checks++;
    if ({tlr, cdr, sdr, udr, cir, sir, uir} !=
        {model == 0, model == 3, model == 4, model == 8, model == 10, model == 11, model == 15}) begin
      failures++;
      $display("FAIL decodes in state %0d", model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #1 async_reset = 1'b1;
    #6 async_reset = 1'b0;
    checks++;
    if (state != TAP_TEST_LOGIC_RESET) failures++;
    for (int i = 0; i < 4000; i++) tick(1'($urandom));
    // five ones from every state
    for (int s = 0; s < 16; s++) begin
      // walk to state s by random TMS until reached
      while (model != s) tick(1'($urandom));
      repeat (5) tick(1'b1);
      checks++;
      if (state != TAP_TEST_LOGIC_RESET) begin
        failures++;
        $display("FAIL five TMS=1 from %0d", s);
      end
    end
    // asynchronous reset between edges
    tick(1'b0); tick(1'b1); tick(1'b0);
    #2 async_reset = 1'b1;
    #1;
    checks++;
    if (state != TAP_TEST_LOGIC_RESET) begin
      failures++;
      $display("FAIL async reset");
    end
    model = 0;
    #2 async_reset = 1'b0;
    tick(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
