// jtag_tap_fsm: the IEEE 1149.1 Test Access Port state machine.
//
// Sixteen states, advanced on every rising edge of TCK and steered only by
// TMS, exactly as the standard TAP diagram: from Run-Test/Idle, TMS=1 walks
// to Select-DR-Scan and, with a second 1, to Select-IR-Scan; TMS=0 then enters
// Capture, Shift (held while TMS=0), Exit1, optional Pause/Exit2, and Update,
// from which TMS=0 returns to Run-Test/Idle and TMS=1 starts the next scan.
// Five consecutive TCK cycles with TMS=1 reach Test-Logic-Reset from any
// state. The asynchronous reset input (active high) forces Test-Logic-Reset
// at once.
//
// Outputs: the current state and one-hot style decodes for the register
// actions of the JTAG controller (capture, shift, update of the data and
// instruction paths). Each decode is high during the TCK cycle the FSM is in
// that state, so the controller acts on the rising edge that ends it.
module jtag_tap_fsm
  import jtag_bridge_pkg::*;
(
  input  logic       tck,
  input  logic       async_reset,
  input  logic       tms,
  output tap_state_e state,
  output logic       test_logic_reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);
  tap_state_e next;

  always_comb begin
    unique case (state)
      TAP_TEST_LOGIC_RESET: next = tms ? TAP_TEST_LOGIC_RESET : TAP_RUN_TEST_IDLE;
      TAP_RUN_TEST_IDLE:    next = tms ? TAP_SELECT_DR_SCAN   : TAP_RUN_TEST_IDLE;
      TAP_SELECT_DR_SCAN:   next = tms ? TAP_SELECT_IR_SCAN   : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR:       next = tms ? TAP_EXIT1_DR         : TAP_SHIFT_DR;
      TAP_SHIFT_DR:         next = tms ? TAP_EXIT1_DR         : TAP_SHIFT_DR;
      TAP_EXIT1_DR:         next = tms ? TAP_UPDATE_DR        : TAP_PAUSE_DR;
      TAP_PAUSE_DR:         next = tms ? TAP_EXIT2_DR         : TAP_PAUSE_DR;
      TAP_EXIT2_DR:         next = tms ? TAP_UPDATE_DR        : TAP_SHIFT_DR;
      TAP_UPDATE_DR:        next = tms ? TAP_SELECT_DR_SCAN   : TAP_RUN_TEST_IDLE;
      TAP_SELECT_IR_SCAN:   next = tms ? TAP_TEST_LOGIC_RESET : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR:       next = tms ? TAP_EXIT1_IR         : TAP_SHIFT_IR;
      TAP_SHIFT_IR:         next = tms ? TAP_EXIT1_IR         : TAP_SHIFT_IR;
      TAP_EXIT1_IR:         next = tms ? TAP_UPDATE_IR        : TAP_PAUSE_IR;
      TAP_PAUSE_IR:         next = tms ? TAP_EXIT2_IR         : TAP_PAUSE_IR;
      TAP_EXIT2_IR:         next = tms ? TAP_UPDATE_IR        : TAP_SHIFT_IR;
      TAP_UPDATE_IR:        next = tms ? TAP_SELECT_DR_SCAN   : TAP_RUN_TEST_IDLE;
      default:              next = TAP_TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or posedge async_reset) begin
    if (async_reset) state <= TAP_TEST_LOGIC_RESET;
    else             state <= next;
  end

  assign test_logic_reset = (state == TAP_TEST_LOGIC_RESET);
  assign capture_dr       = (state == TAP_CAPTURE_DR);
  assign shift_dr         = (state == TAP_SHIFT_DR);
  assign update_dr        = (state == TAP_UPDATE_DR);
  assign capture_ir       = (state == TAP_CAPTURE_IR);
  assign shift_ir         = (state == TAP_SHIFT_IR);
  assign update_ir        = (state == TAP_UPDATE_IR);
endmodule
