// jtag_controller: the TCK-domain half of the bridge. It turns the serial
// JTAG stream into a parallel instruction code and a parallel data word for
// the bus controller, and shifts words read from the bus back out on TDO.
//
// How it works
//   * A standard TAP state machine (jtag_tap_fsm) follows TMS on rising TCK.
//   * Instruction path: Capture-IR loads the IR shift register with ...0001,
//     Shift-IR shifts TDI in at the MSB (the first bit sent is the LSB), and
//     Update-IR copies the shift register into the instruction register.
//   * Data path: one DR shift register of DR_W bits, shifted the same way,
//     copied into the data register on Update-DR. Capture-DR loads it with the
//     read buffer, so the word last read from the bus is shifted out on TDO
//     while a new word is shifted in.
//   * Every Update-IR and Update-DR, and every entry into Test-Logic-Reset
//     that changes the instruction, flips update_tgl. The bus side
//     synchronizes this toggle and then samples instruction and data_out,
//     which stay stable until the next toggle.
//   * Read return: the bus side raises valid_in with data_in. When the read
//     buffer is empty the controller latches data_in and raises received_in,
//     which it lowers again when valid_in falls (four-phase handshake).
//     received_end is high while the buffer is empty; it goes low when a word
//     is latched and high again at the Update-DR of the first DR scan that
//     shifted all DATA_W bits of that word out on TDO.
//   * TDO: tdo_data and tdo_driven change on the falling edge of TCK.
//     tdo_driven is high during Shift-DR and Shift-IR.
//
// Timing: instruction/data_out/update_tgl change on the rising TCK edge that
// leaves the Update state. valid_in is synchronized into TCK with two flops,
// so the handshake advances only while TCK is running (keep toggling TCK in
// Run-Test/Idle while waiting for a read).
//
// The TAP, the shift and update registers, the split of TDO into data and
// driven, the falling-edge TDO and the asynchronous reset follow the bridge
// as published. The toggle-based transfer into the system clock domain, the
// exact meaning given to received_in / received_end and the capture values
// are this implementation's choices.
module jtag_controller
  import jtag_bridge_pkg::*;
#(
  parameter int unsigned      IR_W       = 4,
  parameter int unsigned      DATA_W     = 32,
  parameter int unsigned      DR_W       = 32,
  parameter logic [IR_W-1:0]  INIT_INSTR = '0
) (
  // JTAG pins
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo_data,
  output logic              tdo_driven,
  input  logic              async_reset,
  // to the bus controller (TCK domain, stable between toggles)
  output logic [IR_W-1:0]   instruction,
  output logic [DR_W-1:0]   data_out,
  output logic              update_tgl,
  // from / to the bus controller (read data return)
  input  logic [DATA_W-1:0] data_in,
  input  logic              valid_in,
  output logic              received_in,
  output logic              received_end,
  // debug view of the TAP state
  output tap_state_e        tap_state
);
  localparam int unsigned CNT_W = $clog2(DR_W + 1);

  logic tlr, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;

  jtag_tap_fsm u_tap (
    .tck              (tck),
    .async_reset      (async_reset),
    .tms              (tms),
    .state            (tap_state),
    .test_logic_reset (tlr),
    .capture_dr       (cap_dr),
    .shift_dr         (sh_dr),
    .update_dr        (upd_dr),
    .capture_ir       (cap_ir),
    .shift_ir         (sh_ir),
    .update_ir        (upd_ir)
  );

  logic valid_s;
  cdc_sync u_sync_valid (.clk(tck), .rst(async_reset), .d(valid_in), .q(valid_s));

  logic [IR_W-1:0]   ir_shift;
  logic [DR_W-1:0]   dr_shift;
  logic [DATA_W-1:0] rd_buf;
  logic              rd_full;
  logic              scan_has_read;
  logic [CNT_W-1:0]  shift_cnt;

  // Instruction and data paths.
  always_ff @(posedge tck or posedge async_reset) begin
    if (async_reset) begin
      ir_shift      <= '0;
      dr_shift      <= '0;
      instruction   <= INIT_INSTR;
      data_out      <= '0;
      update_tgl    <= 1'b0;
      scan_has_read <= 1'b0;
      shift_cnt     <= '0;
    end else begin
      if (tlr && instruction != INIT_INSTR) begin
        instruction <= INIT_INSTR;
        update_tgl  <= ~update_tgl;
      end
      if (cap_ir) ir_shift <= IR_W'(1);
      if (sh_ir)  ir_shift <= {tdi, ir_shift[IR_W-1:1]};
      if (upd_ir) begin
        instruction <= ir_shift;
        update_tgl  <= ~update_tgl;
      end
      if (cap_dr) begin
        dr_shift      <= DR_W'(rd_buf);
        scan_has_read <= rd_full;
        shift_cnt     <= '0;
      end
      if (sh_dr) begin
        dr_shift <= {tdi, dr_shift[DR_W-1:1]};
        if (shift_cnt != CNT_W'(DR_W)) shift_cnt <= shift_cnt + 1'b1;
      end
      if (upd_dr) begin
        data_out      <= dr_shift;
        update_tgl    <= ~update_tgl;
        scan_has_read <= 1'b0;
      end
    end
  end

  // Read-data return buffer and handshake.
  always_ff @(posedge tck or posedge async_reset) begin
    if (async_reset) begin
      rd_buf      <= '0;
      rd_full     <= 1'b0;
      received_in <= 1'b0;
    end else begin
      if (valid_s && !received_in && !rd_full) begin
        rd_buf      <= data_in;
        rd_full     <= 1'b1;
        received_in <= 1'b1;
      end else if (!valid_s) begin
        received_in <= 1'b0;
      end
      if (upd_dr && scan_has_read && shift_cnt >= CNT_W'(DATA_W))
        rd_full <= 1'b0;
    end
  end

  assign received_end = ~rd_full;

  // TDO is launched on the falling edge of TCK.
  always_ff @(negedge tck or posedge async_reset) begin
    if (async_reset) begin
      tdo_data   <= 1'b0;
      tdo_driven <= 1'b0;
    end else begin
      tdo_data   <= sh_ir ? ir_shift[0] : dr_shift[0];
      tdo_driven <= sh_ir | sh_dr;
    end
  end
endmodule
