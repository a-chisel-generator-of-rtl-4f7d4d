// jtag_bridge_pkg: types and constants shared by the JTAG to memory-mapped
// bus master bridge.
//
// Holds the nine user instruction codes (the instruction set of the bridge),
// the sixteen TAP controller states of IEEE 1149.1, the per-instruction
// transfer flags and the bus-protocol constants (AXI4 burst/response codes,
// TileLink-UL opcodes) used by the two master controllers. Instruction codes
// are given as 8-bit constants and compared after truncation to the
// instruction register width (4 bits by default), so every code fits.
// Any code not listed here is a no-operation.
package jtag_bridge_pkg;

  // ---- user instruction codes ------------------------------------------------
  localparam logic [7:0] INSTR_WRITE        = 8'h01; // single write
  localparam logic [7:0] INSTR_ADDR_ACQ     = 8'h02; // DR value -> address
  localparam logic [7:0] INSTR_DATA_ACQ     = 8'h03; // DR value -> write data
  localparam logic [7:0] INSTR_READ         = 8'h04; // single read
  localparam logic [7:0] INSTR_BLEN_ACQ     = 8'h08; // DR value -> burst length
  localparam logic [7:0] INSTR_BURST_WRITE  = 8'h09; // burst write
  localparam logic [7:0] INSTR_INDEX_ACQ    = 8'h0A; // DR value -> buffer index
  localparam logic [7:0] INSTR_IDX_DATA_ACQ = 8'h0B; // DR value -> buffer[index]
  localparam logic [7:0] INSTR_BURST_READ   = 8'h0C; // burst read

  // ---- IEEE 1149.1 TAP controller states ------------------------------------
  typedef enum logic [3:0] {
    TAP_TEST_LOGIC_RESET = 4'd0,
    TAP_RUN_TEST_IDLE    = 4'd1,
    TAP_SELECT_DR_SCAN   = 4'd2,
    TAP_CAPTURE_DR       = 4'd3,
    TAP_SHIFT_DR         = 4'd4,
    TAP_EXIT1_DR         = 4'd5,
    TAP_PAUSE_DR         = 4'd6,
    TAP_EXIT2_DR         = 4'd7,
    TAP_UPDATE_DR        = 4'd8,
    TAP_SELECT_IR_SCAN   = 4'd9,
    TAP_CAPTURE_IR       = 4'd10,
    TAP_SHIFT_IR         = 4'd11,
    TAP_EXIT1_IR         = 4'd12,
    TAP_PAUSE_IR         = 4'd13,
    TAP_EXIT2_IR         = 4'd14,
    TAP_UPDATE_IR        = 4'd15
  } tap_state_e;

  // ---- one flag per data-transfer instruction --------------------------------
  typedef struct packed {
    logic burst_read;
    logic burst_write;
    logic read;
    logic write;
  } xfer_flags_t;

  // ---- AXI4 constants ---------------------------------------------------------
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;

  // ---- TileLink-UL opcodes ----------------------------------------------------
  localparam logic [2:0] TL_A_PUT_FULL_DATA = 3'd0;
  localparam logic [2:0] TL_A_GET           = 3'd4;

endpackage
