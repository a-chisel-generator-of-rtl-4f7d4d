// tilelink_controller: system-clock half of the bridge with a TileLink-UL
// master port (only the mandatory channels A and D).
//
// It shares the instruction handling (bridge_cmd_regs) and the read-return
// handshake with the AXI4 controller; only the bus state machine differs:
//   S_IDLE             wait for a transfer flag
//   S_SEND_A           A valid with PutFullData (write) or Get (read) at the
//                      current address until A ready (or timeout -> idle)
//   S_RESET_COUNTER_A  one cycle, clears the timeout counter
//   S_WAIT_D           D ready high until D valid (or timeout -> idle); for a
//                      read the AccessAckData payload is captured
//   S_DATA_FORWARD     read word offered to the JTAG controller until it
//                      confirms reception
// Bursts are consecutive single-beat transfers to addr + i*DATA_W/8, the
// FSM going back to S_SEND_A until the burst counter reaches the length.
// A timeout aborts the instruction; accesses outside [ADDR_BASE, ADDR_LAST]
// are not issued.
//
// TileLink details chosen here: a_size = log2(DATA_W/8), full mask, source
// 0, param 0, corrupt 0; d_denied/d_corrupt are not checked. The published
// bridge says only that this FSM follows the same principles as the AXI4 one;
// the state list above is this implementation's.
module tilelink_controller
  import jtag_bridge_pkg::*;
#(
  parameter int unsigned       IR_W       = 4,
  parameter int unsigned       DATA_W     = 32,
  parameter int unsigned       ADDR_W     = 32,
  parameter int unsigned       DR_W       = 32,
  parameter int unsigned       SRC_W      = 4,
  parameter int unsigned       SINK_W     = 1,
  parameter int unsigned       SIZE_W     = 3,
  parameter int unsigned       MAX_BURST  = 16,
  parameter int unsigned       TIMEOUT    = 256,
  parameter logic [IR_W-1:0]   INIT_INSTR = '0,
  parameter logic [ADDR_W-1:0] ADDR_BASE  = '0,
  parameter logic [ADDR_W-1:0] ADDR_LAST  = '1
) (
  input  logic                clk,
  input  logic                reset,
  // from / to the JTAG controller
  input  logic [IR_W-1:0]     instruction,
  input  logic [DR_W-1:0]     data_in,
  input  logic                update_tgl,
  output logic [DATA_W-1:0]   data_out,
  output logic                valid_out,
  input  logic                received_in,
  input  logic                received_end,
  output logic                busy,
  // TileLink channel A (master -> slave)
  output logic [2:0]          a_opcode,
  output logic [2:0]          a_param,
  output logic [SIZE_W-1:0]   a_size,
  output logic [SRC_W-1:0]    a_source,
  output logic [ADDR_W-1:0]   a_address,
  output logic [DATA_W/8-1:0] a_mask,
  output logic [DATA_W-1:0]   a_data,
  output logic                a_corrupt,
  output logic                a_valid,
  input  logic                a_ready,
  // TileLink channel D (slave -> master)
  input  logic [2:0]          d_opcode,
  input  logic [1:0]          d_param,
  input  logic [SIZE_W-1:0]   d_size,
  input  logic [SRC_W-1:0]    d_source,
  input  logic [SINK_W-1:0]   d_sink,
  input  logic                d_denied,
  input  logic [DATA_W-1:0]   d_data,
  input  logic                d_corrupt,
  input  logic                d_valid,
  output logic                d_ready
);
  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned BL_W  = $clog2(MAX_BURST + 1);
  localparam int unsigned IX_W  = (MAX_BURST > 1) ? $clog2(MAX_BURST) : 1;
  localparam int unsigned TMO_W = (TIMEOUT > 1) ? $clog2(TIMEOUT) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_SEND_A, S_RESET_COUNTER_A, S_WAIT_D, S_DATA_FORWARD
  } state_e;

  xfer_flags_t       flags;
  logic              done;
  logic [ADDR_W-1:0] base_addr;
  logic [DATA_W-1:0] single_wdata, buf_rdata;
  logic [BL_W-1:0]   burst_len;
  logic [BL_W-1:0]   beat;

  bridge_cmd_regs #(
    .IR_W(IR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .DR_W(DR_W),
    .MAX_BURST(MAX_BURST), .INIT_INSTR(INIT_INSTR)
  ) u_cmd (
    .clk(clk), .reset(reset),
    .instruction(instruction), .data(data_in), .update_tgl(update_tgl),
    .flags(flags), .busy(busy), .done(done),
    .addr(base_addr), .wdata(single_wdata), .burst_len(burst_len),
    .buf_idx(IX_W'(beat)), .buf_rdata(buf_rdata)
  );

  logic recv_in_s, recv_end_s;
  cdc_sync #(.RESET_VAL(1'b0)) u_sync_rin  (.clk(clk), .rst(reset), .d(received_in),  .q(recv_in_s));
  cdc_sync #(.RESET_VAL(1'b1)) u_sync_rend (.clk(clk), .rst(reset), .d(received_end), .q(recv_end_s));

  state_e            state, state_n;
  logic [TMO_W-1:0]  tmo;
  logic              is_burst, want_write, want_read, last, tmo_out, in_win;
  logic [BL_W-1:0]   total;
  logic [ADDR_W-1:0] cur_addr;

  assign is_burst   = flags.burst_write | flags.burst_read;
  assign want_write = flags.write | flags.burst_write;
  assign want_read  = flags.read  | flags.burst_read;
  assign total      = is_burst ? burst_len : BL_W'(1);
  assign last       = (beat + 1'b1) >= total;
  assign tmo_out    = (tmo == TMO_W'(TIMEOUT - 1));
  assign cur_addr   = base_addr + ADDR_W'(beat) * ADDR_W'(BYTES);
  assign in_win     = (cur_addr >= ADDR_BASE) && (cur_addr <= ADDR_LAST);

  assign a_opcode  = want_write ? TL_A_PUT_FULL_DATA : TL_A_GET;
  assign a_param   = 3'd0;
  assign a_size    = SIZE_W'($clog2(BYTES));
  assign a_source  = '0;
  assign a_address = cur_addr;
  assign a_mask    = '1;
  assign a_data    = is_burst ? buf_rdata : single_wdata;
  assign a_corrupt = 1'b0;
  assign a_valid   = (state == S_SEND_A) && in_win;
  assign d_ready   = (state == S_WAIT_D);

  always_comb begin
    state_n = state;
    done    = 1'b0;
    unique case (state)
      S_IDLE:
        if (want_write || want_read) begin
          if (total == '0) done    = 1'b1;
          else             state_n = S_SEND_A;
        end
      S_SEND_A:
        if (!in_win)      state_n = S_IDLE;
        else if (a_ready) state_n = S_RESET_COUNTER_A;
        else if (tmo_out) state_n = S_IDLE;
      S_RESET_COUNTER_A: state_n = S_WAIT_D;
      S_WAIT_D:
        if (d_valid) begin
          if (want_read)  state_n = S_DATA_FORWARD;
          else            state_n = last ? S_IDLE : S_SEND_A;
        end else if (tmo_out) state_n = S_IDLE;
      S_DATA_FORWARD:
        if (valid_out && recv_in_s) state_n = last ? S_IDLE : S_SEND_A;
      default: state_n = S_IDLE;
    endcase
    if (state != S_IDLE && state_n == S_IDLE) done = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      tmo       <= '0;
      beat      <= '0;
      data_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      state <= state_n;
      if (state_n != state || state == S_IDLE || state == S_RESET_COUNTER_A
          || state == S_DATA_FORWARD)
        tmo <= '0;
      else
        tmo <= tmo + 1'b1;

      if (state == S_IDLE) beat <= '0;
      if (state == S_WAIT_D && d_valid) begin
        if (want_read) data_out <= d_data;
        else           beat     <= beat + 1'b1;
      end
      if (state == S_DATA_FORWARD) begin
        if (!valid_out && recv_end_s && !recv_in_s) valid_out <= 1'b1;
        if (valid_out && recv_in_s) begin
          valid_out <= 1'b0;
          beat      <= beat + 1'b1;
        end
      end
    end
  end

  a_a_stable: assert property (@(posedge clk) disable iff (reset)
    a_valid && !a_ready |=> (a_valid && $stable(a_address) && $stable(a_data)) || state == S_IDLE);
  a_fwd_hold: assert property (@(posedge clk) disable iff (reset)
    valid_out && !recv_in_s |=> valid_out && $stable(data_out));
endmodule
