// axi4_controller: system-clock half of the bridge with an AXI4 master port.
//
// Instruction handling (address/data/burst registers, burst buffer and one
// flag per transfer instruction) is done by bridge_cmd_regs. This module adds
// the AXI4 state machine, a burst counter and a timeout counter.
//
// State machine (the published AXI4 FSM of the bridge):
//   S_IDLE                  wait for the write/burst-write or read/burst-read flag
//   S_SET_DATA_AND_ADDRESS  AW and W valid with address and data; leave when
//                           both handshakes are done, or back to idle when the
//                           timeout counter runs out
//   S_RESET_COUNTER_W       one cycle, clears the timeout counter
//   S_SET_READY_B           BREADY high until BVALID (or timeout)
//   S_SET_READ_ADDRESS      AR valid with address until ARREADY (or timeout)
//   S_RESET_COUNTER_R       one cycle, clears the timeout counter
//   S_SET_READY_R           RREADY high, RDATA captured on RVALID (or timeout)
//   S_DATA_FORWARD          read word offered to the JTAG controller until it
//                           confirms reception
// A burst is a sequence of single transfers to consecutive word addresses
// (addr + i*DATA_W/8). After each completed transfer the FSM returns to idle
// only when the burst counter has reached the burst length, otherwise it
// starts the next transfer directly. A timeout aborts the whole instruction.
// Accesses outside [ADDR_BASE, ADDR_LAST] are not issued: the instruction is
// dropped at that transfer.
//
// AXI4 details chosen here: every transaction is one beat (LEN=0, SIZE=full
// width, INCR, all strobes set, ID 0); AW and W are offered together and
// each is dropped once its own handshake is done; responses are not
// checked. On a timeout VALID is withdrawn before its handshake, which a
// strict AXI4 slave would not expect; it only happens when the slave has
// stopped responding.
//
// Read return: in S_DATA_FORWARD valid_out is raised when the JTAG
// controller's read buffer is empty (received_end) and its previous
// acknowledge is gone (received_in low); the word is held until received_in
// rises, then valid_out drops. Both inputs are synchronized with two flops.
module axi4_controller
  import jtag_bridge_pkg::*;
#(
  parameter int unsigned       IR_W       = 4,
  parameter int unsigned       DATA_W     = 32,
  parameter int unsigned       ADDR_W     = 32,
  parameter int unsigned       DR_W       = 32,
  parameter int unsigned       ID_W       = 4,
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
  // AXI4 master: write address
  output logic [ID_W-1:0]     awid,
  output logic [ADDR_W-1:0]   awaddr,
  output logic [7:0]          awlen,
  output logic [2:0]          awsize,
  output logic [1:0]          awburst,
  output logic [2:0]          awprot,
  output logic                awvalid,
  input  logic                awready,
  // write data
  output logic [DATA_W-1:0]   wdata,
  output logic [DATA_W/8-1:0] wstrb,
  output logic                wlast,
  output logic                wvalid,
  input  logic                wready,
  // write response
  input  logic [ID_W-1:0]     bid,
  input  logic [1:0]          bresp,
  input  logic                bvalid,
  output logic                bready,
  // read address
  output logic [ID_W-1:0]     arid,
  output logic [ADDR_W-1:0]   araddr,
  output logic [7:0]          arlen,
  output logic [2:0]          arsize,
  output logic [1:0]          arburst,
  output logic [2:0]          arprot,
  output logic                arvalid,
  input  logic                arready,
  // read data
  input  logic [ID_W-1:0]     rid,
  input  logic [DATA_W-1:0]   rdata,
  input  logic [1:0]          rresp,
  input  logic                rlast,
  input  logic                rvalid,
  output logic                rready
);
  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned BL_W  = $clog2(MAX_BURST + 1);
  localparam int unsigned IX_W  = (MAX_BURST > 1) ? $clog2(MAX_BURST) : 1;
  localparam int unsigned TMO_W = (TIMEOUT > 1) ? $clog2(TIMEOUT) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_SET_DATA_AND_ADDRESS, S_RESET_COUNTER_W, S_SET_READY_B,
    S_SET_READ_ADDRESS, S_RESET_COUNTER_R, S_SET_READY_R, S_DATA_FORWARD
  } state_e;

  // ---- instruction registers and flags --------------------------------------
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

  // ---- datapath ------------------------------------------------------------
  state_e            state, state_n;
  logic [TMO_W-1:0]  tmo;
  logic              aw_done, w_done;
  logic              is_burst, want_write, want_read, last, tmo_out, in_win;
  logic [BL_W-1:0]   total;
  logic [ADDR_W-1:0] cur_addr;
  logic              aw_hs, w_hs;

  assign is_burst   = flags.burst_write | flags.burst_read;
  assign want_write = flags.write | flags.burst_write;
  assign want_read  = flags.read  | flags.burst_read;
  assign total      = is_burst ? burst_len : BL_W'(1);
  assign last       = (beat + 1'b1) >= total;
  assign tmo_out    = (tmo == TMO_W'(TIMEOUT - 1));
  assign cur_addr   = base_addr + ADDR_W'(beat) * ADDR_W'(BYTES);
  assign in_win     = (cur_addr >= ADDR_BASE) && (cur_addr <= ADDR_LAST);

  assign awid    = '0;
  assign awaddr  = cur_addr;
  assign awlen   = 8'd0;
  assign awsize  = 3'($clog2(BYTES));
  assign awburst = AXI_BURST_INCR;
  assign awprot  = 3'b000;
  assign wdata   = is_burst ? buf_rdata : single_wdata;
  assign wstrb   = '1;
  assign wlast   = 1'b1;
  assign arid    = '0;
  assign araddr  = cur_addr;
  assign arlen   = 8'd0;
  assign arsize  = 3'($clog2(BYTES));
  assign arburst = AXI_BURST_INCR;
  assign arprot  = 3'b000;

  assign awvalid = (state == S_SET_DATA_AND_ADDRESS) && in_win && !aw_done;
  assign wvalid  = (state == S_SET_DATA_AND_ADDRESS) && in_win && !w_done;
  assign bready  = (state == S_SET_READY_B);
  assign arvalid = (state == S_SET_READ_ADDRESS) && in_win;
  assign rready  = (state == S_SET_READY_R);
  assign aw_hs   = awvalid && awready;
  assign w_hs    = wvalid && wready;

  // ---- next state -----------------------------------------------------------
  always_comb begin
    state_n = state;
    done    = 1'b0;
    unique case (state)
      S_IDLE:
        if (want_write || want_read) begin
          if (total == '0)     done    = 1'b1;
          else if (want_write) state_n = S_SET_DATA_AND_ADDRESS;
          else                 state_n = S_SET_READ_ADDRESS;
        end
      S_SET_DATA_AND_ADDRESS:
        if (!in_win)                                   state_n = S_IDLE;
        else if ((aw_done || aw_hs) && (w_done || w_hs)) state_n = S_RESET_COUNTER_W;
        else if (tmo_out)                              state_n = S_IDLE;
      S_RESET_COUNTER_W: state_n = S_SET_READY_B;
      S_SET_READY_B:
        if (bvalid)       state_n = last ? S_IDLE : S_SET_DATA_AND_ADDRESS;
        else if (tmo_out) state_n = S_IDLE;
      S_SET_READ_ADDRESS:
        if (!in_win)      state_n = S_IDLE;
        else if (arready) state_n = S_RESET_COUNTER_R;
        else if (tmo_out) state_n = S_IDLE;
      S_RESET_COUNTER_R: state_n = S_SET_READY_R;
      S_SET_READY_R:
        if (rvalid)       state_n = S_DATA_FORWARD;
        else if (tmo_out) state_n = S_IDLE;
      S_DATA_FORWARD:
        if (valid_out && recv_in_s) state_n = last ? S_IDLE : S_SET_READ_ADDRESS;
      default: state_n = S_IDLE;
    endcase
    if (state != S_IDLE && state_n == S_IDLE) done = 1'b1;
  end

  // ---- registers ------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      tmo       <= '0;
      beat      <= '0;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      data_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      state <= state_n;
      // timeout counter: counts while waiting in a state, cleared on every
      // state change and in the two reset-counter states
      if (state_n != state || state == S_IDLE || state == S_RESET_COUNTER_W
          || state == S_RESET_COUNTER_R || state == S_DATA_FORWARD)
        tmo <= '0;
      else
        tmo <= tmo + 1'b1;

      if (state == S_IDLE) beat <= '0;

      // AW/W handshake bookkeeping
      if (state == S_SET_DATA_AND_ADDRESS && state_n == S_SET_DATA_AND_ADDRESS) begin
        if (aw_hs) aw_done <= 1'b1;
        if (w_hs)  w_done  <= 1'b1;
      end else begin
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end

      if (state == S_SET_READY_B && bvalid) beat <= beat + 1'b1;

      if (state == S_SET_READY_R && rvalid) data_out <= rdata;

      if (state == S_DATA_FORWARD) begin
        if (!valid_out && recv_end_s && !recv_in_s) valid_out <= 1'b1;
        if (valid_out && recv_in_s) begin
          valid_out <= 1'b0;
          beat      <= beat + 1'b1;
        end
      end
    end
  end

  // ---- bus rules --------------------------------------------------------------
  // A raised VALID stays with stable payload until its handshake, unless the
  // FSM gives up (timeout) and returns to idle.
  a_aw_stable: assert property (@(posedge clk) disable iff (reset)
    awvalid && !awready |=> (awvalid && $stable(awaddr)) || state == S_IDLE);
  a_w_stable: assert property (@(posedge clk) disable iff (reset)
    wvalid && !wready |=> (wvalid && $stable(wdata)) || state == S_IDLE);
  a_ar_stable: assert property (@(posedge clk) disable iff (reset)
    arvalid && !arready |=> (arvalid && $stable(araddr)) || state == S_IDLE);
  a_fwd_hold: assert property (@(posedge clk) disable iff (reset)
    valid_out && !recv_in_s |=> valid_out && $stable(data_out));
endmodule
