// bridge_cmd_regs: system-clock side of the instruction interface, shared by
// the AXI4 and the TileLink controller.
//
// How it works
//   * update_tgl from the JTAG controller is synchronized with two flops.
//     Each change of the synchronized toggle is one "update event"; in that
//     cycle the instruction code and the data word, which the JTAG side holds
//     stable until its next toggle, are sampled into instr_q / data_q.
//   * Acquire instructions act on every update event while the bridge is not
//     busy: 0x02 loads the address register, 0x03 the write-data register,
//     0x08 the burst length (limited to MAX_BURST), 0x0A the buffer index and
//     0x0B writes the data word into the burst buffer at that index (ignored
//     when the index is out of range). The IR update that selects an acquire
//     instruction also produces an event, which loads the stale data word;
//     the following DR update overwrites it with the intended value.
//   * Transfer instructions (0x01 write, 0x04 read, 0x09 burst write, 0x0C
//     burst read) set their flag only when the instruction code changes to
//     them. The same transfer twice in a row therefore runs once, which is
//     why two transfers of the same type need another instruction between
//     them; DR scans done to read data out do not restart a read.
//   * While any flag is set (busy) every instruction is ignored. The bus FSM
//     clears all flags with `done` when it returns to idle.
//   * Unknown codes are no-operations.
//
// Interface: flags, addr, wdata and burst_len are registered outputs.
// buf_rdata is a combinational read of the burst buffer at buf_idx.
// Timing: the update event is the second system clock after update_tgl
// flips; registers and flags change on the third.
module bridge_cmd_regs
  import jtag_bridge_pkg::*;
#(
  parameter int unsigned     IR_W       = 4,
  parameter int unsigned     DATA_W     = 32,
  parameter int unsigned     ADDR_W     = 32,
  parameter int unsigned     DR_W       = 32,
  parameter int unsigned     MAX_BURST  = 16,
  parameter logic [IR_W-1:0] INIT_INSTR = '0,
  localparam int unsigned    BL_W       = $clog2(MAX_BURST + 1),
  localparam int unsigned    IX_W       = (MAX_BURST > 1) ? $clog2(MAX_BURST) : 1
) (
  input  logic              clk,
  input  logic              reset,
  // from the JTAG controller (TCK domain)
  input  logic [IR_W-1:0]   instruction,
  input  logic [DR_W-1:0]   data,
  input  logic              update_tgl,
  // to the bus FSM
  output xfer_flags_t       flags,
  output logic              busy,
  input  logic              done,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] wdata,
  output logic [BL_W-1:0]   burst_len,
  input  logic [IX_W-1:0]   buf_idx,
  output logic [DATA_W-1:0] buf_rdata
);
  logic tgl_s, tgl_q, event_p;
  cdc_sync u_sync_tgl (.clk(clk), .rst(reset), .d(update_tgl), .q(tgl_s));

  always_ff @(posedge clk) begin
    if (reset) tgl_q <= 1'b0;
    else       tgl_q <= tgl_s;
  end
  assign event_p = tgl_s ^ tgl_q;

  logic [IR_W-1:0]   instr_q;
  logic [DR_W-1:0]   index_q;
  logic [DATA_W-1:0] burst_buf [MAX_BURST];

  function automatic logic is_code(logic [IR_W-1:0] code, logic [7:0] ref_code);
    return code == IR_W'(ref_code);
  endfunction

  assign busy = |flags;

  always_ff @(posedge clk) begin
    if (reset) begin
      instr_q   <= INIT_INSTR;
      flags     <= '0;
      addr      <= '0;
      wdata     <= '0;
      burst_len <= '0;
      index_q   <= '0;
    end else begin
      if (done) flags <= '0;
      if (event_p) begin
        instr_q <= instruction;
        if (!busy || done) begin
          if (is_code(instruction, INSTR_ADDR_ACQ)) addr  <= ADDR_W'(data);
          if (is_code(instruction, INSTR_DATA_ACQ)) wdata <= DATA_W'(data);
          if (is_code(instruction, INSTR_BLEN_ACQ))
            burst_len <= (data > DR_W'(MAX_BURST)) ? BL_W'(MAX_BURST) : BL_W'(data);
          if (is_code(instruction, INSTR_INDEX_ACQ)) index_q <= data;
          if (instruction != instr_q) begin
            if (is_code(instruction, INSTR_WRITE))       flags.write       <= 1'b1;
            if (is_code(instruction, INSTR_READ))        flags.read        <= 1'b1;
            if (is_code(instruction, INSTR_BURST_WRITE)) flags.burst_write <= 1'b1;
            if (is_code(instruction, INSTR_BURST_READ))  flags.burst_read  <= 1'b1;
          end
        end
      end
    end
  end

  // Burst data buffer (no reset: written before it is read).
  always_ff @(posedge clk) begin
    if (!reset && event_p && (!busy || done) && is_code(instruction, INSTR_IDX_DATA_ACQ)
        && index_q < DR_W'(MAX_BURST))
      burst_buf[IX_W'(index_q)] <= DATA_W'(data);
  end

  assign buf_rdata = burst_buf[buf_idx];

  // At most one transfer flag is ever set.
  a_one_flag: assert property (@(posedge clk) disable iff (reset) $onehot0(flags));
endmodule
