// tb_bridge_cmd_regs: self-checking test of the system-clock instruction
// decoder. The test plays the JTAG side directly: it sets instruction and
// data, flips update_tgl, and checks the acquire registers, the burst buffer,
// the transfer flags (one per transfer instruction, set only when the code
// changes), the busy lock-out, the done clear and the latency from toggle to
// flag (three system clocks).
`timescale 1ns/1ps
module tb_bridge_cmd_regs;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 32, ADDR_W = 32, DR_W = 32, MAX_BURST = 8;
  localparam int unsigned BL_W = $clog2(MAX_BURST + 1), IX_W = $clog2(MAX_BURST);

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;

  logic [IR_W-1:0]   instruction = '0;
  logic [DR_W-1:0]   data = '0;
  logic              update_tgl = 1'b0;
  xfer_flags_t       flags;
  logic              busy, done = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, buf_rdata;
  logic [BL_W-1:0]   burst_len;
  logic [IX_W-1:0]   buf_idx = '0;
  int checks = 0, failures = 0;

  bridge_cmd_regs #(.IR_W(IR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .DR_W(DR_W),
                    .MAX_BURST(MAX_BURST), .INIT_INSTR('0)) dut (
    .clk(clk), .reset(reset), .instruction(instruction), .data(data),
    .update_tgl(update_tgl), .flags(flags), .busy(busy), .done(done),
    .addr(addr), .wdata(wdata), .burst_len(burst_len),
    .buf_idx(buf_idx), .buf_rdata(buf_rdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one JTAG update: new instruction and data, toggle, wait until absorbed
  task automatic send(input logic [7:0] code, input logic [DR_W-1:0] d);
    @(negedge clk);
    instruction = IR_W'(code);
    data        = d;
    update_tgl  = ~update_tgl;
    repeat (6) @(negedge clk);
  endtask

  task automatic finish_xfer();
    @(negedge clk) done = 1'b1;
    @(negedge clk) done = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] ref_buf [MAX_BURST];
  int lat;

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(flags == '0 && !busy, "idle after reset");

    // acquire instructions
    send(INSTR_ADDR_ACQ, 32'h4000_0010);
    check(addr == 32'h4000_0010, "address acquire");
    send(INSTR_DATA_ACQ, 32'hCAFE_F00D);
    check(wdata == 32'hCAFE_F00D && addr == 32'h4000_0010, "data acquire");
    send(INSTR_BLEN_ACQ, 32'd5);
    check(burst_len == 5, "burst length acquire");
    send(INSTR_BLEN_ACQ, 32'd100);
    check(burst_len == BL_W'(MAX_BURST), "burst length limited to MAX_BURST");
    for (int i = 0; i < MAX_BURST; i++) begin
      ref_buf[i] = $urandom;
      send(INSTR_INDEX_ACQ, DR_W'(i));
      send(INSTR_IDX_DATA_ACQ, ref_buf[i]);
    end
    send(INSTR_INDEX_ACQ, DR_W'(MAX_BURST + 3));
    send(INSTR_IDX_DATA_ACQ, 32'hDEAD_BEEF);  // out of range: ignored
    for (int i = 0; i < MAX_BURST; i++) begin
      buf_idx = IX_W'(i);
      #1 check(buf_rdata == ref_buf[i], $sformatf("buffer[%0d]", i));
    end
    send(8'h07, 32'h1234);  // unknown code: no effect
    check(flags == '0 && addr == 32'h4000_0010 && wdata == 32'hCAFE_F00D, "NOP");

    // write flag and its latency
    @(negedge clk);
    instruction = IR_W'(INSTR_WRITE);
    update_tgl  = ~update_tgl;
    lat = 0;
    while (!flags.write && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 3, $sformatf("toggle to flag latency %0d", lat));
    check(flags == 4'b0001 && busy, "write flag only");
    // busy: acquires and other transfers ignored
    send(INSTR_ADDR_ACQ, 32'h0);
    check(addr == 32'h4000_0010, "address kept while busy");
    send(INSTR_READ, 32'h0);
    check(flags == 4'b0001, "read ignored while busy");
    finish_xfer();
    check(flags == '0 && !busy, "done clears flags");

    // same transfer twice in a row runs once
    send(INSTR_WRITE, 32'h0);
    check(flags.write, "write after read sets flag");
    finish_xfer();
    send(INSTR_WRITE, 32'h0);
    check(!flags.write, "repeated write ignored");
    send(INSTR_NOP_TB, 32'h0);
    send(INSTR_WRITE, 32'h0);
    check(flags.write, "write after another instruction");
    finish_xfer();

    // the other transfer flags
    send(INSTR_READ, 32'h0);
    check(flags == 4'b0010, "read flag");
    finish_xfer();
    send(INSTR_BURST_WRITE, 32'h0);
    check(flags == 4'b0100, "burst write flag");
    finish_xfer();
    send(INSTR_BURST_READ, 32'h0);
    check(flags == 4'b1000, "burst read flag");
    // an update arriving in the same cycle as done is accepted
    @(negedge clk);
    instruction = IR_W'(INSTR_ADDR_ACQ);
    data        = 32'h55;
    update_tgl  = ~update_tgl;
    @(negedge clk); @(negedge clk);
    done = 1'b1;
    @(negedge clk);
    done = 1'b0;
    repeat (3) @(negedge clk);
    check(addr == 32'h55 && flags == '0, "update accepted together with done");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] INSTR_NOP_TB = 8'h00;
endmodule
