// tb_jtag_mm_bridge: end-to-end test of the bridge at its default parameters
// (AXI4 master, 32-bit data and address, 4-bit instructions, bursts of up to
// 16, timeout 256). A JTAG host scans instructions and data exactly as a
// cable would (TCK 15.15 MHz against a 100 MHz system clock) and an AXI4
// memory slave with random ready and response delays answers on the bus.
// Read data is collected by DR scans on TDO.
//
// Every mechanism of the bridge is exercised and counted; one that never
// happens counts as a failure: single write, single read, burst write,
// burst read, the controller waiting for the JTAG read buffer to be emptied,
// an address-phase timeout, acquire instructions ignored while busy, a repeated
// transfer instruction ignored, Test-Logic-Reset restoring the initial
// instruction, and a full MAX_BURST burst.
`timescale 1ns/1ps
module tb_jtag_mm_bridge;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 32, ADDR_W = 32, ID_W = 4;
  localparam int unsigned MAX_BURST = 16, TIMEOUT = 256;

  logic clk = 1'b0, reset = 1'b1, async_reset = 1'b0, flush = 1'b0;
  logic stall = 1'b0, mute = 1'b0, slow = 1'b0, busy;
  always #5 clk = ~clk;

  jtag_host_if #(.IR_W(IR_W), .MAX_BITS(64)) jh ();

  logic [ID_W-1:0] awid, bid, arid, rid;
  logic [ADDR_W-1:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize, awprot, arprot;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W/8-1:0] wstrb;
  logic [2:0] tl_a_opcode, tl_a_param;
  logic [2:0] tl_a_size;
  logic [3:0] tl_a_source;
  logic [ADDR_W-1:0] tl_a_address;
  logic [3:0] tl_a_mask;
  logic [DATA_W-1:0] tl_a_data;
  logic tl_a_corrupt, tl_a_valid, tl_d_ready;

  jtag_mm_bridge dut (
    .clk(clk), .reset(reset),
    .tck(jh.tck), .tms(jh.tms), .tdi(jh.tdi),
    .tdo_data(jh.tdo), .tdo_driven(jh.tdo_driven), .async_reset(async_reset),
    .busy(busy),
    .axi_awid(awid), .axi_awaddr(awaddr), .axi_awlen(awlen), .axi_awsize(awsize),
    .axi_awburst(awburst), .axi_awprot(awprot), .axi_awvalid(awvalid), .axi_awready(awready),
    .axi_wdata(wdata), .axi_wstrb(wstrb), .axi_wlast(wlast), .axi_wvalid(wvalid),
    .axi_wready(wready),
    .axi_bid(bid), .axi_bresp(bresp), .axi_bvalid(bvalid), .axi_bready(bready),
    .axi_arid(arid), .axi_araddr(araddr), .axi_arlen(arlen), .axi_arsize(arsize),
    .axi_arburst(arburst), .axi_arprot(arprot), .axi_arvalid(arvalid), .axi_arready(arready),
    .axi_rid(rid), .axi_rdata(rdata), .axi_rresp(rresp), .axi_rlast(rlast),
    .axi_rvalid(rvalid), .axi_rready(rready),
    .tl_a_opcode(tl_a_opcode), .tl_a_param(tl_a_param), .tl_a_size(tl_a_size),
    .tl_a_source(tl_a_source), .tl_a_address(tl_a_address), .tl_a_mask(tl_a_mask),
    .tl_a_data(tl_a_data), .tl_a_corrupt(tl_a_corrupt), .tl_a_valid(tl_a_valid),
    .tl_a_ready(1'b0),
    .tl_d_opcode('0), .tl_d_param('0), .tl_d_size('0), .tl_d_source('0), .tl_d_sink('0),
    .tl_d_denied(1'b0), .tl_d_data('0), .tl_d_corrupt(1'b0), .tl_d_valid(1'b0),
    .tl_d_ready(tl_d_ready)
  );

  axi4_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .ID_W(ID_W), .WORDS(1024)) mem (
    .clk(clk), .reset(reset || flush), .stall(stall), .mute(mute), .slow(slow),
    .awid(awid), .awaddr(awaddr), .awlen(awlen), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wstrb(wstrb), .wlast(wlast), .wvalid(wvalid), .wready(wready),
    .bid(bid), .bresp(bresp), .bvalid(bvalid), .bready(bready),
    .arid(arid), .araddr(araddr), .arlen(arlen), .arvalid(arvalid), .arready(arready),
    .rid(rid), .rdata(rdata), .rresp(rresp), .rlast(rlast), .rvalid(rvalid), .rready(rready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  // ---- mechanism counters -------------------------------------------------
  int n_single_write, n_single_read, n_burst_write, n_burst_read, n_buffer_wait;
  int n_timeout, n_ignored_busy, n_repeat_ignored, n_tlr_restore, n_max_burst;
  int busy_run = 0, last_busy_len = 0;

  always @(posedge clk) begin
    if (reset) busy_run <= 0;
    else if (busy) busy_run <= busy_run + 1;
    else if (busy_run != 0) begin
      last_busy_len <= busy_run;
      busy_run      <= 0;
    end
  end
  // ---- JTAG-level operations ------------------------------------------------
  logic [63:0] out;

  task automatic set_reg(input logic [7:0] code, input logic [31:0] v);
    jh.shift_ir(IR_W'(code));
    jh.shift_dr(64'(v), 32, out);
  endtask

  task automatic wait_idle();
    int n = 0;
    jh.idle(6);
    while (busy && n < 2000) begin
      jh.idle(1);
      n++;
    end
    repeat (2) @(posedge clk);
  endtask

  // DR scan that returns one read word (gives the bridge time to fetch it)
  task automatic read_word(output logic [31:0] w);
    jh.idle(25);
    jh.shift_dr(64'h0, 32, out);
    w = out[31:0];
    check(jh.driven_ok, "TDO driven while the read word is shifted out");
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] w, bdata [MAX_BURST];
  int w0;

  initial begin
    #3 async_reset = 1'b1;
    #20 async_reset = 1'b0;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    jh.reset_tap();   // recommended before use

    // single write, then single read back over TDO
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0010);
    set_reg(INSTR_DATA_ACQ, 32'hDEAD_BEEF);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    check(mem.mem[4] == 32'hDEAD_BEEF && mem.n_writes == 1, "single write");
    if (mem.n_writes == 1) n_single_write++;
    jh.shift_ir(IR_W'(INSTR_READ));
    read_word(w);
    check(w == 32'hDEAD_BEEF, $sformatf("single read returned %h", w));
    if (w == 32'hDEAD_BEEF) n_single_read++;

    // the same transfer instruction twice in a row runs once
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0020);
    set_reg(INSTR_DATA_ACQ, 32'h1111_2222);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    w0 = mem.n_writes;
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    check(mem.n_writes == w0, "second consecutive write ignored");
    if (mem.n_writes == w0) n_repeat_ignored++;

    // burst write of 5 words, then burst read back
    for (int i = 0; i < MAX_BURST; i++) begin
      bdata[i] = $urandom;
      set_reg(INSTR_INDEX_ACQ, i);
      set_reg(INSTR_IDX_DATA_ACQ, bdata[i]);
    end
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0400);
    set_reg(INSTR_BLEN_ACQ, 5);
    w0 = mem.n_writes;
    jh.shift_ir(IR_W'(INSTR_BURST_WRITE));
    wait_idle();
    check(mem.n_writes == w0 + 5, "burst write count");
    begin
      bit ok = 1;
      for (int i = 0; i < 5; i++) if (mem.mem[256 + i] != bdata[i]) ok = 0;
      check(ok, "burst write data at consecutive addresses");
      if (ok) n_burst_write++;
    end
    w0 = mem.n_reads;
    jh.shift_ir(IR_W'(INSTR_BURST_READ));
    jh.idle(60);
    // word 0 waits in the JTAG buffer, word 1 waits in the controller,
    // word 2 is not requested until the buffer has been shifted out
    check(mem.n_reads == w0 + 2, $sformatf("%0d words fetched ahead", mem.n_reads - w0));
    if (mem.n_reads == w0 + 2) n_buffer_wait++;
    begin
      bit ok = 1;
      for (int i = 0; i < 5; i++) begin
        read_word(w);
        if (w != bdata[i]) begin
          ok = 0;
          $display("burst read word %0d: %h expected %h", i, w, bdata[i]);
        end
      end
      check(ok, "burst read data in order");
      if (ok) n_burst_read++;
    end
    wait_idle();

    // a burst of the maximum length
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0800);
    set_reg(INSTR_BLEN_ACQ, MAX_BURST);
    jh.shift_ir(IR_W'(INSTR_BURST_WRITE));
    wait_idle();
    jh.shift_ir(IR_W'(INSTR_BURST_READ));
    begin
      bit ok = 1;
      for (int i = 0; i < MAX_BURST; i++) begin
        read_word(w);
        if (w != bdata[i] || mem.mem[512 + i] != bdata[i]) ok = 0;
      end
      check(ok, "maximum-length burst written and read back");
      if (ok) n_max_burst++;
    end
    wait_idle();

    // address-phase timeout; a read sent meanwhile is ignored
    stall = 1'b1;
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0030);
    set_reg(INSTR_DATA_ACQ, 32'h3333_4444);
    w0 = mem.n_writes;
    jh.shift_ir(IR_W'(INSTR_WRITE));
    jh.idle(2);
    check(busy, "busy while the slave stalls");
    jh.shift_ir(IR_W'(INSTR_READ));            // arrives while busy
    check(busy, "read instruction arrived while busy");
    wait_idle();
    check(last_busy_len == TIMEOUT + 1, $sformatf("timeout after %0d cycles", last_busy_len));
    if (last_busy_len == TIMEOUT + 1 && mem.n_writes == w0) n_timeout++;
    stall = 1'b0;
    @(posedge clk) flush = 1'b1;
    @(posedge clk) flush = 1'b0;
    jh.idle(20);
    check(!busy && mem.n_reads == 0, "read sent while busy did not run");
    set_reg(INSTR_DATA_ACQ, 32'h5555_6666);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    check(mem.mem[12] == 32'h5555_6666, "write after a timeout");

    // lock-out: while a slow burst write runs, acquire instructions are ignored
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0C00);
    set_reg(INSTR_BLEN_ACQ, MAX_BURST);
    slow = 1'b1;
    jh.shift_ir(IR_W'(INSTR_BURST_WRITE));
    set_reg(INSTR_ADDR_ACQ, 32'h0000_0E00);   // all while busy
    set_reg(INSTR_DATA_ACQ, 32'h7777_8888);
    check(busy, "acquires sent while the burst was still running");
    wait_idle();
    slow = 1'b0;
    jh.shift_ir(IR_W'(INSTR_WRITE));          // uses the old address and data
    wait_idle();
    check(mem.mem[768] == 32'h5555_6666 && mem.mem[896] == 32'h0,
          "address and data sent while busy were ignored");
    if (mem.mem[768] == 32'h5555_6666 && mem.mem[896] == 32'h0) n_ignored_busy++;

    // Test-Logic-Reset between two writes lets the second one run
    w0 = mem.n_writes;
    jh.reset_tap();
    jh.idle(10);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    check(mem.n_writes == w0 + 1, "write after Test-Logic-Reset runs");
    if (mem.n_writes == w0 + 1) n_tlr_restore++;

    check(mem.protocol_errors == 0, "legal AXI4 single-beat transfers");

    $display("mechanisms: single_write=%0d single_read=%0d burst_write=%0d burst_read=%0d",
             n_single_write, n_single_read, n_burst_write, n_burst_read);
    $display("mechanisms: buffer_wait=%0d timeout=%0d ignored_busy=%0d repeat_ignored=%0d tlr=%0d max_burst=%0d",
             n_buffer_wait, n_timeout, n_ignored_busy, n_repeat_ignored, n_tlr_restore, n_max_burst);
    check(n_single_write > 0, "single write happened");
    check(n_single_read > 0, "single read happened");
    check(n_burst_write > 0, "burst write happened");
    check(n_burst_read > 0, "burst read happened");
    check(n_buffer_wait > 0, "controller waited for the JTAG read buffer");
    check(n_timeout > 0, "timeout happened");
    check(n_ignored_busy > 0, "instruction ignored while busy");
    check(n_repeat_ignored > 0, "repeated instruction ignored");
    check(n_tlr_restore > 0, "Test-Logic-Reset restored the initial instruction");
    check(n_max_burst > 0, "maximum-length burst");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
