// tb_tilelink_controller: self-checking test of the TileLink controller against a
// random-latency TileLink-UL memory slave. The JTAG side is played by the test:
// instructions and data are handed over with the update toggle, and a small
// TCK-clocked reader takes forwarded words through the valid / received_in /
// received_end handshake, freeing its buffer after a random delay as a user
// shifting the word out would. Checked: single write and read, burst write
// and burst read (memory contents and the order of forwarded words), the
// timeout in the address phase and in the response phase (with its
// duration), an access outside the address window, and channel A field values.
`timescale 1ns/1ps
module tb_tilelink_controller;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 32, ADDR_W = 32, DR_W = 32, SRC_W = 4, SIZE_W = 3;
  localparam int unsigned MAX_BURST = 8, TIMEOUT = 40;
  localparam logic [ADDR_W-1:0] WIN_LAST = 32'h0000_FFFF;

  logic clk = 1'b0, tck = 1'b0, reset = 1'b1, flush = 1'b0;
  always #5 clk = ~clk;
  always #33 tck = ~tck;

  logic [IR_W-1:0]   instruction = '0;
  logic [DR_W-1:0]   jdata = '0;
  logic              update_tgl = 1'b0;
  logic [DATA_W-1:0] fwd_data;
  logic              fwd_valid, received_in = 1'b0, full = 1'b0, busy;
  logic              stall = 1'b0, mute = 1'b0;

  logic [2:0] a_opcode, a_param, d_opcode;
  logic [1:0] d_param = '0;
  logic [SIZE_W-1:0] a_size, d_size;
  logic [SRC_W-1:0] a_source, d_source;
  logic [ADDR_W-1:0] a_address;
  logic [DATA_W/8-1:0] a_mask;
  logic [DATA_W-1:0] a_data, d_data;
  logic a_corrupt, a_valid, a_ready, d_valid, d_ready;

  tilelink_controller #(
    .IR_W(IR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .DR_W(DR_W),
    .SRC_W(SRC_W), .SINK_W(1), .SIZE_W(SIZE_W),
    .MAX_BURST(MAX_BURST), .TIMEOUT(TIMEOUT), .INIT_INSTR('0),
    .ADDR_BASE('0), .ADDR_LAST(WIN_LAST)
  ) dut (
    .clk(clk), .reset(reset),
    .instruction(instruction), .data_in(jdata), .update_tgl(update_tgl),
    .data_out(fwd_data), .valid_out(fwd_valid),
    .received_in(received_in), .received_end(!full), .busy(busy),
    .a_opcode(a_opcode), .a_param(a_param), .a_size(a_size), .a_source(a_source),
    .a_address(a_address), .a_mask(a_mask), .a_data(a_data), .a_corrupt(a_corrupt),
    .a_valid(a_valid), .a_ready(a_ready),
    .d_opcode(d_opcode), .d_param(d_param), .d_size(d_size), .d_source(d_source),
    .d_sink(1'b0), .d_denied(1'b0), .d_data(d_data), .d_corrupt(1'b0),
    .d_valid(d_valid), .d_ready(d_ready)
  );

  tl_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .SRC_W(SRC_W), .SIZE_W(SIZE_W), .WORDS(256)) mem (
    .clk(clk), .reset(reset || flush), .stall(stall), .mute(mute), .slow(1'b0),
    .a_opcode(a_opcode), .a_size(a_size), .a_source(a_source), .a_address(a_address),
    .a_mask(a_mask), .a_data(a_data), .a_valid(a_valid), .a_ready(a_ready),
    .d_opcode(d_opcode), .d_size(d_size), .d_source(d_source), .d_data(d_data),
    .d_valid(d_valid), .d_ready(d_ready)
  );

  // JTAG-side reader of forwarded words
  logic [DATA_W-1:0] got [$];
  always @(posedge tck) begin
    if (fwd_valid && !received_in && !full) begin
      got.push_back(fwd_data);
      full        <= 1'b1;
      received_in <= 1'b1;
    end else if (!fwd_valid) begin
      received_in <= 1'b0;
    end
  end
  // the "user" empties the buffer some TCK cycles later
  always @(posedge tck) if (full && $urandom % 4 == 0) full <= 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [7:0] code, input logic [DR_W-1:0] d);
    @(negedge tck);
    instruction = IR_W'(code);
    jdata       = d;
    update_tgl  = ~update_tgl;
    repeat (2) @(negedge tck);
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    @(posedge clk);
    while (busy && cycles < 5000) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  // length of the last busy period, in system clocks
  int busy_run = 0, last_busy_len = 0, busy_periods = 0;
  always @(posedge clk) begin
    if (reset) begin
      busy_run     <= 0;
      busy_periods <= 0;
    end else if (busy) busy_run <= busy_run + 1;
    else if (busy_run != 0) begin
      last_busy_len <= busy_run;
      busy_periods  <= busy_periods + 1;
      busy_run      <= 0;
    end
  end

  always @(posedge clk) if (!reset && a_valid)
    if (a_param != 0 || a_corrupt || a_source != 0) begin
      failures++;
      $display("FAIL channel A fields");
    end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, w0;
  logic [DATA_W-1:0] bdata [MAX_BURST];

  initial begin
    repeat (4) @(posedge clk);
    reset = 1'b0;

    // single write then single read
    send(INSTR_ADDR_ACQ, 32'h0000_0040);
    send(INSTR_DATA_ACQ, 32'hA5A5_1234);
    send(INSTR_WRITE, '0);
    wait_idle(cyc);
    @(posedge clk);
    check(busy_periods == 1, "write instruction made the controller busy");
    check(mem.mem[16] == 32'hA5A5_1234, "single write reached memory");
    check(mem.n_writes == 1, "exactly one write");
    send(INSTR_READ, '0);
    wait_idle(cyc);
    repeat (20) @(posedge tck);
    check(got.size() == 1 && got[0] == 32'hA5A5_1234, "single read forwarded");
    got.delete();

    // burst write of 6 words from the buffer, then burst read back
    for (int i = 0; i < MAX_BURST; i++) begin
      bdata[i] = $urandom;
      send(INSTR_INDEX_ACQ, DR_W'(i));
      send(INSTR_IDX_DATA_ACQ, bdata[i]);
    end
    send(INSTR_ADDR_ACQ, 32'h0000_0100);
    send(INSTR_BLEN_ACQ, 32'd6);
    send(INSTR_BURST_WRITE, '0);
    wait_idle(cyc);
    check(mem.n_writes == 7, $sformatf("burst wrote %0d words", mem.n_writes - 1));
    for (int i = 0; i < 6; i++)
      check(mem.mem[64 + i] == bdata[i], $sformatf("burst word %0d", i));
    check(mem.mem[70] == '0, "burst stopped at its length");
    send(INSTR_BURST_READ, '0);
    wait_idle(cyc);
    repeat (20) @(posedge tck);
    check(got.size() == 6, $sformatf("burst read forwarded %0d words", got.size()));
    for (int i = 0; i < 6 && i < got.size(); i++)
      check(got[i] == bdata[i], $sformatf("burst read word %0d", i));
    got.delete();

    // full-length burst
    send(INSTR_BLEN_ACQ, 32'd50);  // limited to MAX_BURST
    send(INSTR_ADDR_ACQ, 32'h0000_0200);
    send(INSTR_BURST_WRITE, '0);
    wait_idle(cyc);
    for (int i = 0; i < MAX_BURST; i++)
      check(mem.mem[128 + i] == bdata[i], $sformatf("max burst word %0d", i));

    // timeout while the slave never accepts the address
    w0 = mem.n_writes;
    stall = 1'b1;
    send(INSTR_ADDR_ACQ, 32'h0000_0300);
    send(INSTR_WRITE, '0);
    wait_idle(cyc);
    @(posedge clk);
    check(last_busy_len == TIMEOUT + 1, $sformatf("A timeout after %0d cycles", last_busy_len));
    check(mem.n_writes == w0, "no write during stall");
    stall = 1'b0;

    // timeout while the slave never answers a read
    mute = 1'b1;
    send(INSTR_READ, '0);
    wait_idle(cyc);
    check(!busy && cyc < 3 * TIMEOUT, "D timeout returns to idle");
    repeat (10) @(posedge tck);
    check(got.size() == 0, "nothing forwarded after a timeout");
    mute = 1'b0;
    @(posedge clk) flush = 1'b1;
    @(posedge clk) flush = 1'b0;

    // outside the window: not issued
    w0 = mem.n_writes;
    send(INSTR_ADDR_ACQ, 32'h0001_0000);
    send(INSTR_WRITE, '0);
    wait_idle(cyc);
    check(cyc < 10 && mem.n_writes == w0, "access outside window dropped");

    // still working afterwards
    send(INSTR_ADDR_ACQ, 32'h0000_0004);
    send(INSTR_DATA_ACQ, 32'h0BAD_CAFE);
    send(INSTR_WRITE, '0);
    wait_idle(cyc);
    send(INSTR_READ, '0);
    wait_idle(cyc);
    repeat (20) @(posedge tck);
    check(got.size() == 1 && got[0] == 32'h0BAD_CAFE, "write/read after recovery");
    check(mem.protocol_errors == 0, "slave saw legal single-beat transfers");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
