// tb_jtag_mm_bridge_tl64: end-to-end test of the bridge built with the
// TileLink-UL master and 64-bit data and addresses, other parameters at
// their defaults. DR scans are 64 bits long. Checks a single write and read
// at an address above 4 GiB and a burst write / burst read of four 64-bit
// words at consecutive 8-byte addresses. Every channel-A request must carry
// a_size = 3 (8 bytes) and a full 8-bit mask, the slave model counts
// anything else, and the AXI4 port must stay silent.
`timescale 1ns/1ps
module tb_jtag_mm_bridge_tl64;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 64, ADDR_W = 64;

  logic clk = 1'b0, reset = 1'b1, async_reset = 1'b0, busy;
  always #5 clk = ~clk;

  jtag_host_if #(.IR_W(IR_W), .MAX_BITS(64)) jh ();

  logic [3:0] awid, arid;
  logic [ADDR_W-1:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize, awprot, arprot;
  logic [1:0] awburst, arburst;
  logic awvalid, wlast, wvalid, bready, arvalid, rready;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W/8-1:0] wstrb;
  logic [2:0] a_opcode, a_param, a_size, d_opcode, d_size;
  logic [3:0] a_source, d_source;
  logic [ADDR_W-1:0] a_address;
  logic [DATA_W/8-1:0] a_mask;
  logic [DATA_W-1:0] a_data, d_data;
  logic a_corrupt, a_valid, a_ready, d_valid, d_ready;

  jtag_mm_bridge #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .USE_TILELINK(1'b1)) dut (
    .clk(clk), .reset(reset),
    .tck(jh.tck), .tms(jh.tms), .tdi(jh.tdi),
    .tdo_data(jh.tdo), .tdo_driven(jh.tdo_driven), .async_reset(async_reset),
    .busy(busy),
    .axi_awid(awid), .axi_awaddr(awaddr), .axi_awlen(awlen), .axi_awsize(awsize),
    .axi_awburst(awburst), .axi_awprot(awprot), .axi_awvalid(awvalid), .axi_awready(1'b0),
    .axi_wdata(wdata), .axi_wstrb(wstrb), .axi_wlast(wlast), .axi_wvalid(wvalid),
    .axi_wready(1'b0),
    .axi_bid('0), .axi_bresp('0), .axi_bvalid(1'b0), .axi_bready(bready),
    .axi_arid(arid), .axi_araddr(araddr), .axi_arlen(arlen), .axi_arsize(arsize),
    .axi_arburst(arburst), .axi_arprot(arprot), .axi_arvalid(arvalid), .axi_arready(1'b0),
    .axi_rid('0), .axi_rdata('0), .axi_rresp('0), .axi_rlast(1'b0),
    .axi_rvalid(1'b0), .axi_rready(rready),
    .tl_a_opcode(a_opcode), .tl_a_param(a_param), .tl_a_size(a_size),
    .tl_a_source(a_source), .tl_a_address(a_address), .tl_a_mask(a_mask),
    .tl_a_data(a_data), .tl_a_corrupt(a_corrupt), .tl_a_valid(a_valid),
    .tl_a_ready(a_ready),
    .tl_d_opcode(d_opcode), .tl_d_param('0), .tl_d_size(d_size), .tl_d_source(d_source),
    .tl_d_sink('0), .tl_d_denied(1'b0), .tl_d_data(d_data), .tl_d_corrupt(1'b0),
    .tl_d_valid(d_valid), .tl_d_ready(d_ready)
  );

  tl_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .SRC_W(4), .SIZE_W(3), .WORDS(256)) mem (
    .clk(clk), .reset(reset), .stall(1'b0), .mute(1'b0), .slow(1'b0),
    .a_opcode(a_opcode), .a_size(a_size), .a_source(a_source), .a_address(a_address),
    .a_mask(a_mask), .a_data(a_data), .a_valid(a_valid), .a_ready(a_ready),
    .d_opcode(d_opcode), .d_size(d_size), .d_source(d_source), .d_data(d_data),
    .d_valid(d_valid), .d_ready(d_ready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [63:0] out, w, bdata [4];
  logic [63:0] seen_addr [$];

  always @(posedge clk) if (!reset) begin
    if (a_valid && a_ready && a_opcode == TL_A_PUT_FULL_DATA) seen_addr.push_back(a_address);
    if (awvalid || wvalid || arvalid) begin
      failures++;
      $display("FAIL AXI4 port active in the TileLink build");
    end
  end

  task automatic set_reg(input logic [7:0] code, input logic [63:0] v);
    jh.shift_ir(IR_W'(code));
    jh.shift_dr(v, 64, out);
  endtask

  task automatic wait_idle();
    int n = 0;
    jh.idle(6);
    while (busy && n < 2000) begin
      jh.idle(1);
      n++;
    end
  endtask

  task automatic read_word(output logic [63:0] v);
    jh.idle(25);
    jh.shift_dr(64'h0, 64, out);
    v = out;
    check(jh.driven_ok, "TDO driven for all 64 bits");
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3 async_reset = 1'b1;
    #20 async_reset = 1'b0;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    jh.reset_tap();

    set_reg(INSTR_ADDR_ACQ, 64'h0000_0001_0000_0040);
    set_reg(INSTR_DATA_ACQ, 64'h0123_4567_89AB_CDEF);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
    check(seen_addr.size() == 1 && seen_addr[0] == 64'h0000_0001_0000_0040, "64-bit write address");
    check(mem.mem[8] == 64'h0123_4567_89AB_CDEF, "64-bit write data");
    jh.shift_ir(IR_W'(INSTR_READ));
    read_word(w);
    check(w == 64'h0123_4567_89AB_CDEF, $sformatf("64-bit read returned %h", w));

    for (int i = 0; i < 4; i++) begin
      bdata[i] = {$urandom, $urandom};
      set_reg(INSTR_INDEX_ACQ, 64'(i));
      set_reg(INSTR_IDX_DATA_ACQ, bdata[i]);
    end
    set_reg(INSTR_ADDR_ACQ, 64'h0000_0002_0000_0100);
    set_reg(INSTR_BLEN_ACQ, 64'd4);
    jh.shift_ir(IR_W'(INSTR_BURST_WRITE));
    wait_idle();
    for (int i = 0; i < 4; i++) begin
      check(mem.mem[32 + i] == bdata[i], $sformatf("burst word %0d in memory", i));
      check(seen_addr.size() == 5 && seen_addr[1 + i] == 64'h0000_0002_0000_0100 + 64'(8 * i),
            $sformatf("burst address %0d", i));
    end
    jh.shift_ir(IR_W'(INSTR_BURST_READ));
    for (int i = 0; i < 4; i++) begin
      read_word(w);
      check(w == bdata[i], $sformatf("burst read word %0d: %h", i, w));
    end
    wait_idle();
    check(mem.protocol_errors == 0, "channel A size and mask");
    check(mem.n_writes == 5 && mem.n_reads == 5, "TileLink request count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
