// tb_jtag_mm_bridge_w64: end-to-end test of the bridge built with 64-bit
// data and 64-bit addresses (the wider of the two bus widths of the
// generator), AXI4 master, other parameters at their defaults. The DR scans
// are therefore 64 bits long. Checks a single write and read at an address
// above 4 GiB and a burst write / burst read of four 64-bit words at
// consecutive 8-byte addresses, and that the AXI4 SIZE field says 8 bytes.
`timescale 1ns/1ps
module tb_jtag_mm_bridge_w64;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 64, ADDR_W = 64, ID_W = 4;

  logic clk = 1'b0, reset = 1'b1, async_reset = 1'b0, busy;
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
  logic [2:0] tl_a_opcode, tl_a_param, tl_a_size;
  logic [3:0] tl_a_source;
  logic [ADDR_W-1:0] tl_a_address;
  logic [7:0] tl_a_mask;
  logic [DATA_W-1:0] tl_a_data;
  logic tl_a_corrupt, tl_a_valid, tl_d_ready;

  jtag_mm_bridge #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (
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

  axi4_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .ID_W(ID_W), .WORDS(256)) mem (
    .clk(clk), .reset(reset), .stall(1'b0), .mute(1'b0), .slow(1'b0),
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
      $display("FAIL %s", what);
    end
  endtask

  logic [63:0] out, w, bdata [4];
  logic [63:0] seen_addr [$];

  always @(posedge clk) if (!reset && awvalid && awready) begin
    seen_addr.push_back(awaddr);
    if (awsize != 3'd3) begin
      failures++;
      $display("FAIL AWSIZE %0d", awsize);
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

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
