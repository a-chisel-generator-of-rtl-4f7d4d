// tb_jtag_mm_bridge_tck30: the three-peripheral system test of
// tb_jtag_mm_bridge_sys3 run with a 30 MHz TCK against the 100 MHz system
// clock, i.e. the JTAG clock at the top of what a typical USB-to-JTAG cable
// in GPIO mode produces and a TCK:clk ratio of 1:3.3 instead of about 1:6.6.
// The bridge needs TCK slower than the system clock; this checks that the
// clock-domain crossing still works with half the margin of the usual setup.
//
// Same system as the sys3 test: the interconnect is axi4_decoder_model
// (slave = address bits [29:28]) and each peripheral is an axi4_mem_model
// register file with random ready and response delays. Same checks: values
// land in the right slave and read back over TDO, each slave counts exactly
// its own transactions, no protocol errors, and at least three switches
// between slaves.
`timescale 1ns/1ps
module tb_jtag_mm_bridge_tck30;
  import jtag_bridge_pkg::*;
  localparam int unsigned IR_W = 4, DATA_W = 32, ADDR_W = 32, ID_W = 4;
  localparam logic [31:0] MUX_BASE = 32'h0000_0000, NCO_BASE = 32'h1000_0000;
  localparam logic [31:0] FFT_BASE = 32'h2000_0000;

  logic clk = 1'b0, reset = 1'b1, async_reset = 1'b0, busy;
  always #5 clk = ~clk;

  jtag_host_if #(.IR_W(IR_W), .MAX_BITS(64), .TCK_HALF(16.667ns)) jh ();

  // master side
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
  logic [3:0] tl_a_mask;
  logic [DATA_W-1:0] tl_a_data;
  logic tl_a_corrupt, tl_a_valid, tl_d_ready;

  // slave side
  logic [ID_W-1:0]     s_awid [3], s_bid [3], s_arid [3], s_rid [3];
  logic [ADDR_W-1:0]   s_awaddr [3], s_araddr [3];
  logic [7:0]          s_awlen [3], s_arlen [3];
  logic                s_awvalid [3], s_awready [3], s_wlast [3], s_wvalid [3], s_wready [3];
  logic                s_bvalid [3], s_bready [3], s_arvalid [3], s_arready [3];
  logic                s_rlast [3], s_rvalid [3], s_rready [3];
  logic [1:0]          s_bresp [3], s_rresp [3];
  logic [DATA_W-1:0]   s_wdata [3], s_rdata [3];
  logic [DATA_W/8-1:0] s_wstrb [3];

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

  axi4_decoder_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .ID_W(ID_W)) xbar (
    .clk(clk), .reset(reset),
    .m_awid(awid), .m_awaddr(awaddr), .m_awlen(awlen), .m_awvalid(awvalid),
    .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast),
    .m_wvalid(wvalid), .m_wready(wready), .m_bid(bid), .m_bresp(bresp),
    .m_bvalid(bvalid), .m_bready(bready), .m_arid(arid), .m_araddr(araddr),
    .m_arlen(arlen), .m_arvalid(arvalid), .m_arready(arready), .m_rid(rid),
    .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid),
    .m_rready(rready),
    .s_awid(s_awid), .s_awaddr(s_awaddr), .s_awlen(s_awlen), .s_awvalid(s_awvalid),
    .s_awready(s_awready), .s_wdata(s_wdata), .s_wstrb(s_wstrb), .s_wlast(s_wlast),
    .s_wvalid(s_wvalid), .s_wready(s_wready), .s_bid(s_bid), .s_bresp(s_bresp),
    .s_bvalid(s_bvalid), .s_bready(s_bready), .s_arid(s_arid), .s_araddr(s_araddr),
    .s_arlen(s_arlen), .s_arvalid(s_arvalid), .s_arready(s_arready), .s_rid(s_rid),
    .s_rdata(s_rdata), .s_rresp(s_rresp), .s_rlast(s_rlast), .s_rvalid(s_rvalid),
    .s_rready(s_rready)
  );

  for (genvar i = 0; i < 3; i++) begin : g_slave
    axi4_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .ID_W(ID_W), .WORDS(64)) regs (
      .clk(clk), .reset(reset), .stall(1'b0), .mute(1'b0), .slow(1'b0),
      .awid(s_awid[i]), .awaddr(s_awaddr[i]), .awlen(s_awlen[i]), .awvalid(s_awvalid[i]),
      .awready(s_awready[i]), .wdata(s_wdata[i]), .wstrb(s_wstrb[i]), .wlast(s_wlast[i]),
      .wvalid(s_wvalid[i]), .wready(s_wready[i]), .bid(s_bid[i]), .bresp(s_bresp[i]),
      .bvalid(s_bvalid[i]), .bready(s_bready[i]), .arid(s_arid[i]), .araddr(s_araddr[i]),
      .arlen(s_arlen[i]), .arvalid(s_arvalid[i]), .arready(s_arready[i]), .rid(s_rid[i]),
      .rdata(s_rdata[i]), .rresp(s_rresp[i]), .rlast(s_rlast[i]), .rvalid(s_rvalid[i]),
      .rready(s_rready[i])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // count address handshakes that go to a different slave than the one before
  int last_slave = -1, switches = 0;
  always @(posedge clk) if (!reset) begin
    for (int i = 0; i < 3; i++)
      if ((s_awvalid[i] && s_awready[i]) || (s_arvalid[i] && s_arready[i])) begin
        if (last_slave >= 0 && last_slave != i) switches++;
        last_slave = i;
      end
  end

  logic [31:0] out, w, nco_cfg [4];

  task automatic set_reg(input logic [7:0] code, input logic [31:0] v);
    jh.shift_ir(IR_W'(code));
    jh.shift_dr(64'(v), DATA_W, out);
  endtask

  task automatic wait_idle();
    int n = 0;
    jh.idle(6);
    while (busy && n < 2000) begin
      jh.idle(1);
      n++;
    end
  endtask

  task automatic write_word(input logic [31:0] a, input logic [31:0] d);
    set_reg(INSTR_ADDR_ACQ, a);
    set_reg(INSTR_DATA_ACQ, d);
    jh.shift_ir(IR_W'(INSTR_WRITE));
    wait_idle();
  endtask

  task automatic read_word(output logic [31:0] v);
    jh.idle(25);
    jh.shift_dr(64'h0, DATA_W, out);
    v = out;
    check(jh.driven_ok, "TDO driven for the whole word");
  endtask

  task automatic read_at(input logic [31:0] a, output logic [31:0] v);
    set_reg(INSTR_ADDR_ACQ, a);
    jh.shift_ir(IR_W'(INSTR_READ));
    read_word(v);
    wait_idle();
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

    // configure: multiplexer select, oscillator (burst), transform size and start
    write_word(MUX_BASE, 32'd2);
    for (int i = 0; i < 4; i++) begin
      nco_cfg[i] = $urandom;
      set_reg(INSTR_INDEX_ACQ, 32'(i));
      set_reg(INSTR_IDX_DATA_ACQ, nco_cfg[i]);
    end
    set_reg(INSTR_BLEN_ACQ, 32'd4);
    set_reg(INSTR_ADDR_ACQ, NCO_BASE + 32'h10);
    jh.shift_ir(IR_W'(INSTR_BURST_WRITE));
    wait_idle();
    write_word(FFT_BASE, 32'd1024);
    write_word(FFT_BASE + 32'h4, 32'h1);

    check(g_slave[0].regs.mem[0] == 32'd2, "multiplexer select register");
    for (int i = 0; i < 4; i++)
      check(g_slave[1].regs.mem[4 + i] == nco_cfg[i], $sformatf("oscillator word %0d", i));
    check(g_slave[2].regs.mem[0] == 32'd1024, "transform size register");
    check(g_slave[2].regs.mem[1] == 32'h1, "transform control register");

    // read everything back over TDO
    read_at(MUX_BASE, w);
    check(w == 32'd2, $sformatf("multiplexer read back %h", w));
    set_reg(INSTR_ADDR_ACQ, NCO_BASE + 32'h10);
    jh.shift_ir(IR_W'(INSTR_BURST_READ));
    for (int i = 0; i < 4; i++) begin
      read_word(w);
      check(w == nco_cfg[i], $sformatf("oscillator word %0d read back %h", i, w));
    end
    wait_idle();
    read_at(FFT_BASE, w);
    check(w == 32'd1024, $sformatf("transform size read back %h", w));
    read_at(FFT_BASE + 32'h4, w);
    check(w == 32'h1, $sformatf("transform control read back %h", w));

    // each slave saw exactly its own traffic
    check(g_slave[0].regs.n_writes == 1 && g_slave[0].regs.n_reads == 1, "slave 0 transaction count");
    check(g_slave[1].regs.n_writes == 4 && g_slave[1].regs.n_reads == 4, "slave 1 transaction count");
    check(g_slave[2].regs.n_writes == 2 && g_slave[2].regs.n_reads == 2, "slave 2 transaction count");
    check(g_slave[0].regs.protocol_errors == 0, "slave 0 protocol");
    check(g_slave[1].regs.protocol_errors == 0, "slave 1 protocol");
    check(g_slave[2].regs.protocol_errors == 0, "slave 2 protocol");
    $display("slave switches: %0d", switches);
    check(switches >= 3, "transactions moved between slaves");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
