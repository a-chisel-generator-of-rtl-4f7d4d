// jtag_mm_bridge: JTAG to memory-mapped bus master bridge (top level).
//
// A host drives the four JTAG wires; the bridge turns the instructions it
// receives into write, read, burst-write and burst-read transactions on a
// memory-mapped bus, and returns read data serially on TDO. No processor is
// involved, so the slaves on the bus can be configured and tested on their own.
//
// Structure: jtag_controller (TCK domain) passes the instruction code and
// the data word to a bus controller (system clock domain), which is either
// axi4_controller (USE_TILELINK = 0, the default) or tilelink_controller
// (USE_TILELINK = 1). Read data goes the other way through a valid /
// received handshake. The unused master port of the two is tied to zero and
// its inputs are left unread.
//
// Clocks and resets: tck and clk are asynchronous to each other; TCK must be
// clearly slower than clk (the published bridge ran 15 MHz against 100 MHz).
// async_reset (active high) resets the JTAG side at once; reset (active high,
// synchronous to clk) resets the bus side.
//
// Parameters follow the published generator: data/address width 32 or 64,
// 4-bit instruction codes, a selectable initial (no-operation) instruction,
// the maximum burst length and the address window the master may access.
// The default burst length limit, the timeout and the ID/source widths are
// this design's choices.
module jtag_mm_bridge
  import jtag_bridge_pkg::*;
#(
  parameter int unsigned       IR_W         = 4,
  parameter int unsigned       DATA_W       = 32,
  parameter int unsigned       ADDR_W       = 32,
  parameter int unsigned       ID_W         = 4,
  parameter int unsigned       SRC_W        = 4,
  parameter int unsigned       SINK_W       = 1,
  parameter int unsigned       SIZE_W       = 3,
  parameter int unsigned       MAX_BURST    = 16,
  parameter int unsigned       TIMEOUT      = 256,
  parameter logic [IR_W-1:0]   INIT_INSTR   = '0,
  parameter logic [ADDR_W-1:0] ADDR_BASE    = '0,
  parameter logic [ADDR_W-1:0] ADDR_LAST    = '1,
  parameter bit                USE_TILELINK = 1'b0
) (
  input  logic                clk,
  input  logic                reset,
  // JTAG
  input  logic                tck,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo_data,
  output logic                tdo_driven,
  input  logic                async_reset,
  output logic                busy,
  // AXI4 master
  output logic [ID_W-1:0]     axi_awid,
  output logic [ADDR_W-1:0]   axi_awaddr,
  output logic [7:0]          axi_awlen,
  output logic [2:0]          axi_awsize,
  output logic [1:0]          axi_awburst,
  output logic [2:0]          axi_awprot,
  output logic                axi_awvalid,
  input  logic                axi_awready,
  output logic [DATA_W-1:0]   axi_wdata,
  output logic [DATA_W/8-1:0] axi_wstrb,
  output logic                axi_wlast,
  output logic                axi_wvalid,
  input  logic                axi_wready,
  input  logic [ID_W-1:0]     axi_bid,
  input  logic [1:0]          axi_bresp,
  input  logic                axi_bvalid,
  output logic                axi_bready,
  output logic [ID_W-1:0]     axi_arid,
  output logic [ADDR_W-1:0]   axi_araddr,
  output logic [7:0]          axi_arlen,
  output logic [2:0]          axi_arsize,
  output logic [1:0]          axi_arburst,
  output logic [2:0]          axi_arprot,
  output logic                axi_arvalid,
  input  logic                axi_arready,
  input  logic [ID_W-1:0]     axi_rid,
  input  logic [DATA_W-1:0]   axi_rdata,
  input  logic [1:0]          axi_rresp,
  input  logic                axi_rlast,
  input  logic                axi_rvalid,
  output logic                axi_rready,
  // TileLink-UL master
  output logic [2:0]          tl_a_opcode,
  output logic [2:0]          tl_a_param,
  output logic [SIZE_W-1:0]   tl_a_size,
  output logic [SRC_W-1:0]    tl_a_source,
  output logic [ADDR_W-1:0]   tl_a_address,
  output logic [DATA_W/8-1:0] tl_a_mask,
  output logic [DATA_W-1:0]   tl_a_data,
  output logic                tl_a_corrupt,
  output logic                tl_a_valid,
  input  logic                tl_a_ready,
  input  logic [2:0]          tl_d_opcode,
  input  logic [1:0]          tl_d_param,
  input  logic [SIZE_W-1:0]   tl_d_size,
  input  logic [SRC_W-1:0]    tl_d_source,
  input  logic [SINK_W-1:0]   tl_d_sink,
  input  logic                tl_d_denied,
  input  logic [DATA_W-1:0]   tl_d_data,
  input  logic                tl_d_corrupt,
  input  logic                tl_d_valid,
  output logic                tl_d_ready
);
  localparam int unsigned DR_W = (DATA_W > ADDR_W) ? DATA_W : ADDR_W;

  logic [IR_W-1:0]   instruction;
  logic [DR_W-1:0]   jtag_data;
  logic              update_tgl;
  logic [DATA_W-1:0] rd_data;
  logic              rd_valid, received_in, received_end;
  tap_state_e        tap_state;

  jtag_controller #(
    .IR_W(IR_W), .DATA_W(DATA_W), .DR_W(DR_W), .INIT_INSTR(INIT_INSTR)
  ) u_jtag (
    .tck(tck), .tms(tms), .tdi(tdi),
    .tdo_data(tdo_data), .tdo_driven(tdo_driven), .async_reset(async_reset),
    .instruction(instruction), .data_out(jtag_data), .update_tgl(update_tgl),
    .data_in(rd_data), .valid_in(rd_valid),
    .received_in(received_in), .received_end(received_end),
    .tap_state(tap_state)
  );

  if (!USE_TILELINK) begin : g_axi4
    axi4_controller #(
      .IR_W(IR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .DR_W(DR_W), .ID_W(ID_W),
      .MAX_BURST(MAX_BURST), .TIMEOUT(TIMEOUT), .INIT_INSTR(INIT_INSTR),
      .ADDR_BASE(ADDR_BASE), .ADDR_LAST(ADDR_LAST)
    ) u_ctrl (
      .clk(clk), .reset(reset),
      .instruction(instruction), .data_in(jtag_data), .update_tgl(update_tgl),
      .data_out(rd_data), .valid_out(rd_valid),
      .received_in(received_in), .received_end(received_end), .busy(busy),
      .awid(axi_awid), .awaddr(axi_awaddr), .awlen(axi_awlen), .awsize(axi_awsize),
      .awburst(axi_awburst), .awprot(axi_awprot), .awvalid(axi_awvalid),
      .awready(axi_awready),
      .wdata(axi_wdata), .wstrb(axi_wstrb), .wlast(axi_wlast), .wvalid(axi_wvalid),
      .wready(axi_wready),
      .bid(axi_bid), .bresp(axi_bresp), .bvalid(axi_bvalid), .bready(axi_bready),
      .arid(axi_arid), .araddr(axi_araddr), .arlen(axi_arlen), .arsize(axi_arsize),
      .arburst(axi_arburst), .arprot(axi_arprot), .arvalid(axi_arvalid),
      .arready(axi_arready),
      .rid(axi_rid), .rdata(axi_rdata), .rresp(axi_rresp), .rlast(axi_rlast),
      .rvalid(axi_rvalid), .rready(axi_rready)
    );
    assign tl_a_opcode  = '0;
    assign tl_a_param   = '0;
    assign tl_a_size    = '0;
    assign tl_a_source  = '0;
    assign tl_a_address = '0;
    assign tl_a_mask    = '0;
    assign tl_a_data    = '0;
    assign tl_a_corrupt = 1'b0;
    assign tl_a_valid   = 1'b0;
    assign tl_d_ready   = 1'b0;
  end else begin : g_tilelink
    tilelink_controller #(
      .IR_W(IR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .DR_W(DR_W),
      .SRC_W(SRC_W), .SINK_W(SINK_W), .SIZE_W(SIZE_W),
      .MAX_BURST(MAX_BURST), .TIMEOUT(TIMEOUT), .INIT_INSTR(INIT_INSTR),
      .ADDR_BASE(ADDR_BASE), .ADDR_LAST(ADDR_LAST)
    ) u_ctrl (
      .clk(clk), .reset(reset),
      .instruction(instruction), .data_in(jtag_data), .update_tgl(update_tgl),
      .data_out(rd_data), .valid_out(rd_valid),
      .received_in(received_in), .received_end(received_end), .busy(busy),
      .a_opcode(tl_a_opcode), .a_param(tl_a_param), .a_size(tl_a_size),
      .a_source(tl_a_source), .a_address(tl_a_address), .a_mask(tl_a_mask),
      .a_data(tl_a_data), .a_corrupt(tl_a_corrupt), .a_valid(tl_a_valid),
      .a_ready(tl_a_ready),
      .d_opcode(tl_d_opcode), .d_param(tl_d_param), .d_size(tl_d_size),
      .d_source(tl_d_source), .d_sink(tl_d_sink), .d_denied(tl_d_denied),
      .d_data(tl_d_data), .d_corrupt(tl_d_corrupt), .d_valid(tl_d_valid),
      .d_ready(tl_d_ready)
    );
    assign axi_awid    = '0;
    assign axi_awaddr  = '0;
    assign axi_awlen   = '0;
    assign axi_awsize  = '0;
    assign axi_awburst = '0;
    assign axi_awprot  = '0;
    assign axi_awvalid = 1'b0;
    assign axi_wdata   = '0;
    assign axi_wstrb   = '0;
    assign axi_wlast   = 1'b0;
    assign axi_wvalid  = 1'b0;
    assign axi_bready  = 1'b0;
    assign axi_arid    = '0;
    assign axi_araddr  = '0;
    assign axi_arlen   = '0;
    assign axi_arsize  = '0;
    assign axi_arburst = '0;
    assign axi_arprot  = '0;
    assign axi_arvalid = 1'b0;
    assign axi_rready  = 1'b0;
  end
endmodule
