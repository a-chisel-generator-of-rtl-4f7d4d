// axi4_decoder_model: behavioural one-master, three-slave AXI4 interconnect
// for the system testbench. It stands in for the bus a real system puts
// between the bridge and its peripherals; it is not part of the bridge.
//
// How it works: address bits [29:28] select the slave (0, 1 or 2; the value 3
// aliases slave 2). The write path is routed by the address of the current
// AW request; the choice is remembered after AW has been accepted so that
// the W beat and the B response reach and come from the same slave. The read
// path does the same with AR and R. This is enough because the bridge has at
// most one transaction outstanding. Channels of the slaves that are not
// selected see VALID and READY low.
//
// Interface: master side as plain AXI4 signals, slave side as unpacked arrays
// indexed by slave number. Purely combinational apart from the two
// remembered selections; adds no latency.
`timescale 1ns/1ps
module axi4_decoder_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned ID_W   = 4
) (
  input  logic                clk,
  input  logic                reset,
  // master side
  input  logic [ID_W-1:0]     m_awid,
  input  logic [ADDR_W-1:0]   m_awaddr,
  input  logic [7:0]          m_awlen,
  input  logic                m_awvalid,
  output logic                m_awready,
  input  logic [DATA_W-1:0]   m_wdata,
  input  logic [DATA_W/8-1:0] m_wstrb,
  input  logic                m_wlast,
  input  logic                m_wvalid,
  output logic                m_wready,
  output logic [ID_W-1:0]     m_bid,
  output logic [1:0]          m_bresp,
  output logic                m_bvalid,
  input  logic                m_bready,
  input  logic [ID_W-1:0]     m_arid,
  input  logic [ADDR_W-1:0]   m_araddr,
  input  logic [7:0]          m_arlen,
  input  logic                m_arvalid,
  output logic                m_arready,
  output logic [ID_W-1:0]     m_rid,
  output logic [DATA_W-1:0]   m_rdata,
  output logic [1:0]          m_rresp,
  output logic                m_rlast,
  output logic                m_rvalid,
  input  logic                m_rready,
  // slave side
  output logic [ID_W-1:0]     s_awid    [3],
  output logic [ADDR_W-1:0]   s_awaddr  [3],
  output logic [7:0]          s_awlen   [3],
  output logic                s_awvalid [3],
  input  logic                s_awready [3],
  output logic [DATA_W-1:0]   s_wdata   [3],
  output logic [DATA_W/8-1:0] s_wstrb   [3],
  output logic                s_wlast   [3],
  output logic                s_wvalid  [3],
  input  logic                s_wready  [3],
  input  logic [ID_W-1:0]     s_bid     [3],
  input  logic [1:0]          s_bresp   [3],
  input  logic                s_bvalid  [3],
  output logic                s_bready  [3],
  output logic [ID_W-1:0]     s_arid    [3],
  output logic [ADDR_W-1:0]   s_araddr  [3],
  output logic [7:0]          s_arlen   [3],
  output logic                s_arvalid [3],
  input  logic                s_arready [3],
  input  logic [ID_W-1:0]     s_rid     [3],
  input  logic [DATA_W-1:0]   s_rdata   [3],
  input  logic [1:0]          s_rresp   [3],
  input  logic                s_rlast   [3],
  input  logic                s_rvalid  [3],
  output logic                s_rready  [3]
);
  function automatic int unsigned decode(input logic [ADDR_W-1:0] a);
    return (a[29:28] == 2'd3) ? 2 : int'(a[29:28]);
  endfunction

  int unsigned wsel, rsel, wsel_q, rsel_q;

  assign wsel = m_awvalid ? decode(m_awaddr) : wsel_q;
  assign rsel = m_arvalid ? decode(m_araddr) : rsel_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      wsel_q <= 0;
      rsel_q <= 0;
    end else begin
      wsel_q <= wsel;
      rsel_q <= rsel;
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      s_awid[i]    = m_awid;
      s_awaddr[i]  = m_awaddr;
      s_awlen[i]   = m_awlen;
      s_awvalid[i] = m_awvalid && wsel == i;
      s_wdata[i]   = m_wdata;
      s_wstrb[i]   = m_wstrb;
      s_wlast[i]   = m_wlast;
      s_wvalid[i]  = m_wvalid && wsel == i;
      s_bready[i]  = m_bready && wsel == i;
      s_arid[i]    = m_arid;
      s_araddr[i]  = m_araddr;
      s_arlen[i]   = m_arlen;
      s_arvalid[i] = m_arvalid && rsel == i;
      s_rready[i]  = m_rready && rsel == i;
    end
    m_awready = s_awready[wsel];
    m_wready  = s_wready[wsel];
    m_bid     = s_bid[wsel];
    m_bresp   = s_bresp[wsel];
    m_bvalid  = s_bvalid[wsel];
    m_arready = s_arready[rsel];
    m_rid     = s_rid[rsel];
    m_rdata   = s_rdata[rsel];
    m_rresp   = s_rresp[rsel];
    m_rlast   = s_rlast[rsel];
    m_rvalid  = s_rvalid[rsel];
  end
endmodule
