// axi4_mem_model: behavioural AXI4 slave memory for the testbenches.
// Single-beat transactions only. Ready signals are random each cycle; B and R
// come after a random wait. `stall` keeps every ready low (the slave never
// accepts an address), `mute` accepts addresses but never answers. WORDS
// words of memory, indexed by the word address modulo WORDS. Counts accepted
// writes and reads, and checks that the master sends LEN=0, WLAST=1 and full
// strobes.
`timescale 1ns/1ps
module axi4_mem_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned ID_W   = 4,
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned SLOW_WAIT = 150
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                stall,
  input  logic                mute,
  input  logic                slow,
  input  logic [ID_W-1:0]     awid,
  input  logic [ADDR_W-1:0]   awaddr,
  input  logic [7:0]          awlen,
  input  logic                awvalid,
  output logic                awready,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W/8-1:0] wstrb,
  input  logic                wlast,
  input  logic                wvalid,
  output logic                wready,
  output logic [ID_W-1:0]     bid,
  output logic [1:0]          bresp,
  output logic                bvalid,
  input  logic                bready,
  input  logic [ID_W-1:0]     arid,
  input  logic [ADDR_W-1:0]   araddr,
  input  logic [7:0]          arlen,
  input  logic                arvalid,
  output logic                arready,
  output logic [ID_W-1:0]     rid,
  output logic [DATA_W-1:0]   rdata,
  output logic [1:0]          rresp,
  output logic                rlast,
  output logic                rvalid,
  input  logic                rready
);
  localparam int unsigned LSB = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [WORDS];
  logic              aw_got, w_got, ar_got, rnd_aw, rnd_w, rnd_ar;
  logic [ADDR_W-1:0] aw_q, ar_q;
  logic [DATA_W-1:0] w_q;
  int                n_writes, n_reads, protocol_errors, wait_cnt;
  logic              go;

  assign go = !slow || wait_cnt >= SLOW_WAIT;

  assign awready = rnd_aw && !aw_got && !stall;
  assign wready  = rnd_w  && !w_got  && !stall;
  assign arready = rnd_ar && !ar_got && !stall;
  assign bid     = '0;
  assign bresp   = 2'b00;
  assign rid     = '0;
  assign rresp   = 2'b00;
  assign rlast   = 1'b1;

  function automatic int idx(input logic [ADDR_W-1:0] a);
    return int'((a >> LSB) % WORDS);
  endfunction

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (reset) begin
      aw_got <= 1'b0; w_got <= 1'b0; ar_got <= 1'b0;
      bvalid <= 1'b0; rvalid <= 1'b0; rdata <= '0;
      rnd_aw <= 1'b0; rnd_w <= 1'b0; rnd_ar <= 1'b0;
      n_writes <= 0; n_reads <= 0; protocol_errors <= 0; wait_cnt <= 0;
    end else begin
      rnd_aw <= 1'($urandom);
      rnd_w  <= 1'($urandom);
      rnd_ar <= 1'($urandom);
      wait_cnt <= ((aw_got && w_got) || ar_got) ? wait_cnt + 1 : 0;
      if (awvalid && awready) begin
        aw_got <= 1'b1;
        aw_q   <= awaddr;
        if (awlen != 0) protocol_errors <= protocol_errors + 1;
      end
      if (wvalid && wready) begin
        w_got <= 1'b1;
        w_q   <= wdata;
        if (!wlast || wstrb != '1) protocol_errors <= protocol_errors + 1;
      end
      if (aw_got && w_got && !bvalid && !mute && go && 1'($urandom)) begin
        mem[idx(aw_q)] <= w_q;
        bvalid   <= 1'b1;
        aw_got   <= 1'b0;
        w_got    <= 1'b0;
        n_writes <= n_writes + 1;
      end
      if (bvalid && bready) bvalid <= 1'b0;
      if (arvalid && arready) begin
        ar_got <= 1'b1;
        ar_q   <= araddr;
        if (arlen != 0) protocol_errors <= protocol_errors + 1;
      end
      if (ar_got && !rvalid && !mute && go && 1'($urandom)) begin
        rdata   <= mem[idx(ar_q)];
        rvalid  <= 1'b1;
        ar_got  <= 1'b0;
        n_reads <= n_reads + 1;
      end
      if (rvalid && rready) rvalid <= 1'b0;
    end
  end
endmodule
