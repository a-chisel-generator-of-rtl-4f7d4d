// tl_mem_model: behavioural TileLink-UL slave memory for the testbenches.
// Accepts PutFullData and Get on channel A with a random ready, answers on
// channel D after a random wait with AccessAck / AccessAckData. `stall`
// keeps a_ready low, `mute` accepts requests but never answers, `slow`
// makes each answer wait SLOW_WAIT cycles. Counts
// writes, reads and malformed requests (wrong size or partial mask).
`timescale 1ns/1ps
module tl_mem_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned SRC_W  = 4,
  parameter int unsigned SIZE_W = 3,
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned SLOW_WAIT = 150
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                stall,
  input  logic                mute,
  input  logic                slow,
  input  logic [2:0]          a_opcode,
  input  logic [SIZE_W-1:0]   a_size,
  input  logic [SRC_W-1:0]    a_source,
  input  logic [ADDR_W-1:0]   a_address,
  input  logic [DATA_W/8-1:0] a_mask,
  input  logic [DATA_W-1:0]   a_data,
  input  logic                a_valid,
  output logic                a_ready,
  output logic [2:0]          d_opcode,
  output logic [SIZE_W-1:0]   d_size,
  output logic [SRC_W-1:0]    d_source,
  output logic [DATA_W-1:0]   d_data,
  output logic                d_valid,
  input  logic                d_ready
);
  localparam int unsigned LSB = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [WORDS];
  logic              pend, rnd_a;
  logic [2:0]        op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] data_q;
  int                n_writes, n_reads, protocol_errors, wait_cnt;
  logic              go;

  assign go = !slow || wait_cnt >= SLOW_WAIT;

  assign a_ready  = rnd_a && !pend && !d_valid && !stall;
  assign d_size   = SIZE_W'(LSB);
  assign d_source = '0;

  function automatic int idx(input logic [ADDR_W-1:0] a);
    return int'((a >> LSB) % WORDS);
  endfunction

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (reset) begin
      pend <= 1'b0; d_valid <= 1'b0; rnd_a <= 1'b0;
      d_opcode <= '0; d_data <= '0;
      n_writes <= 0; n_reads <= 0; protocol_errors <= 0; wait_cnt <= 0;
    end else begin
      rnd_a <= 1'($urandom);
      wait_cnt <= pend ? wait_cnt + 1 : 0;
      if (a_valid && a_ready) begin
        pend   <= 1'b1;
        op_q   <= a_opcode;
        addr_q <= a_address;
        data_q <= a_data;
        if (a_size != SIZE_W'(LSB) || a_mask != '1 || (a_opcode != 3'd0 && a_opcode != 3'd4))
          protocol_errors <= protocol_errors + 1;
      end
      if (pend && !d_valid && !mute && go && 1'($urandom)) begin
        pend    <= 1'b0;
        d_valid <= 1'b1;
        if (op_q == 3'd0) begin
          mem[idx(addr_q)] <= data_q;
          d_opcode <= 3'd0;
          n_writes <= n_writes + 1;
        end else begin
          d_data   <= mem[idx(addr_q)];
          d_opcode <= 3'd1;
          n_reads  <= n_reads + 1;
        end
      end
      if (d_valid && d_ready) d_valid <= 1'b0;
    end
  end
endmodule
