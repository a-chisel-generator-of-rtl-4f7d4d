// cdc_sync: two-flop synchronizer for single-bit level signals that cross
// between the TCK and system clock domains of the bridge.
//
// The input is sampled by two back-to-back flops on the destination clock;
// the output lags the input by two destination-clock cycles. Reset (active
// high, asynchronous) forces the output to RESET_VAL. Only used for levels
// and toggles, never for buses: multi-bit values are moved by sampling them
// once a synchronized toggle or handshake says they are stable.
module cdc_sync #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
