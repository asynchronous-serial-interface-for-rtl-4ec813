// sync2: two-flip-flop synchronizer for one asynchronous level.
//
// Every line that arrives from the IMP cable (RFNHB, TYIB, data, LIDB, the
// relay sense) is asynchronous to the card clock. This helper brings one such
// level into the clock domain with two flip-flops; its output lags the input
// by two clock edges. The original card was clockless TTL and needed none;
// the synchronizers belong to this synchronous re-implementation.
// Reset value is the parameter RESET_VAL.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
