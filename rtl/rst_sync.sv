// rst_sync: reset synchronizer for one clock domain.
//
// Asserts the local reset asynchronously with the chip reset and releases it
// two rising edges of the local clock after the chip reset is released, so
// that every flip-flop of the domain leaves reset in the same cycle.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic meta;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta  <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      meta  <= 1'b1;
      rst_n <= meta;
    end
  end
endmodule
