// bcid_counter: bunch-crossing ID counter of the trigger unit.
//
// A 9-bit counter on the 20 MHz BCID clock that wraps modulo 512; it is the
// timestamp against which the end of column extends the pixels' leading
// edges. Alongside it runs the delayed BCID, bcid - latency (modulo 512),
// the timestamp of the hits whose trigger is due in the current cycle. Both
// outputs are registered and change together. BCID and delayed BCID as
// separate outputs follow the clock-path diagram; the width follows the 9-bit
// Le timestamp; the reset value 0 is this design's own.
module bcid_counter
  import obelix_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BCID_W-1:0] latency,
  output logic [BCID_W-1:0] bcid,
  output logic [BCID_W-1:0] bcid_dly
);
  logic [BCID_W-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end
  assign bcid     = cnt;
  assign bcid_dly = cnt - latency;
endmodule
