// clk_divider: counter-based clock divider of the SCU.
//
// Derives the two internal clocks from the 160 MHz main clock: a
// divide-by-5 clock (32 MHz, for the transmission unit) and a divide-by-8
// clock (20 MHz, for the control and trigger units and the BCID counter).
// Both are counter dividers, as the specification says. The div-8 counter
// is cleared by div8_rst, which the synchronization block raises on each
// detected Sync word, so that the 20 MHz edges keep a fixed phase to the
// 16-bit command frames; because a frame is 16 = 2 x 8 fast cycles, repeated
// clears land where the counter already is and cause no glitch.
// Own choices: clk32 is high for 2 of 5 cycles, clk20 is counter bit 2
// (50 % duty). Outputs change on the rising edge of clk160.
module clk_divider (
  input  logic clk160,
  input  logic rst_n,     // asynchronous, active low
  input  logic div8_rst,  // synchronous phase reset of the div-8 counter
  output logic clk32,
  output logic clk20
);
  logic [2:0] cnt5, cnt8;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) begin
      cnt5  <= '0;
      clk32 <= 1'b0;
    end else begin
      cnt5  <= (cnt5 == 3'd4) ? 3'd0 : cnt5 + 3'd1;
      // high during counts 0 and 1 of the next period
      clk32 <= (cnt5 == 3'd4) || (cnt5 == 3'd0);
    end
  end

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) begin
      cnt8 <= '0;
    end else if (div8_rst) begin
      cnt8 <= '0;
    end else begin
      cnt8 <= cnt8 + 3'd1;
    end
  end

  assign clk20 = cnt8[2];

endmodule
