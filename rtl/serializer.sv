// serializer: 10:1 serializer at 320 Mb/s from a 160 MHz clock.
//
// A 10-bit symbol arrives every 5 cycles of clk (32 MHz word rate). It is
// split into its even bits (0,2,4,6,8) and odd bits (1,3,5,7,9). The even
// bits go to a 5-bit shift register clocked by the rising edge of clk, the
// odd bits to one clocked by the rising edge of the inverted clock clk_n
// (the falling edge of clk). The line output takes the even register while
// clk is high and the odd register while clk is low, so bit 0, bit 1, ...,
// bit 9 leave in that order, two bits per clk period. Bit 0 of a symbol is
// on the line for the half period after the rising edge at which the symbol
// is loaded; the load happens every 5 cycles, at a phase set by an own
// counter (the symbol is stable for 5 cycles, so any phase takes each
// symbol once). The even/odd split, the two clock phases and the level-
// selected output follow the serializer concept of the specification; the
// load counter is this design's own. The output multiplexer is selected by
// the clock itself, as the specification describes; in a real chip it is a
// dedicated cell whose timing must be checked.
module serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  output logic       tx_out,
  output logic       load     // high in the cycle before a symbol is taken
);
  logic [2:0] cnt;
  logic [4:0] even_sr, odd_sr, odd_hold;
  logic       odd_load;
  logic       clk_n;

  assign clk_n = ~clk;
  assign load  = (cnt == 3'd4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      even_sr  <= '0;
      odd_hold <= '0;
      odd_load <= 1'b0;
    end else begin
      cnt      <= load ? 3'd0 : cnt + 3'd1;
      odd_load <= load;
      if (load) begin
        even_sr  <= {din[8], din[6], din[4], din[2], din[0]};
        odd_hold <= {din[9], din[7], din[5], din[3], din[1]};
      end else begin
        even_sr  <= even_sr >> 1;
      end
    end
  end

  always_ff @(posedge clk_n or negedge rst_n) begin
    if (!rst_n)        odd_sr <= '0;
    else if (odd_load) odd_sr <= odd_hold;
    else               odd_sr <= odd_sr >> 1;
  end

  assign tx_out = clk ? even_sr[0] : odd_sr[0];

endmodule
