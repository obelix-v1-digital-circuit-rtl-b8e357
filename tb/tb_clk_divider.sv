// tb_clk_divider: checks the divide-by-5 and divide-by-8 clocks.
// Counts 160 MHz cycles between rising edges of each output (must be 5 and
// 8), checks the duty cycles, and checks that div8_rst restarts the div-8
// phase: the next clk20 rising edge comes 4 fast cycles after the reset
// cycle's edge.
`include "tb_macros.svh"
module tb_clk_divider;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, div8_rst = 0;
  logic clk32, clk20;
  always #3.125 clk160 = ~clk160;

  clk_divider dut (.clk160(clk160), .rst_n(rst_n), .div8_rst(div8_rst), .clk32(clk32), .clk20(clk20));

  int cyc = 0;
  always @(posedge clk160) cyc++;

  int last32 = -1, last20 = -1, n32 = 0, n20 = 0, hi32 = 0, hi20 = 0;
  logic p32 = 0, p20 = 0;
  bit check_periods = 1;
  always @(negedge clk160) begin
    if (rst_n) begin
      if (clk32) hi32++;
      if (clk20) hi20++;
      if (clk32 && !p32) begin
        if (n32 >= 2) `CHECK(cyc - last32 == 5, "clk32 period is 5 cycles")
        last32 = cyc; n32++;
      end
      if (clk20 && !p20) begin
        if (n20 >= 2 && last20 >= 0 && check_periods) `CHECK(cyc - last20 == 8, "clk20 period is 8 cycles")
        last20 = cyc; n20++;
      end
    end
    p32 = clk32; p20 = clk20;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    int c0;
    repeat (3) @(posedge clk160);
    rst_n = 1;
    repeat (40) @(posedge clk160);
    hi32 = 0; hi20 = 0;
    repeat (400) @(posedge clk160);
    `CHECK(n32 >= 70, "clk32 toggles")
    `CHECK(n20 >= 45, "clk20 toggles")
    `CHECK(hi32 >= 158 && hi32 <= 162, "clk32 high 2 of 5 cycles")
    `CHECK(hi20 >= 196 && hi20 <= 204, "clk20 50 percent duty")
    // phase reset in the middle of a period
    @(posedge clk20);
    repeat (2) @(posedge clk160);
    check_periods = 0;
    @(negedge clk160) div8_rst = 1;
    @(negedge clk160) div8_rst = 0;
    `CHECK(clk20 == 0, "clk20 low after phase reset")
    c0 = 0;
    while (!clk20) begin @(negedge clk160); c0++; end
    `CHECK(c0 == 4, "clk20 rises 4 cycles after the phase reset")
    check_periods = 1;
    last20 = -1;
    repeat (100) @(posedge clk160);
    `TB_FINISH
  end
endmodule
