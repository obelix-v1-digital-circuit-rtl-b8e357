// tb_serializer: random 10-bit symbols are presented on din; the one latched
// at each load must appear on tx_out bit 0 first, one bit per half period of
// the 160 MHz clock (320 Mb/s): even bits while clk is high, odd bits while
// clk is low. The line is sampled 0.5 ns after every clock edge; the sample
// interval is checked to be 1.5625 ns and load must pulse every 5 cycles.
`include "tb_macros.svh"
module tb_serializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tx_out, load;
  logic [9:0] din = 0;
  always #1.5625 clk = ~clk;
  serializer dut (.*);

  logic [9:0] codes [$];
  int start [$];
  bit bits [$];
  realtime last_t = 0;
  int n_load = 0, since_load = 0, bad_gap = 0;

  always @(posedge clk) if (rst_n) begin
    since_load++;
    if (load) begin
      codes.push_back(din);
      start.push_back(bits.size());
      if (n_load > 0 && since_load != 5) bad_gap++;
      since_load = 0;
      n_load++;
    end
  end
  always @(clk) if (rst_n) begin
    #0.5;
    if (last_t != 0 && (($realtime - last_t) < 1.56 || ($realtime - last_t) > 1.565)) begin bad_gap++; $display("gap %f at %t", $realtime - last_t, $realtime); end
    last_t = $realtime;
    bits.push_back(tx_out);
  end
  always @(negedge clk) din = 10'($urandom);

  initial begin #1000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2000) @(negedge clk);
    `CHECK(n_load > 390, $sformatf("%0d symbols loaded", n_load))
    `CHECK(bad_gap == 0, "load every 5 cycles, one bit per half period")
    for (int i = 0; i + 1 < codes.size(); i++) begin
      logic [9:0] got;
      for (int j = 0; j < 10; j++) got[j] = bits[start[i] + j];
      `CHECK(got == codes[i], $sformatf("symbol %0d: sent %b, expected %b (bit 0 first)", i, got, codes[i]))
    end
    `TB_FINISH
  end
endmodule
