// tb_bcid_counter: checks that the BCID counts one per cycle modulo 512 and
// that the delayed BCID equals BCID minus the latency for several latencies.
`include "tb_macros.svh"
module tb_bcid_counter;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [8:0] latency = 9'd100, bcid, bcid_dly;
  always #25 clk = ~clk;
  bcid_counter dut (.*);
  initial begin #200000; failures++; $display("watchdog expired"); `TB_FINISH end
  initial begin
    int exp_b;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_b = 0;
    for (int n = 0; n < 1200; n++) begin
      if (n % 300 == 0) latency = 9'($urandom_range(1, 255));
      #1;
      `CHECK(bcid == 9'(exp_b), "bcid counts modulo 512")
      `CHECK(bcid_dly == 9'(exp_b - int'(latency)), "delayed bcid")
      @(negedge clk);
      exp_b = (exp_b + 1) % 512;
    end
    `TB_FINISH
  end
endmodule
