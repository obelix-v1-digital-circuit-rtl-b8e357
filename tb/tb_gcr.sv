// tb_gcr: checks reset values, write/read of every register, the decoded
// outputs (latency, trigger and hit enable) and that addresses beyond the
// register file read 0 and do not alias onto real registers.
`include "tb_macros.svh"
module tb_gcr;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0, trig_latency;
  logic [15:0] wr_data = 0, rd_data;
  logic trig_en, hit_en;
  always #25 clk = ~clk;
  gcr #(.NUM_REGS(16)) dut (.*);
  logic [15:0] model [16];

  initial begin #100000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_addr = 0; #1 `CHECK(rd_data == 16'd100, "latency reset value 100")
    `CHECK(trig_latency == 9'd100, "latency output")
    rd_addr = 1; #1 `CHECK(rd_data == 16'h0003, "control reset value")
    `CHECK(trig_en && hit_en, "enables after reset")
    for (int i = 0; i < 16; i++) model[i] = (i == 0) ? 16'd100 : (i == 1) ? 16'd3 : 16'd0;
    for (int n = 0; n < 60; n++) begin
      int a;
      a = $urandom_range(0, 40);
      @(negedge clk) begin wr_en = 1; wr_addr = 9'(a); wr_data = 16'($urandom); end
      if (a < 16) model[a] = wr_data;
      @(negedge clk) wr_en = 0;
      for (int r = 0; r < 18; r++) begin
        rd_addr = (r < 16) ? 9'(r) : 9'(300 + r);
        #1 `CHECK(rd_data == ((r < 16) ? model[r] : 16'h0), $sformatf("read reg %0d", rd_addr))
      end
      `CHECK(trig_latency == model[0][8:0], "latency follows reg 0")
      `CHECK(trig_en == model[1][0] && hit_en == model[1][1], "enables follow reg 1")
    end
    `TB_FINISH
  end
endmodule
