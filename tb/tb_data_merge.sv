// tb_data_merge: four random sources with valid/ready; checks that every
// item arrives once and in per-source order, that the grant follows the
// round-robin order (with all sources requesting, sources are served
// 0,1,2,3,0,...), and that no source waits more than three transfers.
`include "tb_macros.svh"
module tb_data_merge;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid = 0, in_ready;
  eoc_hit_t in_hit [4];
  logic out_valid, out_ready = 1;
  eoc_hit_t out_hit;
  logic [1:0] out_src;
  always #25 clk = ~clk;
  data_merge #(.N(4)) dut (.*);

  int sent [4], got [4], wait_cnt [4];
  bit all_mode = 0;
  int last_src = 3;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (out_valid && out_ready && in_valid[i] && !in_ready[i]) wait_cnt[i]++;
      if (in_ready[i] || !in_valid[i]) wait_cnt[i] = 0;
      `CHECK(wait_cnt[i] <= 3, "no source waits over three transfers")
    end
    if (out_valid && out_ready) begin
      `CHECK(out_hit.row == 10'(out_src * 256 + got[out_src] % 256), "item order per source")
      got[out_src]++;
      if (all_mode) `CHECK(out_src == 2'(last_src + 1), "round-robin order")
      last_src = out_src;
    end
  end

  initial begin #2000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    for (int i = 0; i < 4; i++) begin sent[i] = 0; got[i] = 0; wait_cnt[i] = 0; in_hit[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // advance sources whose item was taken at the last edge
      for (int i = 0; i < 4; i++) begin
        if (in_valid[i] && in_ready_q[i]) sent[i]++;
        in_valid[i] = (n >= 2000) ? 1'b1 : ($urandom_range(0, 1) == 1) || in_valid[i] && !in_ready_q[i];
        in_hit[i].row = 10'(i * 256 + sent[i] % 256);
      end
      all_mode = (n >= 2002);
      out_ready = (n >= 2000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    `CHECK(got[0] > 100 && got[1] > 100 && got[2] > 100 && got[3] > 100, "all sources served")
    `TB_FINISH
  end
  // ready as seen at the last rising edge
  logic [3:0] in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;
endmodule
