// tb_eoc: feeds random hits with random BCIDs and checks the 9-bit Le
// extension against a model (the latest 9-bit value not after the BCID
// whose low 7 bits equal the hit's Le), order and content of the buffered
// hits under random output back-pressure, the S0 capacity, hit_en
// discarding and clear.
`include "tb_macros.svh"
module tb_eoc;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, hit_en = 1, hit_valid = 0, out_ready = 0;
  logic [8:0] bcid = 0;
  logic hit_ready, out_valid;
  dc_hit_t hit = '0;
  eoc_hit_t out_hit;
  always #25 clk = ~clk;
  eoc #(.S0_DEPTH(2)) dut (.*);

  eoc_hit_t exp_q [$];
  int n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      n_out++;
      `CHECK(exp_q.size() > 0 && out_hit == exp_q.pop_front(), "hit content and order")
    end
    if (hit_valid && hit_ready && hit_en && !clear) begin
      int le9;
      le9 = int'(bcid) - ((int'(bcid) - int'(hit.le)) & 127);
      exp_q.push_back('{row: hit.row, col: hit.col, le: 9'(le9), te: hit.te});
    end
  end

  initial begin #2000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      bcid = 9'($urandom);
      hit_valid = ($urandom_range(0, 2) != 0);
      hit = '{row: 10'($urandom), col: 1'($urandom), le: 7'($urandom), te: 7'($urandom)};
      out_ready = ($urandom_range(0, 2) != 0);
      hit_en = (n < 1500) || (n > 1700);
      if (n == 1000) begin out_ready = 0; hit_valid = 1; end
    end
    @(negedge clk) begin hit_valid = 0; out_ready = 1; end
    repeat (4) @(negedge clk);
    `CHECK(exp_q.size() == 0, "all accepted hits delivered")
    `CHECK(n_out > 500, "hits flowed")
    // capacity: two hits fill S0
    out_ready = 0; hit_valid = 1;
    repeat (2) @(negedge clk);
    `CHECK(!hit_ready && out_valid, "S0 full after two hits")
    hit_valid = 0;
    clear = 1;
    @(negedge clk) clear = 0;
    exp_q.delete();
    `CHECK(!out_valid && hit_ready, "clear empties S0")
    `TB_FINISH
  end
endmodule
