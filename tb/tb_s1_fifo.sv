// tb_s1_fifo: pushes hits whose Le lies a few cycles ahead of or behind the
// delayed BCID, with random read back-pressure, and checks against a queue
// model: hits come out in order, a head hit that is no longer waiting (its
// Le reached or passed by the delayed BCID) is discarded with 'expired'
// instead of delivered, no hit is lost otherwise, and the FIFO holds DEPTH.
`include "tb_macros.svh"
module tb_s1_fifo;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  logic [8:0] bcid_dly = 0;
  logic in_ready, out_valid, expired;
  trg_hit_t in_hit = '0, out_hit;
  always #25 clk = ~clk;
  s1_fifo #(.DEPTH(16)) dut (.*);

  trg_hit_t q [$];
  int n_out = 0, n_exp = 0;
  function automatic bit waiting(input logic [8:0] le, input logic [8:0] b);
    int d;
    d = (int'(le) - int'(b) + 512) % 512;
    return d >= 1 && d <= 255;
  endfunction
  always @(posedge clk) if (rst_n) begin
    `CHECK(in_ready == (q.size() < 16), "ready while not full")
    // model of the head: expired heads drop, a live head may be read
    if (q.size() > 0) begin
      if (!waiting(q[0].le, bcid_dly)) begin
        `CHECK(expired && !out_valid, "expired head discarded")
        void'(q.pop_front()); n_exp++;
      end else begin
        `CHECK(out_valid && out_hit == q[0], "live head presented")
        if (out_ready) begin void'(q.pop_front()); n_out++; end
      end
    end else begin
      `CHECK(!out_valid && !expired, "empty")
    end
    if (in_valid && in_ready) q.push_back(in_hit);
  end

  initial begin #2000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      bcid_dly = bcid_dly + 1;
      in_valid = ($urandom_range(0, 1) == 1);
      in_hit = '{row: 10'($urandom), colb: 3'($urandom), le: bcid_dly + 9'($urandom_range(0, 24)) - 9'd2, te: 7'($urandom)};
      out_ready = (n < 2500) ? ($urandom_range(0, 3) == 0) : 1'b1;
    end
    in_valid = 0;
    repeat (40) @(negedge clk);
    `CHECK(q.size() == 0, "drained")
    `CHECK(n_out > 300 && n_exp > 100, $sformatf("both paths used: %0d read, %0d expired", n_out, n_exp))
    `TB_FINISH
  end
endmodule
