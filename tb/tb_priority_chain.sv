// tb_priority_chain: random request vectors over 112 groups; the grant must
// be one-hot on the lowest requester, its index must match, and 'any' must
// reflect whether anybody requests.
`include "tb_macros.svh"
module tb_priority_chain;
  int checks = 0, failures = 0;
  logic [111:0] req, gnt;
  logic [6:0] gnt_idx;
  logic any;
  priority_chain #(.N(112)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int lo;
      req = {$urandom, $urandom, $urandom, $urandom};
      if (n % 5 == 0) req = req & (req - 1) & {112{n % 10 != 0}};
      if (n % 7 == 0) req = 112'(1) << $urandom_range(0, 111);
      #1;
      lo = -1;
      for (int i = 111; i >= 0; i--) if (req[i]) lo = i;
      `CHECK(any == (lo >= 0), "any")
      `CHECK(gnt == ((lo >= 0) ? (112'(1) << lo) : 112'(0)), "grant is lowest requester")
      if (lo >= 0) `CHECK(gnt_idx == 7'(lo), "grant index")
    end
    `TB_FINISH
  end
endmodule
