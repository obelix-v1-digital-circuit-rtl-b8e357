// tb_frame_gen: the framer fed from a behavioural first-word-fall-through
// FIFO with a random mix of readback (command) words and pixel words at
// varying rates. Every output symbol goes through the stream monitor, which
// checks that it is a valid 8b/10b code with correct running disparity and
// that packages are well formed (IDLE between packages, SOF/EOF pairs, 3 or
// 5*n data bytes). The rebuilt words must equal the words written, in order;
// pixel words that are queued back to back must be chained in one package.
// sym_byte/sym_k must match the decoded symbol.
`include "tb_macros.svh"
module tb_frame_gen;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  txf_word_t fifo_rdata;
  logic fifo_empty, fifo_ren, sym_k, hit_sent;
  logic [9:0] sym;
  logic [7:0] sym_byte;
  always #15.625 clk = ~clk;
  frame_gen dut (.*);

  txf_word_t q [$];
  logic [23:0] exp_cmd [$];
  logic [39:0] exp_hit [$];
  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = fifo_empty ? '0 : q[0];
  stream_mon mon = new();
  int n_hit_sent = 0, n_ren = 0;

  always @(posedge clk) if (rst_n) begin
    mon.put(sym);
    checks++;
    if (mon.tab[sym][8:0] != {sym_k, sym_byte}) begin failures++; $display("FAIL sym_byte/sym_k mismatch (t=%0t)", $time); end
    if (hit_sent) n_hit_sent++;
    if (fifo_ren) begin
      n_ren++;
      checks++;
      if (fifo_empty) begin failures++; $display("FAIL read from empty FIFO"); end
      else void'(q.pop_front());
    end
  end

  task automatic push(bit is_cmd);
    txf_word_t w;
    w.is_cmd = is_cmd;
    w.data = {$urandom, $urandom};
    if (is_cmd) begin w.data[39:24] = '0; exp_cmd.push_back(w.data[23:0]); end
    else exp_hit.push_back(w.data);
    q.push_back(w);
  endtask

  initial begin #10000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    // a burst of 6 hits queued together -> one chained package
    repeat (6) push(0);
    repeat (60) @(negedge clk);
    `CHECK(mon.chained_pkts == 1 && mon.hits.size() == 6, "six queued hits sent in one package")
    push(1);
    repeat (10) @(negedge clk);
    `CHECK(mon.cmds.size() == 1, "single readback word")
    // random traffic at several rates
    for (int phase = 0; phase < 4; phase++) begin
      int rate;
      rate = (phase == 0) ? 20 : (phase == 1) ? 5 : (phase == 2) ? 3 : 12;
      for (int n = 0; n < 2000; n++) begin
        if ($urandom_range(0, rate - 1) == 0 && q.size() < 16) push($urandom_range(0, 3) == 0);
        @(negedge clk);
      end
    end
    repeat (300) @(negedge clk);
    `CHECK(q.size() == 0, "FIFO drained")
    `CHECK(mon.errors() == 0, $sformatf("stream errors: code %0d disparity %0d format %0d", mon.code_err, mon.disp_err, mon.fmt_err))
    `CHECK(mon.cmds.size() == exp_cmd.size() && mon.hits.size() == exp_hit.size(),
           $sformatf("words out %0d/%0d, expected %0d/%0d", mon.cmds.size(), mon.hits.size(), exp_cmd.size(), exp_hit.size()))
    foreach (mon.cmds[i]) if (i < exp_cmd.size()) `CHECK(mon.cmds[i] == exp_cmd[i], $sformatf("readback word %0d", i))
    foreach (mon.hits[i]) if (i < exp_hit.size()) `CHECK(mon.hits[i] == exp_hit[i], $sformatf("hit word %0d", i))
    `CHECK(n_hit_sent == exp_hit.size(), "hit_sent pulses once per hit")
    `CHECK(mon.chained_pkts > 10 && mon.n_idle > 1000, $sformatf("%0d chained packages, %0d idles", mon.chained_pkts, mon.n_idle))
    `TB_FINISH
  end
endmodule
