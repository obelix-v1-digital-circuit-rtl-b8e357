// tb_txu: transmission unit with the three clocks made by the clock divider
// from 160 MHz. Pixel words are offered at 20 MHz with random gaps (and at
// full rate, so the FIFO fills and pix_ready stalls the source); readback
// words arrive now and then, also while the FIFO is full (cmd_drop). The
// serial line is sampled at every clock edge, aligned to symbol boundaries,
// and decoded by the stream monitor. Decoded readback words and pixel words
// (unpacked from the five {select, 7 bits} bytes) must equal what was
// accepted, in order; hit_sent must pulse once per hit.
`include "tb_macros.svh"
module tb_txu;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 1, clk20, clk32;
  logic rst20_n = 1, rst32_n = 1, rst160_n = 1;  // dropped at 1 ns so the asynchronous resets see an edge
  logic pix_valid = 0, pix_ready, hitcmd_valid = 0, cmd_drop, tx_out, hit_sent;
  pix_word_t pix_data = '0;
  logic [23:0] hitcmd = 0;
  logic [9:0] sym;
  always #3.125 clk160 = ~clk160;
  clk_divider u_div (.clk160(clk160), .rst_n(rst_n), .div8_rst(1'b0), .clk32(clk32), .clk20(clk20));
  txu dut (.*);

  logic [34:0] exp_hit [$];
  logic [23:0] exp_cmd [$];
  int n_stall = 0, n_drop = 0, n_hs = 0;
  bit bits [$];
  always @(posedge clk20) if (rst20_n) begin
    if (pix_valid && pix_ready) exp_hit.push_back(pix_data);
    if (pix_valid && !pix_ready) n_stall++;
    if (hitcmd_valid && !cmd_drop) exp_cmd.push_back(hitcmd);
    if (cmd_drop) n_drop++;
  end
  always @(posedge clk32) if (rst32_n && hit_sent) n_hs++;
  always @(clk160) if (rst160_n) begin #0.5; bits.push_back(tx_out); end

  initial begin #10000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    #1 {rst_n, rst20_n, rst32_n, rst160_n} = '0;
    repeat (4) @(posedge clk160);
    rst_n = 1; rst160_n = 1;
    @(posedge clk20); rst20_n = 1;
    @(posedge clk32); rst32_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      int pct;
      pct = (ph == 0) ? 5 : (ph == 1) ? 100 : 15;
      for (int n = 0; n < 600; n++) begin
        @(negedge clk20);
        if (!pix_valid || pix_ready) begin
          pix_valid = ($urandom_range(0, 99) < pct);
          pix_data = pix_word_t'({$urandom, 3'($urandom)});
        end
        hitcmd_valid = ($urandom_range(0, 39) == 0);
        hitcmd = 24'($urandom);
      end
    end
    @(negedge clk20) pix_valid = 0; hitcmd_valid = 0;
    repeat (400) @(negedge clk20);
    begin
      stream_mon mon = new();
      int off;
      off = align10(bits, mon.tab);
      feed10(bits, off, mon);
      `CHECK(mon.errors() == 0, $sformatf("line errors: code %0d disparity %0d format %0d", mon.code_err, mon.disp_err, mon.fmt_err))
      `CHECK(mon.cmds.size() == exp_cmd.size(), $sformatf("%0d readback words on the line, %0d accepted", mon.cmds.size(), exp_cmd.size()))
      `CHECK(mon.hits.size() == exp_hit.size(), $sformatf("%0d hits on the line, %0d accepted", mon.hits.size(), exp_hit.size()))
      foreach (mon.cmds[i]) if (i < exp_cmd.size()) `CHECK(mon.cmds[i] == exp_cmd[i], $sformatf("readback %0d", i))
      foreach (mon.hits[i]) if (i < exp_hit.size()) begin
        logic [35:0] u;
        u = unpack_hit(mon.hits[i]);
        `CHECK(!u[35] && u[34:0] == exp_hit[i], $sformatf("hit %0d: %h (%h) expected %h", i, u, mon.hits[i], exp_hit[i]))
      end
      `CHECK(n_hs == exp_hit.size(), "hit_sent once per hit")
      `CHECK(n_stall > 100 && n_drop > 0 && mon.chained_pkts > 10,
             $sformatf("stalls %0d, readback drops %0d, chained packages %0d", n_stall, n_drop, mon.chained_pkts))
    end
    `TB_FINISH
  end
endmodule
