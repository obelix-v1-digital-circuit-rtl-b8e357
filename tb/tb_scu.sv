// tb_scu: checks the SCU as a whole: derived clocks, domain resets and the
// command words handed to the 20 MHz domain. After reset, five Syncs and 20
// words are sent serially; each word must appear once, in order, in the
// 20 MHz domain with SyncLockedOut high, and clk20/clk32 must have periods
// of 8 and 5 main-clock cycles. Then the line is shifted by 1 to 3 bits
// before further Syncs: the 20 MHz clock must follow, keeping the same
// phase to the end of a Sync each time.
`include "tb_macros.svh"
module tb_scu;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rstb = 0, rx_dat = 0;
  logic clk20, clk32, rst160_n, rst20_n, rst32_n, rx_sync_valid, sync_locked_out;
  logic [15:0] rx_sync_data;
  always #3.125 clk160 = ~clk160;

  scu dut (.*);

  realtime t20 = 0, t32 = 0;
  bit shifting = 0;
  int n20 = 0, n32 = 0;
  always @(posedge clk20) begin
    if (n20 > 2 && rst20_n && !shifting) `CHECK($realtime - t20 == 50.0, "clk20 period 50 ns")
    t20 = $realtime; n20++;
  end
  always @(posedge clk32) begin
    if (n32 > 2 && rst32_n) `CHECK($realtime - t32 == 31.25, "clk32 period 31.25 ns")
    t32 = $realtime; n32++;
  end

  logic [15:0] exp_q [$];
  int n_rx = 0;
  bit capture = 0;
  always @(posedge clk20) begin
    if (rx_sync_valid && capture) begin
      n_rx++;
      `CHECK(exp_q.size() > 0 && rx_sync_data == exp_q.pop_front(), "word in order")
      `CHECK(sync_locked_out, "locked while words arrive")
    end
  end

  task automatic send_word(input logic [15:0] w, input bit e);
    for (int i = 15; i >= 0; i--) @(negedge clk160) rx_dat = w[i];
    if (e) exp_q.push_back(w);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    repeat (5) @(posedge clk160);
    rstb = 1;
    repeat (40) @(posedge clk160);
    `CHECK(rst160_n && rst20_n && rst32_n, "all domain resets released")
    `CHECK(!sync_locked_out, "not locked before Syncs")
    capture = 1;
    for (int i = 0; i < 5; i++) send_word(SYNC_WORD, 0);
    for (int i = 0; i < 20; i++) send_word({dsym($urandom), dsym($urandom)}, 1);
    for (int i = 0; i < 2; i++) send_word(NOOP_WORD, 1);
    `CHECK(n_rx >= 21, "words delivered")
    `CHECK(n20 > 50 && n32 > 80, "clocks running")
    capture = 0;
    begin
      realtime ph [4];
      for (int sh = 0; sh < 4; sh++) begin
        realtime t_end;
        shifting = 1;
        repeat (sh) @(negedge clk160) rx_dat = 1'b0;
        for (int i = 0; i < 6; i++) send_word(SYNC_WORD, 0);
        t_end = $realtime;
        @(posedge clk20);
        ph[sh] = $realtime - t_end;
        if (sh > 0) `CHECK(ph[sh] == ph[0], $sformatf("clk20 phase to the Sync after a %0d-bit shift: %0.3f ns, first %0.3f ns", sh, ph[sh], ph[0]))
        repeat (4) @(posedge clk20);
        `CHECK(sync_locked_out, "locked at the new phase")
      end
    end
    `TB_FINISH
  end
endmodule
