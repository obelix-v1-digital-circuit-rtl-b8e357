// tb_scu_sync: checks word alignment and lock handling of the command input.
// A serial stream (MSB first, one bit per 160 MHz cycle) starts at an odd
// bit offset with noise, then five Sync words, then data words with a Sync
// every 8 words. Checks: lock only after the fifth Sync, every later word
// delivered once and in order in the 20 MHz domain, lock lost after 64
// words without Sync, and lost again when a Sync arrives at a shifted
// phase. The 20 MHz clock is a divide-by-8 model that honours div8_rst.
`include "tb_macros.svh"
module tb_scu_sync;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, rx_dat = 0, rst20_n = 0;
  logic clk20;
  logic div8_rst;
  logic [15:0] rx_sync_data;
  logic rx_sync_valid, sync_locked_out;
  always #3.125 clk160 = ~clk160;

  logic [2:0] c8 = 0;
  always @(posedge clk160) begin
    c8 <= div8_rst ? 3'd0 : c8 + 3'd1;
  end
  assign clk20 = c8[2];

  scu_sync dut (.*);

  logic [15:0] exp_q [$];
  bit          capture = 0;
  int          n_rx = 0;
  always @(posedge clk20) begin
    if (rx_sync_valid && capture) begin
      n_rx++;
      if (exp_q.size() == 0) begin
        `CHECK(0, "unexpected word")
      end else begin
        logic [15:0] e;
        e = exp_q.pop_front();
        `CHECK(rx_sync_data == e, $sformatf("word %h expected %h", rx_sync_data, e))
      end
    end
  end

  task automatic send_bit(input logic b);
    @(negedge clk160) rx_dat = b;
  endtask
  task automatic send_word(input logic [15:0] w, input bit expect_it);
    for (int i = 15; i >= 0; i--) send_bit(w[i]);
    if (expect_it) exp_q.push_back(w);
  endtask
  function automatic logic [15:0] rand_word();
    return {dsym($urandom), dsym($urandom)};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  initial begin
    repeat (4) @(posedge clk160);
    rst_n = 1;
    repeat (20) @(posedge clk160);
    rst20_n = 1;
    repeat (7) send_bit($urandom);
    for (int i = 0; i < 4; i++) send_word(SYNC_WORD, 0);
    for (int i = 0; i < 3; i++) send_word(NOOP_WORD, 0);
    `CHECK(!sync_locked_out, "not locked after four Syncs")
    capture = 1;
    send_word(SYNC_WORD, 0);
    for (int i = 0; i < 60; i++) send_word((i % 8 == 7) ? SYNC_WORD : rand_word(), 1);
    `CHECK(sync_locked_out, "locked after five Syncs")
    send_word(SYNC_WORD, 1);
    for (int i = 0; i < 3; i++) send_word(NOOP_WORD, 1);
    `CHECK(exp_q.size() <= 1, "words delivered without delay")
    capture = 0;
    `CHECK(exp_q.size() == 0 || n_rx == 63, "all words delivered")
    `CHECK(n_rx >= 63, $sformatf("64 words delivered, got %0d", n_rx))
    // 64 words without Sync: lock lost (3 NOOPs already sent)
    for (int i = 0; i < 60; i++) send_word(rand_word(), 0);
    `CHECK(sync_locked_out, "still locked after 63 words without Sync")
    for (int i = 0; i < 3; i++) send_word(NOOP_WORD, 0);
    `CHECK(!sync_locked_out, "lock lost after 64 words without Sync")
    // relock, then a Sync at a shifted phase
    for (int i = 0; i < 6; i++) send_word(SYNC_WORD, 0);
    for (int i = 0; i < 2; i++) send_word(NOOP_WORD, 0);
    `CHECK(sync_locked_out, "relocked")
    send_word(rand_word(), 0);
    send_bit(1'b0);                      // one extra bit shifts the phase
    send_word(SYNC_WORD, 0);
    for (int i = 0; i < 3; i++) send_word(NOOP_WORD, 0);
    `CHECK(!sync_locked_out, "lock lost on a Sync at another phase")
    `TB_FINISH
  end
endmodule
