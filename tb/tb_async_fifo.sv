// tb_async_fifo: dual-clock FIFO between a 20 MHz writer and a 32 MHz
// reader (the transmission unit's case), then with the reader slowed so
// that the FIFO fills. Words must come out in order without loss or
// duplication; wfull must assert after exactly DEPTH words when the reader
// stops; rempty must assert once everything is read; writes while full
// must be ignored.
`include "tb_macros.svh"
module tb_async_fifo;
  int checks = 0, failures = 0;
  localparam int W = 41, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wen = 0, ren = 0, wfull, rempty;
  logic [W-1:0] wdata = 0, rdata;
  always #25 wclk = ~wclk;
  always #15.625 rclk = ~rclk;
  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] exp_q [$];
  int n_wr = 0, n_rd = 0, rd_pct = 100, wr_pct = 60;
  bit rd_stop = 0;
  always @(posedge wclk) if (wrst_n && wen && !wfull) begin exp_q.push_back(wdata); n_wr++; end
  always @(posedge rclk) if (rrst_n && ren) begin
    checks++;
    if (rempty) begin failures++; $display("FAIL read while empty"); end
    else if (exp_q.size() == 0 || rdata != exp_q[0]) begin failures++; $display("FAIL data mismatch at word %0d", n_rd); end
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    n_rd++;
  end
  always @(negedge rclk) ren = !rempty && !rd_stop && ($urandom_range(0, 99) < rd_pct);

  initial begin #10000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      rd_pct = (ph == 0) ? 100 : (ph == 1) ? 30 : 60;
      for (int n = 0; n < 1500; n++) begin
        @(negedge wclk);
        wen = ($urandom_range(0, 99) < wr_pct);
        wdata = {9'($urandom), $urandom};
      end
    end
    @(negedge wclk) wen = 0;
    repeat (50) @(negedge wclk);
    `CHECK(exp_q.size() == 0 && rempty, "all words read, FIFO empty")
    `CHECK(n_wr > 2000 && n_rd == n_wr, $sformatf("%0d written, %0d read", n_wr, n_rd))
    // fill with the reader stopped
    rd_stop = 1;
    repeat (5) @(negedge wclk);
    for (int n = 0; n < DEPTH + 4; n++) begin
      @(negedge wclk);
      `CHECK(wfull == (n >= DEPTH), $sformatf("wfull after %0d words", n))
      wen = 1; wdata = W'(n);
    end
    @(negedge wclk) wen = 0;
    `CHECK(exp_q.size() == DEPTH, "writes while full ignored")
    rd_stop = 0;
    repeat (60) @(negedge wclk);
    `CHECK(exp_q.size() == 0 && rempty && !wfull, "drained after full")
    `TB_FINISH
  end
endmodule
