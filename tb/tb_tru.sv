// tb_tru: trigger and readout unit with 4 trigger groups (16 double columns)
// instead of 112, and a latency of 30 BCID ticks written through the latency
// input. Hits carry a 7-bit Le taken from the BCID output. Triggers have
// rising IDs. The model tags a hit with a trigger present in the cycle where
// bcid - latency equals its extended Le. The output stream must return the
// hits trigger by trigger in trigger order, each word exactly once, with
// random back-pressure on pix_ready. A second phase overloads the unit and
// checks that the trigger-ID queue overflow flag and S1 expiry appear, and
// that clear empties the unit.
`include "tb_macros.svh"
module tb_tru;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  localparam int NT = 4, ND = 4 * NT, LAT = 30;
  logic clk = 0, rst_n = 0, clear = 0, hit_en = 1, trigger = 0, pix_ready = 0;
  logic [8:0] latency = 9'(LAT), bcid;
  logic [ND-1:0] dc_valid = 0, dc_ready;
  dc_hit_t dc_hit [ND];
  logic [5:0] trig_id = 0;
  logic pix_valid, s1_expired, rq_overflow;
  pix_word_t pix_data;
  always #25 clk = ~clk;
  tru #(.N_TRG(NT)) dut (.*);

  pix_word_t hits [$];
  pix_word_t expq [$][$];    // one set per trigger, in trigger order
  int n_hits = 0, n_tag = 0, n_out = 0, n_exp = 0, n_ovf = 0, n_bp = 0;
  bit model = 1;
  always @(posedge clk) if (rst_n) begin
    logic [8:0] bdly;
    bdly = bcid - latency;
    if (s1_expired) n_exp++;
    if (rq_overflow) n_ovf++;
    if (model) begin
      for (int d = 0; d < ND; d++) if (dc_valid[d] && dc_ready[d]) begin
        int le9;
        le9 = int'(bcid) - ((int'(bcid) - int'(dc_hit[d].le)) & 127);
        hits.push_back('{row: {dc_hit[d].row[8:0], dc_hit[d].col}, colb: {1'((d / 4) % 2), 2'(d % 4)}, block: 6'(d / 8),
                         le: 9'(le9), te: dc_hit[d].te});
        n_hits++;
      end
      if (trigger) begin
        pix_word_t set [$];
        set.delete();
        foreach (hits[i]) if (hits[i].le == bdly) set.push_back(hits[i]);
        n_tag += set.size();
        expq.push_back(set);
      end
      for (int i = hits.size() - 1; i >= 0; i--) if (hits[i].le == bdly) hits.delete(i);
      if (pix_valid && pix_ready) begin
        int k[$];
        n_out++;
        while (expq.size() > 0 && expq[0].size() == 0) void'(expq.pop_front());
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected word (t=%0t)", $time); end
        else begin
          k = expq[0].find_first_index(x) with (x == pix_data);
          if (k.size() == 0) begin
            failures++; $display("FAIL word row=%0d blk=%0d le=%0d not in oldest open trigger (t=%0t)", pix_data.row, pix_data.block, pix_data.le, $time);
          end else expq[0].delete(k[0]);
        end
      end
      if (pix_valid && !pix_ready) n_bp++;
    end
  end

  initial begin #20000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    for (int d = 0; d < ND; d++) dc_hit[d] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      for (int d = 0; d < ND; d++) begin
        if (!(dc_valid[d] && !dc_ready[d])) begin
          dc_valid[d] = (n < 2900) && ($urandom_range(0, 29) == 0);
          dc_hit[d] = '{row: 10'($urandom_range(0, 463)), col: 1'($urandom), le: 7'(bcid - 9'($urandom_range(0, 3))), te: 7'($urandom)};
        end
      end
      if (trigger) trig_id++;
      trigger = (n < 2900) && ($urandom_range(0, 7) == 0);
      pix_ready = ($urandom_range(0, 9) < 7);
      @(negedge clk);
    end
    trigger = 0; dc_valid = 0; pix_ready = 1;
    repeat (LAT + 50) @(negedge clk);
    begin
      int left = 0;
      foreach (expq[i]) left += expq[i].size();
      `CHECK(left == 0, $sformatf("all triggered hits returned (%0d missing)", left))
    end
    `CHECK(n_exp == 0 && n_ovf == 0, $sformatf("no loss at normal load (expired %0d, overflow %0d)", n_exp, n_ovf))
    `CHECK(n_tag > 150 && n_out == n_tag && n_bp > 50, $sformatf("%0d hits, %0d tagged, %0d out, %0d back-pressure", n_hits, n_tag, n_out, n_bp))
    // overload: continuous hits and triggers, output blocked
    model = 0;
    for (int n = 0; n < 300; n++) begin
      dc_valid = '1; trigger = 1; trig_id++; pix_ready = 0;
      for (int d = 0; d < ND; d++) dc_hit[d] = '{row: 10'(n), col: 1'b0, le: 7'(bcid), te: 7'd0};
      @(negedge clk);
    end
    dc_valid = 0; trigger = 0;
    `CHECK(n_ovf > 0, $sformatf("trigger-ID queue overflow flagged (%0d)", n_ovf))
    `CHECK(n_exp > 0, $sformatf("S1 expiry under overload (%0d)", n_exp))
    `CHECK(pix_valid, "output held while blocked")
    clear = 1; @(negedge clk); clear = 0; pix_ready = 1;
    @(negedge clk);
    repeat (5) begin
      @(negedge clk);
      `CHECK(!pix_valid, "clear empties the unit")
    end
    `TB_FINISH
  end
endmodule
