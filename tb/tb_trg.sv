// tb_trg: one trigger group (index 70: block 35, DCs 0-3 of it) fed by its four
// double columns. Hits carry a 7-bit Le a few cycles behind the BCID;
// triggers with IDs arrive at random. The model expects a hit to be tagged
// by a trigger present in the cycle where bcid - latency equals the hit's
// extended Le. After each round, every ID is requested and the returned
// pixel words (pixel in DC = {row, column}, DC in block, block, Le, Te) must
// equal the model's set for that ID.
`include "tb_macros.svh"
module tb_trg;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  localparam int LAT = 12;
  logic clk = 0, rst_n = 0, clear = 0, hit_en = 1, trigger = 0, req_valid = 0, out_ready = 0;
  logic [8:0] bcid = 0, bcid_dly;
  logic [3:0] dc_valid = 0, dc_ready;
  dc_hit_t dc_hit [4];
  logic [5:0] trig_id = 0, req_id = 0;
  logic out_valid, s1_expired, tag_pulse;
  pix_word_t out_word;
  always #25 clk = ~clk;
  assign bcid_dly = bcid - 9'(LAT);
  trg #(.TRG_IDX(70)) dut (.*);

  pix_word_t hits [$];       // injected, by Le
  pix_word_t tagq [64][$];
  int n_hits = 0, n_tag = 0;
  bit run = 0;
  int n_exp = 0;
  always @(posedge clk) if (rst_n && s1_expired) n_exp++;
  always @(posedge clk) if (rst_n && run) begin
    for (int d = 0; d < 4; d++) if (dc_valid[d] && dc_ready[d]) begin
      int le9;
      le9 = int'(bcid) - ((int'(bcid) - int'(dc_hit[d].le)) & 127);
      hits.push_back('{row: {dc_hit[d].row[8:0], dc_hit[d].col}, colb: {1'b0, 2'(d)}, block: 6'd35, le: 9'(le9), te: dc_hit[d].te});
      n_hits++;
    end
    if (trigger) begin
      foreach (hits[i]) if (hits[i].le == bcid_dly) begin tagq[trig_id].push_back(hits[i]); n_tag++; end
    end
  end
  always @(posedge clk) if (rst_n) bcid <= bcid + 1;

  initial begin #10000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    for (int d = 0; d < 4; d++) dc_hit[d] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      hits.delete();
      run = 1;
      for (int n = 0; n < 40; n++) begin
        for (int d = 0; d < 4; d++) begin
          if (!(dc_valid[d] && !dc_ready[d])) begin
            dc_valid[d] = (n < 25) && ($urandom_range(0, 9) == 0);
            dc_hit[d] = '{row: 10'($urandom_range(0, 463)), col: 1'($urandom), le: 7'(bcid - 9'($urandom_range(0, 3))), te: 7'($urandom)};
          end
        end
        trigger = ($urandom_range(0, 5) == 0);
        trig_id = 6'($urandom_range(0, 7)) + 6'(8 * (round % 8));
        @(negedge clk);
      end
      dc_valid = 0; trigger = 0;
      repeat (LAT + 4) @(negedge clk);
      run = 0;
      for (int id = 8 * (round % 8); id < 8 * (round % 8) + 8; id++) begin
        pix_word_t got [$];
        got.delete();
        req_valid = 1; req_id = 6'(id); out_ready = 1;
        #1;
        while (out_valid) begin
          got.push_back(out_word);
          @(negedge clk);
          #1;
        end
        `CHECK(got.size() == tagq[id].size(), $sformatf("ID %0d: %0d words, expected %0d", id, got.size(), tagq[id].size()))
        foreach (got[i]) begin
          int k[$];
          k = tagq[id].find_first_index(x) with (x == got[i]);
          `CHECK(k.size() == 1, "returned word was triggered with this ID")
          if (k.size() == 1) tagq[id].delete(k[0]);
        end
        @(negedge clk);
      end
      req_valid = 0;
    end
    // overload: every DC sends every cycle, every cycle triggers, nothing is read out
    begin
      int stalls = 0;
      `CHECK(n_exp == 0, $sformatf("no S1 expiry at normal load (%0d)", n_exp))
      n_exp = 0;
      for (int n = 0; n < 200; n++) begin
        dc_valid = 4'hF; trigger = 1; trig_id = 6'd63;
        for (int d = 0; d < 4; d++) dc_hit[d] = '{row: 10'(n), col: 1'b0, le: 7'(bcid), te: 7'd0};
        @(negedge clk);
        if (dc_ready != 4'hF) stalls++;
      end
      dc_valid = 0; trigger = 0;
      `CHECK(stalls > 50, $sformatf("double columns stalled when full (%0d cycles)", stalls))
      `CHECK(n_exp > 0, $sformatf("S1 discarded expired hits under overload (%0d)", n_exp))
      clear = 1; @(negedge clk); clear = 0;
      req_valid = 1; req_id = 6'd63; #1;
      `CHECK(!out_valid, "clear empties S2")
      req_valid = 0;
    end
    `CHECK(n_tag > 20 && n_hits > 60, $sformatf("%0d hits, %0d tagged", n_hits, n_tag))
    `TB_FINISH
  end
endmodule
