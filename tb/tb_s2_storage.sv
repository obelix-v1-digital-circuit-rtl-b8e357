// tb_s2_storage: random hits whose latency ends a few cycles later, random
// triggers with IDs, and rounds of readout by trigger-ID request. A model
// decides each hit at the cycle its Le equals the delayed BCID: tagged with
// the trigger ID if a trigger is present, dropped otherwise. Every ID's
// readout must return exactly the model's hits (as a set), nothing may be
// returned for an ID that tagged nothing, and the storage must be empty
// after all requests.
`include "tb_macros.svh"
module tb_s2_storage;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, trigger = 0, in_valid = 0, req_valid = 0, out_ready = 0;
  logic [8:0] bcid_dly = 0;
  logic [5:0] trig_id = 0, req_id = 0;
  logic in_ready, out_valid, tagged_pulse;
  trg_hit_t in_hit = '0, out_hit;
  always #25 clk = ~clk;
  s2_storage #(.DEPTH(8)) dut (.*);

  trg_hit_t pend [$];        // stored, not decided
  trg_hit_t tagq [64][$];    // tagged per ID
  int n_tag = 0, n_drop = 0, n_read = 0;
  bit reading = 0;

  always @(posedge clk) if (rst_n && !reading) begin
    trg_hit_t keep [$];
    keep.delete();
    foreach (pend[i]) begin
      if (pend[i].le == bcid_dly) begin
        if (trigger) begin tagq[trig_id].push_back(pend[i]); n_tag++; end
        else n_drop++;
      end else keep.push_back(pend[i]);
    end
    pend = keep;
    if (in_valid && in_ready) pend.push_back(in_hit);
  end

  initial begin #5000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      // fill and trigger
      for (int n = 0; n < 30; n++) begin
        bcid_dly = bcid_dly + 1;
        in_valid = ($urandom_range(0, 1) == 1) && n < 20;
        in_hit = '{row: 10'($urandom), colb: 3'($urandom), le: bcid_dly + 9'($urandom_range(1, 6)), te: 7'($urandom)};
        trigger = ($urandom_range(0, 2) == 0);
        trig_id = 6'($urandom_range(0, 7)) + 6'(8 * (round % 8));
        @(negedge clk);
      end
      in_valid = 0; trigger = 0;
      `CHECK(pend.size() == 0, "all hits decided")
      // read every ID of this round
      reading = 1;
      for (int id = 8 * (round % 8); id < 8 * (round % 8) + 8; id++) begin
        trg_hit_t got [$];
        got.delete();
        req_valid = 1; req_id = 6'(id); out_ready = 1;
        #1;
        while (out_valid) begin
          got.push_back(out_hit);
          @(negedge clk);
          #1;
        end
        n_read += got.size();
        `CHECK(got.size() == tagq[id].size(), $sformatf("ID %0d: %0d hits, expected %0d", id, got.size(), tagq[id].size()))
        foreach (got[i]) begin
          int k[$];
          k = tagq[id].find_first_index(x) with (x == got[i]);
          `CHECK(k.size() == 1, "read hit was tagged with this ID")
          if (k.size() == 1) tagq[id].delete(k[0]);
        end
        @(negedge clk);
      end
      req_valid = 0;
      `CHECK(in_ready, "storage free after readout")
      reading = 0;
    end
    `CHECK(n_tag > 50 && n_drop > 50, $sformatf("tagged %0d, dropped %0d", n_tag, n_drop))
    `TB_FINISH
  end
endmodule
