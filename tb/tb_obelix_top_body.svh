// Body of the end-to-end testbench, shared by tb_obelix_top (reduced number
// of trigger groups) and tb_obelix_top_full (the chip at its default size).
// The including module defines NT, the number of trigger groups, and the
// macro OBELIX_TOP_INST, the instance of the top named dut.
  int checks = 0, failures = 0;
  localparam int ND = 4 * NT;
  localparam logic [3:0] CHIP = 4'd3;

  logic clk160 = 0, rstb = 1, rx_dat = 0;
  logic [3:0] chip_id = CHIP;
  logic [ND-1:0] dc_valid = '0, dc_ready;
  dc_hit_t dc_hit [ND];
  logic clk20, tx_out, sync_locked_out, glb_pulse, cal, trigger, s1_expired, status_err;
  logic [8:0] bcid;
  logic [19:0] cal_data;
  always #3.125 clk160 = ~clk160;
  `OBELIX_TOP_INST

  // ---------------- command line driver ----------------
  logic [15:0] wq [$];       // words waiting to be sent
  bit          sync_en = 1;
  int          since_sync = 0;
  always begin
    logic [15:0] w;
    @(negedge clk160);
    if (sync_en && since_sync >= 32) begin w = SYNC_WORD; since_sync = 0; end
    else if (wq.size() > 0) begin w = wq.pop_front(); since_sync++; end
    else begin w = NOOP_WORD; since_sync++; end
    if (w == SYNC_WORD) since_sync = 0;
    for (int i = 15; i >= 0; i--) begin
      if (i != 15) @(negedge clk160);
      rx_dat = w[i];
    end
  end
  function automatic logic [15:0] dpair(input logic [9:0] v);
    return {dsym(v[9:5]), dsym(v[4:0])};
  endfunction
  task automatic wrreg(input logic [3:0] id, input logic [8:0] a, input logic [15:0] d);
    logic [29:0] p;
    p = {1'b0, a, d, 4'b0};
    wq.push_back({CMD_WRREG, dsym(id)});
    wq.push_back(dpair(p[29:20])); wq.push_back(dpair(p[19:10])); wq.push_back(dpair(p[9:0]));
  endtask
  task automatic rdreg(input logic [8:0] a);
    wq.push_back({CMD_RDREG, dsym(CHIP)}); wq.push_back(dpair({1'b0, a}));
  endtask
  task automatic wait_sent();
    while (wq.size() > 0) @(posedge clk160);
    repeat (40) @(posedge clk160);
  endtask
  int n_trig_exp = 0;
  bit trig_en_model = 1;
  logic [4:0] next_tag = 0;   // tags rise, so no ID is reused while its hits wait
  task automatic send_trig(input logic [3:0] pat);
    wq.push_back({tsym(pat), dsym(next_tag)});
    next_tag++;
    if (trig_en_model) n_trig_exp += int'(|pat[3:2]) + int'(|pat[1:0]);
  endtask

  // ---------------- hit and trigger model ----------------
  int lat = 100;
  pix_word_t hits [$];
  pix_word_t expq [$][$];
  logic [23:0] exp_rb [$];
  int n_hits = 0, n_tag = 0, n_trig = 0, n_dc_stall = 0, n_exp = 0, n_disabled = 0;
  int n_txstall = 0, n_rqovf = 0, n_clear = 0, n_gp = 0, n_cal = 0, n_err = 0, n_lock = 0, n_unlock = 0;
  logic [19:0] last_cal;
  bit locked_q = 0;
  always @(posedge clk20) if (dut.rst20_n) begin
    logic [8:0] bdly;
    bdly = bcid - 9'(lat);
    for (int d = 0; d < ND; d++) if (dc_valid[d]) begin
      if (!dc_ready[d]) n_dc_stall++;
      else if (!dut.hit_en) n_disabled++;
      else begin
        int le9;
        le9 = int'(bcid) - ((int'(bcid) - int'(dc_hit[d].le)) & 127);
        hits.push_back('{row: {dc_hit[d].row[8:0], dc_hit[d].col}, colb: {1'((d / 4) % 2), 2'(d % 4)}, block: 6'(d / 8),
                         le: 9'(le9), te: dc_hit[d].te});
        n_hits++;
      end
    end
    if (trigger) begin
      pix_word_t set [$];
      set.delete();
      n_trig++;
      foreach (hits[i]) if (hits[i].le == bdly) set.push_back(hits[i]);
      n_tag += set.size();
      expq.push_back(set);
    end
    for (int i = hits.size() - 1; i >= 0; i--) if (hits[i].le == bdly) hits.delete(i);
    if (s1_expired) n_exp++;
    if (dut.pix_valid && !dut.pix_ready) n_txstall++;
    if (dut.rq_overflow) n_rqovf++;
    if (dut.clear) n_clear++;
    if (glb_pulse) n_gp++;
    if (cal) begin n_cal++; last_cal = cal_data; end
    if (status_err) n_err++;
  end
  always @(posedge clk160) begin
    if (sync_locked_out && !locked_q) n_lock++;
    if (!sync_locked_out && locked_q) n_unlock++;
    locked_q = sync_locked_out;
  end

  // line samples
  bit bits [$];
  always @(clk160) if (dut.rst160_n) begin #0.5; bits.push_back(tx_out); end

  // ---------------- hit drivers ----------------
  int hit_pct = 0;           // per double column and cycle, in 1/10000
  int force_trg = -1;        // trigger group driven on every cycle, with hits
                             // whose leading edge is 35 ticks old (late arrivals)
  bit cluster = 0;           // one hit on every double column
  always @(negedge clk20) begin
    for (int d = 0; d < ND; d++) begin
      if (!(dc_valid[d] && !dc_ready[d])) begin
        dc_valid[d] = cluster || (d / 4 == force_trg) || ($urandom_range(0, 9999) < hit_pct);
        dc_hit[d] = '{row: 10'($urandom_range(0, 463)), col: 1'($urandom),
                      le: 7'(bcid - 9'($urandom_range(0, 2)) - ((d / 4 == force_trg) ? 9'd35 : 9'd0)),
                      te: 7'($urandom)};
      end
    end
  end

  initial begin #4000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    for (int d = 0; d < ND; d++) dc_hit[d] = '0;
    #1 rstb = 0;
    #200 rstb = 1;
    // lock: PLL-lock words, then Syncs
    repeat (8) wq.push_back(PLL_LOCK);
    repeat (8) wq.push_back(SYNC_WORD);
    wait_sent();
    `CHECK(sync_locked_out, "locked after Syncs")
    // registers
    wrreg(CHIP, 9'(REG_LATENCY), 16'd40);
    wrreg(CHIP, 9'd7, 16'hBEEF);
    wrreg(4'd5, 9'd7, 16'h1234);            // other chip: ignored
    rdreg(9'(REG_LATENCY)); rdreg(9'd7); rdreg(9'(REG_CTRL));
    exp_rb.push_back({8'(REG_LATENCY), 16'd40});
    exp_rb.push_back({8'd7, 16'hBEEF});
    exp_rb.push_back({8'(REG_CTRL), 16'(CTRL_DEFAULT)});
    wait_sent();
    lat = 40;
    repeat (50) @(posedge clk20);
    // random traffic
    hit_pct = 10000 / ND;
    for (int n = 0; n < 600; n++) begin
      if ($urandom_range(0, 2) == 0) send_trig(4'($urandom_range(1, 15)));
      else wq.push_back(NOOP_WORD);
      if (n == 300) begin rdreg(9'd7); exp_rb.push_back({8'd7, 16'hBEEF}); end
      while (wq.size() > 2) @(posedge clk160);
    end
    hit_pct = 0;
    wait_sent();
    repeat (lat + 100) @(posedge clk20);
    // overload one trigger group: stall and S1 expiry
    force_trg = NT / 2;
    repeat (150) @(posedge clk20);
    force_trg = -1;
    repeat (lat + 200) @(posedge clk20);
    // a cluster on every column, read by one trigger; empty triggers behind it
    @(negedge clk20) cluster = 1;
    @(negedge clk20) cluster = 0;
    repeat (lat - 8) @(posedge clk20);
    for (int n = 0; n < 24; n++) send_trig(4'b1111);
    wait_sent();
    repeat (2500) @(posedge clk20);
    // hits disabled, then triggers disabled
    wrreg(CHIP, 9'(REG_CTRL), 16'd1);
    wait_sent();
    hit_pct = 100;
    repeat (100) @(posedge clk20);
    hit_pct = 0;
    repeat (lat + 10) @(posedge clk20);
    wrreg(CHIP, 9'(REG_CTRL), 16'd0);
    wait_sent();
    begin
      int t0;
      t0 = n_trig;
      trig_en_model = 0;
      repeat (10) send_trig(4'b1010);
      wait_sent();
      `CHECK(n_trig == t0, "no triggers while disabled")
      trig_en_model = 1;
    end
    wrreg(CHIP, 9'(REG_CTRL), 16'd3);
    rdreg(9'(REG_CTRL)); exp_rb.push_back({8'(REG_CTRL), 16'd3});
    wait_sent();
    // Clear, GlobalPulse, Cal, bad symbol
    wq.push_back({CMD_CLEAR, dsym(CHIP)});
    wq.push_back({CMD_GPULSE, dsym(CHIP)});
    wq.push_back({CMD_CAL, dsym(CHIP)}); wq.push_back(dpair(10'h2A5)); wq.push_back(dpair(10'h15A));
    wq.push_back(16'h0000);
    wait_sent();
    `CHECK(last_cal == 20'hA955A, $sformatf("Cal data %h", last_cal))
    // lose the lock (no Syncs for more than 64 frames), then lock again
    sync_en = 0;
    repeat (80) wq.push_back(NOOP_WORD);
    wait_sent();
    `CHECK(!sync_locked_out, "lock lost without Syncs")
    sync_en = 1;
    repeat (8) wq.push_back(SYNC_WORD);
    wait_sent();
    `CHECK(sync_locked_out, "locked again")
    repeat (200) @(posedge clk20);

    // ---------------- decode and compare ----------------
    begin
      stream_mon mon = new();
      int off, k[$];
      off = align10(bits, mon.tab);
      feed10(bits, off, mon);
      `CHECK(mon.errors() == 0, $sformatf("line errors: code %0d disparity %0d format %0d", mon.code_err, mon.disp_err, mon.fmt_err))
      `CHECK(mon.cmds.size() == exp_rb.size(), $sformatf("%0d readback words, expected %0d", mon.cmds.size(), exp_rb.size()))
      foreach (mon.cmds[i]) if (i < exp_rb.size())
        `CHECK(mon.cmds[i] == exp_rb[i], $sformatf("readback %0d: %h, expected %h", i, mon.cmds[i], exp_rb[i]))
      foreach (mon.hits[i]) begin
        logic [35:0] u;
        u = unpack_hit(mon.hits[i]);
        while (expq.size() > 0 && expq[0].size() == 0) void'(expq.pop_front());
        checks++;
        if (u[35] || expq.size() == 0) begin failures++; $display("FAIL hit %0d unexpected", i); end
        else begin
          k = expq[0].find_first_index(x) with (x == pix_word_t'(u[34:0]));
          if (k.size() == 0) begin failures++; $display("FAIL hit %0d not in the oldest open trigger", i); end
          else expq[0].delete(k[0]);
        end
      end
      begin
        int left = 0;
        foreach (expq[i]) left += expq[i].size();
        `CHECK(left == 0, $sformatf("%0d triggered hits never sent", left))
      end
      $display("hits %0d tagged %0d sent %0d triggers %0d (expected %0d)", n_hits, n_tag, mon.hits.size(), n_trig, n_trig_exp);
      `CHECK(n_trig == n_trig_exp, "one trigger per set pattern pair")
      `CHECK(n_lock >= 2 && n_unlock >= 1, $sformatf("lock %0d, lock loss %0d", n_lock, n_unlock))
      `CHECK(n_trig > 100, $sformatf("triggers: %0d", n_trig))
      `CHECK(mon.hits.size() > 200, $sformatf("hits read out: %0d", mon.hits.size()))
      `CHECK(mon.chained_pkts > 0, $sformatf("chained hit packages: %0d", mon.chained_pkts))
      `CHECK(mon.cmds.size() > 0, "register readback")
      `CHECK(n_dc_stall > 0, $sformatf("double-column stalls: %0d", n_dc_stall))
      `CHECK(n_exp > 0, $sformatf("S1 expiries: %0d", n_exp))
      `CHECK(n_txstall > 0, $sformatf("TX FIFO stalls: %0d", n_txstall))
      `CHECK(n_rqovf > 0, $sformatf("trigger-ID queue overflows: %0d", n_rqovf))
      `CHECK(n_disabled > 0, $sformatf("hits dropped while disabled: %0d", n_disabled))
      `CHECK(n_clear == 1 && n_gp == 1 && n_cal == 1, $sformatf("clear %0d, global pulse %0d, cal %0d", n_clear, n_gp, n_cal))
      `CHECK(n_err > 0, $sformatf("status error cycles: %0d", n_err))
    end
    `TB_FINISH
  end
