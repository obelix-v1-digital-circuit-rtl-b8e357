// tb_cmd_decoder: drives command words (one every two cycles, as delivered by
// the SCU) and checks every decoded output against values built by the
// testbench: WrReg address/data, RdReg address, Clear, GlobalPulse, Cal
// payload, trigger pattern and tag (also interleaved inside a WrReg), chip-ID
// filtering (own ID, broadcast, other ID), ignored Sync/Noop/PLL-lock words
// and the error flag for a bad data symbol.
`include "tb_macros.svh"
module tb_cmd_decoder;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx_valid = 0;
  logic [15:0] rx_data = 0;
  logic [3:0] chip_id = 4'd5;
  logic trig_valid, wr_en, rd_en, clear, glb_pulse, cal, sym_err;
  logic [3:0] trig_pat;
  logic [4:0] trig_tag;
  logic [8:0] wr_addr, rd_addr;
  logic [15:0] wr_data;
  logic [19:0] cal_data;
  always #25 clk = ~clk;
  cmd_decoder dut (.*);

  // event log of the outputs
  int n_wr = 0, n_rd = 0, n_clr = 0, n_gp = 0, n_cal = 0, n_trig = 0, n_err = 0;
  logic [8:0] l_wa, l_ra; logic [15:0] l_wd; logic [19:0] l_cd; logic [3:0] l_tp; logic [4:0] l_tt;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin n_wr++; l_wa = wr_addr; l_wd = wr_data; end
    if (rd_en) begin n_rd++; l_ra = rd_addr; end
    if (clear) n_clr++;
    if (glb_pulse) n_gp++;
    if (cal) begin n_cal++; l_cd = cal_data; end
    if (trig_valid) begin n_trig++; l_tp = trig_pat; l_tt = trig_tag; end
    if (sym_err) n_err++;
  end

  task automatic word(input logic [15:0] w);
    @(negedge clk) begin rx_data = w; rx_valid = 1; end
    @(negedge clk) rx_valid = 0;
  endtask
  function automatic logic [15:0] dpair(input logic [9:0] v);
    return {dsym(v[9:5]), dsym(v[4:0])};
  endfunction
  function automatic logic [7:0] idsym(input logic [4:0] id);
    return dsym(id);
  endfunction
  task automatic wrreg(input logic [4:0] id, input logic [8:0] a, input logic [15:0] d, input bit trig_inside);
    logic [29:0] p;
    p = {1'b0, a, d, 4'b0};
    word({CMD_WRREG, idsym(id)});
    word(dpair(p[29:20]));
    if (trig_inside) word({tsym(9), dsym(21)});
    word(dpair(p[19:10]));
    word(dpair(p[9:0]));
    repeat (2) @(negedge clk);
  endtask

  initial begin #1000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [8:0] a; logic [15:0] d; int w0, r0, t0;
      a = 9'($urandom); d = 16'($urandom);
      w0 = n_wr; t0 = n_trig;
      wrreg(5'd5, a, d, n % 3 == 0);
      `CHECK(n_wr == w0 + 1 && l_wa == a && l_wd == d, "WrReg to own ID")
      if (n % 3 == 0) `CHECK(n_trig == t0 + 1 && l_tp == 4'd9 && l_tt == 5'd21, "trigger inside WrReg")
      w0 = n_wr;
      wrreg(5'd16, a ^ 9'h1, d, 0);
      `CHECK(n_wr == w0 + 1 && l_wa == (a ^ 9'h1), "WrReg broadcast")
      w0 = n_wr;
      wrreg(5'd6, a, d, 0);
      `CHECK(n_wr == w0, "WrReg to another chip ignored")
      r0 = n_rd;
      word({CMD_RDREG, idsym(5)}); word(dpair({1'b0, a})); repeat (2) @(negedge clk);
      `CHECK(n_rd == r0 + 1 && l_ra == a, "RdReg address")
    end
    begin
      int c0, g0, k0, t0, e0;
      logic [19:0] cd;
      c0 = n_clr; g0 = n_gp; k0 = n_cal; t0 = n_trig; e0 = n_err;
      word({CMD_CLEAR, idsym(5)});
      word({CMD_GPULSE, idsym(16)});
      cd = 20'($urandom);
      word({CMD_CAL, idsym(5)}); word(dpair(cd[19:10])); word(dpair(cd[9:0]));
      word(SYNC_WORD); word(NOOP_WORD); word(PLL_LOCK);
      for (int p = 1; p < 16; p++) begin
        word({tsym(p), dsym(p + 3)});
        repeat (1) @(negedge clk);
        `CHECK(l_tp == 4'(p) && l_tt == 5'(p + 3), "trigger pattern and tag")
      end
      repeat (2) @(negedge clk);
      `CHECK(n_clr == c0 + 1, "Clear")
      `CHECK(n_gp == g0 + 1, "GlobalPulse")
      `CHECK(n_cal == k0 + 1 && l_cd == cd, "Cal payload")
      `CHECK(n_trig == t0 + 15, "15 trigger patterns")
      `CHECK(n_err == e0, "no errors on valid words")
      word({CMD_WRREG, idsym(5)}); word(16'h1234);
      repeat (2) @(negedge clk);
      `CHECK(n_err == e0 + 1, "bad data symbol flagged")
      c0 = n_wr;
      wrreg(5'd5, 9'h3, 16'hBEEF, 0);
      `CHECK(n_wr == c0 + 1 && l_wd == 16'hBEEF, "decoder recovers after an error")
    end
    `TB_FINISH
  end
endmodule
