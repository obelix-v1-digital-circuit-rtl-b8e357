// tb_cru: checks the control unit end to end on the 20 MHz side: a WrReg to
// the latency register changes trig_latency, a RdReg returns the 24-bit
// readback word {addr[7:0], data} in the second cycle after the edge that
// takes the command's last word,
// trigger frames produce the trigger pulses with IDs, clearing the trigger
// enable bit suppresses them, and Clear/GlobalPulse/Cal reach the outputs.
`include "tb_macros.svh"
module tb_cru;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx_sync_valid = 0;
  logic [15:0] rx_sync_data = 0;
  logic [3:0] chip_id = 4'd2;
  logic trigger, hit_en, clear, glb_pulse, cal, hitcmd_valid, sym_err, trig_collision;
  logic [5:0] trig_id;
  logic [8:0] trig_latency;
  logic [19:0] cal_data;
  logic [23:0] hitcmd;
  always #25 clk = ~clk;
  cru dut (.*);

  int n_trig = 0, n_clr = 0, n_gp = 0, n_cal = 0, n_rb = 0;
  logic [5:0] ids [$];
  logic [23:0] l_rb;
  always @(posedge clk) if (rst_n) begin
    if (trigger) begin n_trig++; ids.push_back(trig_id); end
    if (clear && rst_n) n_clr++;
    if (glb_pulse) n_gp++;
    if (cal) n_cal++;
    if (hitcmd_valid) begin n_rb++; l_rb = hitcmd; end
  end

  task automatic word(input logic [15:0] w);
    @(negedge clk) begin rx_sync_data = w; rx_sync_valid = 1; end
    @(negedge clk) rx_sync_valid = 0;
  endtask
  function automatic logic [15:0] dpair(input logic [9:0] v);
    return {dsym(v[9:5]), dsym(v[4:0])};
  endfunction
  task automatic wrreg(input logic [8:0] a, input logic [15:0] d);
    logic [29:0] p;
    p = {1'b0, a, d, 4'b0};
    word({CMD_WRREG, dsym(2)}); word(dpair(p[29:20])); word(dpair(p[19:10])); word(dpair(p[9:0]));
  endtask
  task automatic rdreg(input logic [8:0] a);
    word({CMD_RDREG, dsym(2)}); word(dpair({1'b0, a}));
  endtask

  initial begin #1000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    int r0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    `CHECK(trig_latency == 9'd100, "default latency")
    wrreg(9'd0, 16'd37);
    repeat (2) @(negedge clk);
    `CHECK(trig_latency == 9'd37, "latency written")
    wrreg(9'd7, 16'hA5C3);
    r0 = n_rb;
    rdreg(9'd7);
    // last word accepted at the previous posedge; decoder pulse +1, readback +2
    `CHECK(!hitcmd_valid, "readback not yet")
    @(posedge clk); #1 `CHECK(hitcmd_valid && hitcmd == {8'd7, 16'hA5C3}, "readback word two cycles after the last word")
    @(negedge clk);
    rdreg(9'd0);
    repeat (3) @(negedge clk);
    `CHECK(n_rb == r0 + 2 && l_rb == {8'd0, 16'd37}, "readback of latency")
    word({tsym(4'b1010), dsym(13)});
    repeat (3) @(negedge clk);
    `CHECK(n_trig == 2 && ids.size() == 2 && ids[0] == {5'd13, 1'b0} && ids[1] == {5'd13, 1'b1}, "triggers with IDs")
    wrreg(9'd1, 16'h0002);    // trigger enable off, hit enable on
    word({tsym(4'b1111), dsym(1)});
    repeat (3) @(negedge clk);
    `CHECK(n_trig == 2, "triggers disabled")
    `CHECK(hit_en, "hit enable kept")
    word({CMD_CLEAR, dsym(2)}); word({CMD_GPULSE, dsym(2)});
    word({CMD_CAL, dsym(2)}); word(dpair(10'h155)); word(dpair(10'h2AA));
    repeat (3) @(negedge clk);
    `CHECK(n_clr == 1 && n_gp == 1 && n_cal == 1 && cal_data == 20'h556AA, $sformatf("periphery commands %0d %0d %0d %h", n_clr, n_gp, n_cal, cal_data))
    `CHECK(!sym_err && !trig_collision, "no errors")
    `TB_FINISH
  end
endmodule
