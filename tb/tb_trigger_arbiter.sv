// tb_trigger_arbiter: sends trigger frames every two cycles with random
// patterns and tags, and checks the cycle-exact trigger pulses and IDs:
// slot 0 (pat[3]|pat[2]) one cycle after the frame, slot 1 (pat[1]|pat[0])
// two cycles after, ID {tag, slot}. Also checks trig_en gating and that the
// collision flag stays low at the nominal frame rate (a frame during a
// pending slot violates the module's assertion and stops the simulation).
`include "tb_macros.svh"
module tb_trigger_arbiter;
  import obelix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trig_valid = 0, trig_en = 1;
  logic [3:0] trig_pat = 0;
  logic [4:0] trig_tag = 0;
  logic trigger, collision;
  logic [5:0] trig_id;
  always #25 clk = ~clk;
  trigger_arbiter dut (.*);

  // expected trigger per cycle, indexed by cycle number
  int cyc = 0;
  always @(posedge clk) cyc++;
  logic exp_t [int];
  logic [5:0] exp_id [int];
  int n_trig = 0, n_coll = 0;
  bit check_on = 1;
  always @(negedge clk) if (rst_n && check_on) begin
    logic e;
    e = exp_t.exists(cyc) ? exp_t[cyc] : 1'b0;
    `CHECK(trigger == e, $sformatf("trigger at cycle %0d", cyc))
    if (e) `CHECK(trig_id == exp_id[cyc], "trigger id")
    if (trigger) n_trig++;
  end
  always @(negedge clk) if (collision) n_coll++;

  initial begin #1000000; failures++; $display("watchdog expired"); `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] p; logic [4:0] t;
      p = 4'($urandom_range(1, 15)); t = 5'($urandom);
      trig_en = (n % 10 != 9);
      trig_valid = 1; trig_pat = p; trig_tag = t;
      // cycle at this negedge is 'cyc'; pulse visible after next posedge
      exp_t[cyc + 1] = trig_en && (p[3] | p[2]); exp_id[cyc + 1] = {t, 1'b0};
      exp_t[cyc + 2] = trig_en && (p[1] | p[0]); exp_id[cyc + 2] = {t, 1'b1};
      @(negedge clk) trig_valid = 0;
      @(negedge clk);
    end
    `CHECK(n_trig > 150, "triggers issued")
    `CHECK(n_coll == 0, "no collision at the nominal frame rate")
    `TB_FINISH
  end
endmodule
