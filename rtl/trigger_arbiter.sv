// trigger_arbiter: turns matched trigger frames into the one-bit trigger of
// the trigger unit.
//
// A command word lasts 16 fast cycles, i.e. two cycles of the 20 MHz BCID
// clock, so its 4-bit bunch-crossing pattern is mapped onto two BCID slots:
// slot 0 = pat[3] | pat[2] is issued in the cycle after the frame was
// matched, slot 1 = pat[1] | pat[0] in the cycle after that. Each issued
// trigger carries the 6-bit ID {tag, slot}. With triggers disabled
// (trig_en low) the slots are dropped. The handshake rule is that a new
// frame only arrives once the previous frame's slots have been issued; a
// frame that breaks it is dropped and reported on 'collision' (checked by
// an assertion in simulation). The slot mapping, ID format and collision
// handling are this design's own; the one-bit trigger plus trigger ID output
// follows the data-path diagram.
module trigger_arbiter
  import obelix_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trig_valid,
  input  logic [3:0]           trig_pat,
  input  logic [4:0]           trig_tag,
  input  logic                 trig_en,
  output logic                 trigger,
  output logic [TRIG_ID_W-1:0] trig_id,
  output logic                 collision
);
  logic       pend;       // slot 1 waiting
  logic [4:0] pend_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trigger   <= 1'b0;
      trig_id   <= '0;
      pend      <= 1'b0;
      pend_tag  <= '0;
      collision <= 1'b0;
    end else begin
      collision <= trig_valid && pend;
      if (pend) begin
        trigger <= 1'b1;
        trig_id <= {pend_tag, 1'b1};
        pend    <= 1'b0;
      end else if (trig_valid && trig_en) begin
        trigger  <= trig_pat[3] | trig_pat[2];
        trig_id  <= {trig_tag, 1'b0};
        pend     <= trig_pat[1] | trig_pat[0];
        pend_tag <= trig_tag;
      end else begin
        trigger <= 1'b0;
      end
    end
  end

  // a trigger frame must not arrive while slot 1 of the previous one waits
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(trig_valid && pend))
    else $error("trigger frame arrived while a slot was pending");

endmodule
