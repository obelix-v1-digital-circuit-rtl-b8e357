// s2_storage: stage-2 (triggerable) storage of a trigger group.
//
// DEPTH slots, each with its own control logic ('small, more logic per
// data-word'). A slot takes a hit from stage 1 and waits. In the cycle in
// which the delayed BCID (bcid - latency) equals the hit's Le, the hit's
// latency ends: if the one-bit trigger is high in that cycle the slot is
// tagged with the trigger ID, otherwise it is freed. Untagged slots whose
// time has passed are freed as well. Readout is by trigger-ID request: while
// req_valid is high, the lowest slot tagged with req_id is presented on the
// output (hit plus ID) and freed when out_ready accepts it. clear empties
// every slot. Tags are visible the cycle after the trigger. The trigger
// matching at the end of the latency and the request by trigger ID follow
// the trigger-group diagram; the slot count and the request handshake are
// this design's own.
module s2_storage
  import obelix_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [BCID_W-1:0]    bcid_dly,
  input  logic                 trigger,
  input  logic [TRIG_ID_W-1:0] trig_id,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  trg_hit_t             in_hit,
  input  logic                 req_valid,
  input  logic [TRIG_ID_W-1:0] req_id,
  output logic                 out_valid,
  input  logic                 out_ready,
  output trg_hit_t             out_hit,
  output logic                 tagged_pulse  // at least one hit tagged this cycle
);
  localparam int unsigned SW = $clog2(DEPTH);

  typedef struct packed {
    logic                 used;
    logic                 tagd;
    logic [TRIG_ID_W-1:0] id;
    trg_hit_t             hit;
  } slot_t;

  slot_t         slot [DEPTH];
  logic [SW-1:0] wsel, rsel;
  logic          have_free;

  always_comb begin
    have_free = 1'b0;
    wsel      = '0;
    out_valid = 1'b0;
    rsel      = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!slot[i].used) begin
        have_free = 1'b1;
        wsel      = SW'(i);
      end
      if (req_valid && slot[i].used && slot[i].tagd && slot[i].id == req_id) begin
        out_valid = 1'b1;
        rsel      = SW'(i);
      end
    end
    out_hit = slot[rsel].hit;
  end
  assign in_ready = have_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) slot[i] <= '0;
      tagged_pulse <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) slot[i].used <= 1'b0;
      tagged_pulse <= 1'b0;
    end else begin
      tagged_pulse <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        if (slot[i].used && !slot[i].tagd) begin
          if (slot[i].hit.le == bcid_dly) begin
            if (trigger) begin
              slot[i].tagd <= 1'b1;
              slot[i].id     <= trig_id;
              tagged_pulse   <= 1'b1;
            end else begin
              slot[i].used <= 1'b0;
            end
          end else if (!le_waiting(slot[i].hit.le, bcid_dly)) begin
            slot[i].used <= 1'b0;
          end
        end
      end
      if (out_valid && out_ready) slot[rsel].used <= 1'b0;
      if (in_valid && have_free) begin
        slot[wsel] <= '{used: 1'b1, tagd: 1'b0, id: '0, hit: in_hit};
      end
    end
  end

endmodule
