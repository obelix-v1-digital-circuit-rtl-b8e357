// tru: trigger unit, the trigger memory of the whole matrix.
//
// N_TRG trigger groups (four double columns each) store time-stamped hits
// and match them against the one-bit trigger at the end of the trigger
// latency. The BCID counter provides the timestamp and its copy delayed by
// the latency. Every trigger pushes its ID into a request queue; the head of
// the queue is broadcast to all groups as the requested ID, the column-level
// priority chain lets the lowest group holding a hit with that ID drive the
// output register, and the ID is retired once no group holds such a hit.
// The output is a 35-bit pixel word with valid/ready toward the
// transmission unit (one word per cycle at most, visible the cycle after
// the grant). One-cycle status pulses report expiries in stage 1 and
// request-queue overflow. All logic runs on the 20 MHz clock. The group
// count, the BCID counter and the chain follow the chip description; the
// request queue and its depth are this design's own.
module tru
  import obelix_pkg::*;
#(
  parameter int unsigned N_TRG    = 112,
  parameter int unsigned S0_DEPTH = 2,
  parameter int unsigned S1_DEPTH = 32,
  parameter int unsigned S2_DEPTH = 8,
  parameter int unsigned RQ_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 hit_en,
  input  logic [BCID_W-1:0]    latency,
  input  logic [4*N_TRG-1:0]   dc_valid,
  output logic [4*N_TRG-1:0]   dc_ready,
  input  dc_hit_t              dc_hit [4*N_TRG],
  input  logic                 trigger,
  input  logic [TRIG_ID_W-1:0] trig_id,
  output logic                 pix_valid,
  input  logic                 pix_ready,
  output pix_word_t            pix_data,
  output logic [BCID_W-1:0]    bcid,
  output logic                 s1_expired,
  output logic                 rq_overflow
);
  localparam int unsigned GW = $clog2(N_TRG);
  localparam int unsigned QW = $clog2(RQ_DEPTH);

  logic [BCID_W-1:0] bcid_dly;
  bcid_counter u_bcid (.clk(clk), .rst_n(rst_n), .latency(latency), .bcid(bcid), .bcid_dly(bcid_dly));

  // ---- trigger-ID request queue ----
  logic [TRIG_ID_W-1:0] rq_mem [RQ_DEPTH];
  logic [QW-1:0]        rq_wp, rq_rp;
  logic [QW:0]          rq_cnt;
  logic                 rq_push, rq_pop, req_valid;
  logic [TRIG_ID_W-1:0] req_id;

  assign req_valid = (rq_cnt != '0);
  assign req_id    = rq_mem[rq_rp];

  // ---- trigger groups ----
  logic [N_TRG-1:0] g_valid, g_ready, g_exp;
  pix_word_t        g_word [N_TRG];

  for (genvar g = 0; g < N_TRG; g++) begin : g_trg
    trg #(.TRG_IDX(g), .S0_DEPTH(S0_DEPTH), .S1_DEPTH(S1_DEPTH), .S2_DEPTH(S2_DEPTH)) u_trg (
      .clk(clk), .rst_n(rst_n), .clear(clear), .hit_en(hit_en), .bcid(bcid), .bcid_dly(bcid_dly),
      .dc_valid(dc_valid[4*g +: 4]), .dc_ready(dc_ready[4*g +: 4]), .dc_hit(dc_hit[4*g +: 4]),
      .trigger(trigger), .trig_id(trig_id), .req_valid(req_valid), .req_id(req_id),
      .out_valid(g_valid[g]), .out_ready(g_ready[g]), .out_word(g_word[g]),
      .s1_expired(g_exp[g]), .tag_pulse()
    );
  end

  logic [N_TRG-1:0] gnt;
  logic [GW-1:0]    gnt_idx;
  logic             any;
  priority_chain #(.N(N_TRG)) u_chain (.req(g_valid), .gnt(gnt), .gnt_idx(gnt_idx), .any(any));

  // output register
  logic take;
  assign take    = any && (!pix_valid || pix_ready);
  assign g_ready = take ? gnt : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_data  <= '0;
    end else if (clear) begin
      pix_valid <= 1'b0;
    end else begin
      if (take) begin
        pix_valid <= 1'b1;
        pix_data  <= g_word[gnt_idx];
      end else if (pix_ready) begin
        pix_valid <= 1'b0;
      end
    end
  end

  assign rq_push = trigger && (rq_cnt != (QW+1)'(RQ_DEPTH));
  assign rq_pop  = req_valid && !any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_wp       <= '0;
      rq_rp       <= '0;
      rq_cnt      <= '0;
      rq_overflow <= 1'b0;
      for (int i = 0; i < RQ_DEPTH; i++) rq_mem[i] <= '0;
    end else if (clear) begin
      rq_wp       <= '0;
      rq_rp       <= '0;
      rq_cnt      <= '0;
      rq_overflow <= 1'b0;
    end else begin
      rq_overflow <= trigger && !rq_push;
      if (rq_push) begin
        rq_mem[rq_wp] <= trig_id;
        rq_wp         <= rq_wp + 1'b1;
      end
      if (rq_pop) rq_rp <= rq_rp + 1'b1;
      rq_cnt <= rq_cnt + (QW+1)'(rq_push) - (QW+1)'(rq_pop);
    end
  end

  assign s1_expired = |g_exp;

endmodule
