// trg: trigger group, the unit of trigger memory serving four double columns.
//
// Data path: four end-of-column blocks (each with its S0 buffer) -> round-
// robin data merge -> stage-1 FIFO -> stage-2 triggerable storage. A block
// is 8 double columns, i.e. two neighbouring groups, so the address is:
// 10-bit pixel inside the double column {row[8:0], column in DC} (464 rows
// fit in 9 bits), 3-bit DC inside the block {TRG_IDX[0], DC index}, and the
// 6-bit block TRG_IDX/2 (56 blocks). The merge forms the first two, the
// output adds the block to make the 35-bit pixel word. Stage 2 tags hits whose latency ends in a trigger
// cycle and presents those tagged with req_id to the column-level priority
// chain (out_valid/out_ready). Hit expiry in stage 1 and stage 2 is counted
// by the pulses s1_expired and tag_pulse. The structure follows the trigger-
// group diagram; the sizes are parameters with this design's own defaults.
// The field widths (10 + 3 + 6) follow the chip description; the grouping of
// two trigger groups into one block is this design's reading of them.
module trg
  import obelix_pkg::*;
#(
  parameter int unsigned TRG_IDX  = 0,
  parameter int unsigned S0_DEPTH = 2,
  parameter int unsigned S1_DEPTH = 32,
  parameter int unsigned S2_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 hit_en,
  input  logic [BCID_W-1:0]    bcid,
  input  logic [BCID_W-1:0]    bcid_dly,
  input  logic [3:0]           dc_valid,
  output logic [3:0]           dc_ready,
  input  dc_hit_t              dc_hit [4],
  input  logic                 trigger,
  input  logic [TRIG_ID_W-1:0] trig_id,
  input  logic                 req_valid,
  input  logic [TRIG_ID_W-1:0] req_id,
  output logic                 out_valid,
  input  logic                 out_ready,
  output pix_word_t            out_word,
  output logic                 s1_expired,
  output logic                 tag_pulse
);
  logic [3:0] e_valid, e_ready;
  eoc_hit_t   e_hit [4];

  for (genvar d = 0; d < 4; d++) begin : g_eoc
    eoc #(.S0_DEPTH(S0_DEPTH)) u_eoc (
      .clk(clk), .rst_n(rst_n), .clear(clear), .hit_en(hit_en), .bcid(bcid),
      .hit_valid(dc_valid[d]), .hit_ready(dc_ready[d]), .hit(dc_hit[d]),
      .out_valid(e_valid[d]), .out_ready(e_ready[d]), .out_hit(e_hit[d])
    );
  end

  logic     m_valid, m_ready;
  eoc_hit_t m_hit;
  logic [1:0] m_src;
  data_merge #(.N(4)) u_merge (
    .clk(clk), .rst_n(rst_n), .in_valid(e_valid), .in_ready(e_ready), .in_hit(e_hit),
    .out_valid(m_valid), .out_ready(m_ready), .out_hit(m_hit), .out_src(m_src)
  );

  trg_hit_t m_trg;
  localparam logic HALF = 1'(TRG_IDX % 2);
  assign m_trg = '{row: {m_hit.row[ROW_W-2:0], m_hit.col}, colb: {HALF, m_src}, le: m_hit.le, te: m_hit.te};

  logic     s1_valid, s1_ready;
  trg_hit_t s1_hit;
  s1_fifo #(.DEPTH(S1_DEPTH)) u_s1 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bcid_dly(bcid_dly),
    .in_valid(m_valid), .in_ready(m_ready), .in_hit(m_trg),
    .out_valid(s1_valid), .out_ready(s1_ready), .out_hit(s1_hit), .expired(s1_expired)
  );

  trg_hit_t s2_hit;
  s2_storage #(.DEPTH(S2_DEPTH)) u_s2 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bcid_dly(bcid_dly),
    .trigger(trigger), .trig_id(trig_id),
    .in_valid(s1_valid), .in_ready(s1_ready), .in_hit(s1_hit),
    .req_valid(req_valid), .req_id(req_id),
    .out_valid(out_valid), .out_ready(out_ready), .out_hit(s2_hit), .tagged_pulse(tag_pulse)
  );

  localparam logic [BLOCK_W-1:0] BLOCK = BLOCK_W'(TRG_IDX / 2);
  assign out_word = '{row: s2_hit.row, colb: s2_hit.colb, block: BLOCK, le: s2_hit.le, te: s2_hit.te};

endmodule
