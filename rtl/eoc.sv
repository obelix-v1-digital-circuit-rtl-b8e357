// eoc: end of column of one double column (DC).
//
// Accepts the hits that the double column's readout delivers (valid/ready
// handshake), extends each hit's 7-bit leading-edge timestamp to the 9-bit
// BCID and keeps the result in a small first-in first-out buffer (S0) until
// the data merge of its trigger group takes it. Extension: the upper two
// bits come from the current BCID; if the hit's 7 low bits are ahead of the
// BCID's low bits the hit predates the last 128-cycle wrap and one is
// subtracted from the upper bits. With hit_en low, hits are accepted and
// discarded. A hit is visible at the output the cycle after it is accepted.
// The Le extension to 9 bits and the per-EoC S0 buffer follow the
// specification; the 7-bit pixel Le, the depth and the handshake are this
// design's own choices.
module eoc
  import obelix_pkg::*;
#(
  parameter int unsigned S0_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              hit_en,
  input  logic [BCID_W-1:0] bcid,
  input  logic              hit_valid,
  output logic              hit_ready,
  input  dc_hit_t           hit,
  output logic              out_valid,
  input  logic              out_ready,
  output eoc_hit_t          out_hit
);
  localparam int unsigned PW = (S0_DEPTH > 1) ? $clog2(S0_DEPTH) : 1;

  eoc_hit_t          mem [S0_DEPTH];
  logic [PW-1:0]     wp, rp;
  logic [PW:0]       cnt;
  logic              push, pop;
  eoc_hit_t          ext;

  always_comb begin
    logic [BCID_W-LE_PIX_W-1:0] up;
    up = bcid[BCID_W-1:LE_PIX_W];
    if (hit.le > bcid[LE_PIX_W-1:0]) up = up - 1'b1;
    ext = '{row: hit.row, col: hit.col, le: {up, hit.le}, te: hit.te};
  end

  assign hit_ready = (cnt != (PW+1)'(S0_DEPTH));
  assign push      = hit_valid && hit_ready && hit_en;
  assign out_valid = (cnt != '0);
  assign pop       = out_valid && out_ready;
  assign out_hit   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < S0_DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) begin
        mem[wp] <= ext;
        wp      <= (wp == PW'(S0_DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == PW'(S0_DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

endmodule
