// s1_fifo: stage-1 storage of a trigger group.
//
// A plain first-in first-out buffer (a single-port-per-side array, the
// 'simple power friendly SRAM FIFO' of the specification) that holds merged
// hits until stage 2 has a free slot. Overload protection at its output: a
// head hit that is no longer waiting for its trigger (the delayed BCID has
// reached or passed its Le) can no longer be matched, so it is discarded
// instead of presented, and 'expired' pulses for that cycle. Write side and
// read side use valid/ready handshakes; a written hit can be read the next
// cycle. The buffering and the discard-on-output rule follow the
// specification; the depth and the handshake are this design's own. The default
// depth of 32 (plus 8 in stage 2) covers the mean of about 24 hits that a
// group of 8 columns holds over a 100-tick latency at 120 MHz/cm2.
module s1_fifo
  import obelix_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [BCID_W-1:0] bcid_dly,
  input  logic              in_valid,
  output logic              in_ready,
  input  trg_hit_t          in_hit,
  output logic              out_valid,
  input  logic              out_ready,
  output trg_hit_t          out_hit,
  output logic              expired
);
  localparam int unsigned PW = $clog2(DEPTH);

  trg_hit_t      mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  logic          push, pop, head_ok;

  assign in_ready  = (cnt != (PW+1)'(DEPTH));
  assign push      = in_valid && in_ready;
  assign out_hit   = mem[rp];
  assign head_ok   = le_waiting(out_hit.le, bcid_dly);
  assign out_valid = (cnt != '0) && head_ok;
  assign expired   = (cnt != '0) && !head_ok;
  assign pop       = (out_valid && out_ready) || expired;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else if (clear) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

endmodule
