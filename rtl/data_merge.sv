// data_merge: round-robin merge of the end-of-column streams of a trigger
// group.
//
// N requesters with valid/ready handshakes share one output. The grant is
// combinational: the first valid requester after the one served last, in
// circular order, is connected to the output, and only its ready follows
// out_ready. The pointer moves when a transfer happens, so a requester that
// keeps its valid high is served at most once every N transfers while
// others wait. The output carries the hit and the index of its source.
// The round-robin policy follows the specification; the handshake is this
// design's own.
module data_merge
  import obelix_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  input  eoc_hit_t             in_hit [N],
  output logic                 out_valid,
  input  logic                 out_ready,
  output eoc_hit_t             out_hit,
  output logic [$clog2(N)-1:0] out_src
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    out_valid = 1'b0;
    out_src   = '0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!out_valid && in_valid[idx]) begin
        out_valid = 1'b1;
        out_src   = idx;
      end
    end
    out_hit  = in_hit[out_src];
    in_ready = '0;
    in_ready[out_src] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (out_valid && out_ready) last <= out_src;
  end

endmodule
