// priority_chain: column-level priority chain of the trigger unit.
//
// N trigger groups request the shared readout bus; the grant goes to the
// lowest-numbered requester, as in a daisy chain where each group passes
// the token on only if it does not need it. Purely combinational: gnt is
// one-hot (or zero when nobody requests) and gnt_idx is its index. The
// chain itself is named in the trigger-group diagram; the fixed order is
// this design's own choice.
module priority_chain #(
  parameter int unsigned N = 112
) (
  input  logic [N-1:0]         req,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  always_comb begin
    logic token;  // no group below the current one requests
    token   = 1'b1;
    gnt_idx = '0;
    for (int i = 0; i < N; i++) begin
      gnt[i] = req[i] && token;
      if (gnt[i]) gnt_idx = $clog2(N)'(i);
      token  = token && !req[i];
    end
    any = !token;
  end
endmodule
