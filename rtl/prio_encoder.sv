// prio_encoder: selects the highest-priority rule of a match vector.
//
// Rule 0 has the highest priority, rule N-1 the lowest (the ordering is
// this design's choice; the published text only says the encoder extracts
// the highest-priority matching rule).  match is set when any bit of bv is
// set, and idx is then the lowest set bit position; idx is 0 when nothing
// matches.  Purely combinational.
module prio_encoder #(
  parameter int unsigned N = 32,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     bv,
  output logic             match,
  output logic [IDX_W-1:0] idx
);

  always_comb begin
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (bv[i]) idx = IDX_W'(i);
    end
  end

  assign match = |bv;

endmodule
