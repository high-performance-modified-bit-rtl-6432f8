// net_aggregator: combines the per-field bit vectors of one packet.
//
// Rule i matches the packet only if it matches every field, so the output
// is the bitwise AND of the source- and destination-address vectors and the
// lower- and upper-bound vectors of both ports, as published.  Purely
// combinational.
module net_aggregator #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] bv_sa,
  input  logic [N-1:0] bv_da,
  input  logic [N-1:0] bv_sp_l,
  input  logic [N-1:0] bv_sp_h,
  input  logic [N-1:0] bv_dp_l,
  input  logic [N-1:0] bv_dp_h,
  output logic [N-1:0] bv_out
);

  assign bv_out = bv_sa & bv_da & bv_sp_l & bv_sp_h & bv_dp_l & bv_dp_h;

endmodule
