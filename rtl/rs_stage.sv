// rs_stage: one stage of the pipelined range search on a port field.
//
// Every rule i holds a lower bound LB_i and an upper bound UB_i.  The stage
// compares K-bit sub-field STAGE of the header (stage 0 takes the most
// significant K bits) with the same sub-field of every LB_i and UB_i and
// updates two running comparison states per rule:
//   lower bound: gt (header already known > LB_i) and eq (equal so far)
//   upper bound: lt (header already known < UB_i) and eq (equal so far)
// After the last stage, header >= LB_i is gt|eq and header <= UB_i is lt|eq.
// The published text compares the whole field with LB (>=) and UB (<=) and
// spreads the work over W/K stages of one sub-field each; carrying the
// greater/equal state between stages is this design's way of making the
// per-sub-field comparison exact.
//
// Timing: all outputs are registered, one clock after the inputs.
module rs_stage #(
  parameter int unsigned N     = 32,
  parameter int unsigned W     = 16,
  parameter int unsigned K     = 4,
  parameter int unsigned STAGE = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [W-1:0]        hdr_in,
  input  logic [N-1:0]        lb_gt_in,
  input  logic [N-1:0]        lb_eq_in,
  input  logic [N-1:0]        ub_lt_in,
  input  logic [N-1:0]        ub_eq_in,
  input  logic [N-1:0][W-1:0] lb,
  input  logic [N-1:0][W-1:0] ub,
  output logic                out_valid,
  output logic [W-1:0]        hdr_out,
  output logic [N-1:0]        lb_gt_out,
  output logic [N-1:0]        lb_eq_out,
  output logic [N-1:0]        ub_lt_out,
  output logic [N-1:0]        ub_eq_out
);

  localparam int unsigned MSB = W - 1 - STAGE * K;

  logic [K-1:0] sub_field;
  logic [N-1:0] lb_gt_nxt, lb_eq_nxt, ub_lt_nxt, ub_eq_nxt;

  assign sub_field = hdr_in[MSB -: K];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      lb_gt_nxt[i] = lb_gt_in[i] | (lb_eq_in[i] & (sub_field >  lb[i][MSB -: K]));
      lb_eq_nxt[i] = lb_eq_in[i] & (sub_field == lb[i][MSB -: K]);
      ub_lt_nxt[i] = ub_lt_in[i] | (ub_eq_in[i] & (sub_field <  ub[i][MSB -: K]));
      ub_eq_nxt[i] = ub_eq_in[i] & (sub_field == ub[i][MSB -: K]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hdr_out   <= '0;
      lb_gt_out <= '0;
      lb_eq_out <= '0;
      ub_lt_out <= '0;
      ub_eq_out <= '0;
    end else begin
      out_valid <= in_valid;
      hdr_out   <= hdr_in;
      lb_gt_out <= lb_gt_nxt;
      lb_eq_out <= lb_eq_nxt;
      ub_lt_out <= ub_lt_nxt;
      ub_eq_out <= ub_eq_nxt;
    end
  end

endmodule
