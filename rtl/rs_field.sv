// rs_field: range search of one port field (source or destination port).
//
// Holds the lower bound LB_i and upper bound UB_i of every rule i in
// registers and runs the header through W/K rs_stage instances (RS_SP1..4 or
// RS_DP1..4 with the published W = 16, K = 4).  W/K clocks after a header
// enters, the outputs are
//   bv_lout[i] = (header >= LB_i) & bv_in[i]     lower-bound vector
//   bv_hout[i] = (header <= UB_i) & bv_in[i]     upper-bound vector
// bv_in is the finished address vector of the same packet (BV_SA_Out for the
// source port, BV_DA_Out for the destination port).  Both address and port
// pipelines are W/K stages long, so that vector is ready in the same clock
// as the last range-search stage and is ANDed in at the output without
// adding a clock; this keeps the whole classifier at W/K clocks of latency.
//
// Bounds are written per rule through cfg_we/cfg_rule/cfg_lb/cfg_ub.  At
// reset every rule gets the empty range LB = all ones, UB = 0.
module rs_field #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16,
  parameter int unsigned K = 4,
  localparam int unsigned STAGES = W / K,
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     hdr_in,
  input  logic [N-1:0]     bv_in,
  output logic             out_valid,
  output logic [N-1:0]     bv_lout,
  output logic [N-1:0]     bv_hout,
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_rule,
  input  logic [W-1:0]     cfg_lb,
  input  logic [W-1:0]     cfg_ub
);

  if (W % K != 0) begin : g_bad_k
    $error("rs_field: W must be a multiple of K");
  end

  logic [N-1:0][W-1:0] lb_q, ub_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_q <= '1;
      ub_q <= '0;
    end else if (cfg_we) begin
      lb_q[cfg_rule] <= cfg_lb;
      ub_q[cfg_rule] <= cfg_ub;
    end
  end

  logic         vld   [STAGES+1];
  logic [W-1:0] hdr   [STAGES+1];
  logic [N-1:0] lb_gt [STAGES+1];
  logic [N-1:0] lb_eq [STAGES+1];
  logic [N-1:0] ub_lt [STAGES+1];
  logic [N-1:0] ub_eq [STAGES+1];

  assign vld[0]   = in_valid;
  assign hdr[0]   = hdr_in;
  assign lb_gt[0] = '0;
  assign lb_eq[0] = '1;
  assign ub_lt[0] = '0;
  assign ub_eq[0] = '1;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    rs_stage #(.N(N), .W(W), .K(K), .STAGE(s)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (vld[s]),
      .hdr_in    (hdr[s]),
      .lb_gt_in  (lb_gt[s]),
      .lb_eq_in  (lb_eq[s]),
      .ub_lt_in  (ub_lt[s]),
      .ub_eq_in  (ub_eq[s]),
      .lb        (lb_q),
      .ub        (ub_q),
      .out_valid (vld[s+1]),
      .hdr_out   (hdr[s+1]),
      .lb_gt_out (lb_gt[s+1]),
      .lb_eq_out (lb_eq[s+1]),
      .ub_lt_out (ub_lt[s+1]),
      .ub_eq_out (ub_eq[s+1])
    );
  end

  assign out_valid = vld[STAGES];
  assign bv_lout   = (lb_gt[STAGES] | lb_eq[STAGES]) & bv_in;
  assign bv_hout   = (ub_lt[STAGES] | ub_eq[STAGES]) & bv_in;

endmodule
