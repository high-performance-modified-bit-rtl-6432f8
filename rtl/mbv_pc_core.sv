// mbv_pc_core: pipelined modified bit-vector classification engine.
//
// Four field engines run side by side on the header of one packet:
//   mbv_field  source address       -> BV_SA_Out
//   mbv_field  destination address  -> BV_DA_Out
//   rs_field   source port          -> BV_SP_Lout, BV_SP_Hout (qualified by BV_SA_Out)
//   rs_field   destination port     -> BV_DP_Lout, BV_DP_Hout (qualified by BV_DA_Out)
// Each is W/K stages deep (four with the published W = 16, K = 4).  The six
// vectors are ANDed by net_aggregator and prio_encoder picks the lowest
// numbered matching rule.  A header presented with hdr_valid before clock
// edge t gives out_valid/out_match/out_rule after edge t + W/K (4 clocks);
// a new header may be presented every clock.  Aggregator and encoder are
// combinational behind the last pipeline registers.
//
// The first MBV stage of both address pipelines receives the rule-enable
// vector as its BV input; it is cleared at reset, so no rule matches until
// rules are loaded and enabled.
//
// Configuration (one write per clock, cfg_we high):
//   CFG_RULE_EN  rule-enable vector <= cfg_bv
//   CFG_SA/DA    row cfg_index (a K-bit sub-field value) of the BV memory of
//                stage cfg_stage <= cfg_bv
//   CFG_SP/DP    bounds of rule cfg_index <= cfg_lb, cfg_ub
// Rule tables are built off-line from the rule set (see the testbenches).
module mbv_pc_core
  import pc_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned W = W_DEFAULT,
  parameter int unsigned K = K_DEFAULT,
  localparam int unsigned STAGES = W / K,
  localparam int unsigned STG_W  = (STAGES > 1) ? $clog2(STAGES) : 1,
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // header input
  input  logic             hdr_valid,
  input  logic [W-1:0]     sa,
  input  logic [W-1:0]     da,
  input  logic [W-1:0]     sp,
  input  logic [W-1:0]     dp,
  // classified output
  output logic             out_valid,
  output logic             out_match,
  output logic [IDX_W-1:0] out_rule,
  output logic [N-1:0]     out_bv,
  // configuration
  input  logic             cfg_we,
  input  cfg_tgt_e         cfg_tgt,
  input  logic [7:0]       cfg_stage,
  input  logic [15:0]      cfg_index,
  input  logic [N-1:0]     cfg_bv,
  input  logic [W-1:0]     cfg_lb,
  input  logic [W-1:0]     cfg_ub
);

  logic [N-1:0] rule_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               rule_en <= '0;
    else if (cfg_we && cfg_tgt == CFG_RULE_EN) rule_en <= cfg_bv;
  end

  logic         sa_valid, da_valid, sp_valid, dp_valid;
  logic [N-1:0] bv_sa, bv_da, bv_sp_l, bv_sp_h, bv_dp_l, bv_dp_h;

  mbv_field #(.N(N), .W(W), .K(K)) u_mbv_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hdr_valid),
    .hdr_in    (sa),
    .bv_in     (rule_en),
    .out_valid (sa_valid),
    .bv_out    (bv_sa),
    .mem_we    (cfg_we && cfg_tgt == CFG_SA),
    .mem_stage (cfg_stage[STG_W-1:0]),
    .mem_addr  (cfg_index[K-1:0]),
    .mem_wdata (cfg_bv)
  );

  mbv_field #(.N(N), .W(W), .K(K)) u_mbv_da (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hdr_valid),
    .hdr_in    (da),
    .bv_in     (rule_en),
    .out_valid (da_valid),
    .bv_out    (bv_da),
    .mem_we    (cfg_we && cfg_tgt == CFG_DA),
    .mem_stage (cfg_stage[STG_W-1:0]),
    .mem_addr  (cfg_index[K-1:0]),
    .mem_wdata (cfg_bv)
  );

  rs_field #(.N(N), .W(W), .K(K)) u_rs_sp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hdr_valid),
    .hdr_in    (sp),
    .bv_in     (bv_sa),
    .out_valid (sp_valid),
    .bv_lout   (bv_sp_l),
    .bv_hout   (bv_sp_h),
    .cfg_we    (cfg_we && cfg_tgt == CFG_SP),
    .cfg_rule  (cfg_index[IDX_W-1:0]),
    .cfg_lb    (cfg_lb),
    .cfg_ub    (cfg_ub)
  );

  rs_field #(.N(N), .W(W), .K(K)) u_rs_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hdr_valid),
    .hdr_in    (dp),
    .bv_in     (bv_da),
    .out_valid (dp_valid),
    .bv_lout   (bv_dp_l),
    .bv_hout   (bv_dp_h),
    .cfg_we    (cfg_we && cfg_tgt == CFG_DP),
    .cfg_rule  (cfg_index[IDX_W-1:0]),
    .cfg_lb    (cfg_lb),
    .cfg_ub    (cfg_ub)
  );

  net_aggregator #(.N(N)) u_agg (
    .bv_sa   (bv_sa),
    .bv_da   (bv_da),
    .bv_sp_l (bv_sp_l),
    .bv_sp_h (bv_sp_h),
    .bv_dp_l (bv_dp_l),
    .bv_dp_h (bv_dp_h),
    .bv_out  (out_bv)
  );

  prio_encoder #(.N(N)) u_pe (
    .bv    (out_bv),
    .match (out_match),
    .idx   (out_rule)
  );

  assign out_valid = sa_valid;

  // All four field pipelines have the same depth and advance together.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    sa_valid == da_valid && sa_valid == sp_valid && sa_valid == dp_valid);

endmodule
