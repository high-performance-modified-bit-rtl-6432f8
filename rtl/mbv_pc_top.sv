// mbv_pc_top: modified bit-vector packet classifier, complete.
//
// Packets arrive as a byte stream.  pgm frames them on SOP/EOP and discards
// packets flagged with an error; hem extracts the IPv4 source/destination
// addresses and TCP source/destination ports; mbv_pc_core matches the
// addresses with the four-stage MBV pipelines and the ports with the
// four-stage range search, ANDs the six bit vectors and reports the
// highest-priority matching rule.  This chain is the published one.
//
// Field widths: the rule width W (16 by default) applies to all four
// fields.  The ports are 16 bits wide and are used whole; of each 32-bit
// IPv4 address the most significant W bits are matched (the address prefix
// that a 16-bit rule can express).  Taking the upper half is this design's
// choice.
//
// Timing: a header leaves hem one clock after the EOP byte reaches it (two
// after it enters pgm) and the classification follows W/K = 4 clocks later,
// so cls_valid pulses 6 clocks after the EOP byte is presented at the
// input.  The byte interface takes one byte per clock, so a packet of L
// bytes occupies L clocks; the core itself could accept one header per clock.
//
// Configuration writes go straight to mbv_pc_core (see there for cfg_*).
module mbv_pc_top
  import pc_pkg::*;
#(
  parameter int unsigned N        = N_DEFAULT,
  parameter int unsigned W        = W_DEFAULT,
  parameter int unsigned K        = K_DEFAULT,
  parameter int unsigned L2_BYTES = 14,
  localparam int unsigned IDX_W   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // input packets
  input  logic             in_valid,
  input  logic             in_sop,
  input  logic             in_eop,
  input  logic             in_err,
  input  logic [7:0]       in_data,
  // classified output
  output logic             cls_valid,
  output logic             cls_match,
  output logic [IDX_W-1:0] cls_rule,
  output logic [N-1:0]     cls_bv,
  // status
  output logic             hdr_drop,
  output logic [31:0]      pkt_ok,
  output logic [31:0]      pkt_drop,
  // rule configuration
  input  logic             cfg_we,
  input  cfg_tgt_e         cfg_tgt,
  input  logic [7:0]       cfg_stage,
  input  logic [15:0]      cfg_index,
  input  logic [N-1:0]     cfg_bv,
  input  logic [W-1:0]     cfg_lb,
  input  logic [W-1:0]     cfg_ub
);

  if (W > PORT_W) begin : g_bad_w
    $error("mbv_pc_top: W may not exceed the 16-bit port width");
  end

  logic       p_valid, p_sop, p_eop, p_abort;
  logic [7:0] p_data;
  logic       h_valid;
  hdr_t       h;

  pgm u_pgm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_sop    (in_sop),
    .in_eop    (in_eop),
    .in_err    (in_err),
    .in_data   (in_data),
    .out_valid (p_valid),
    .out_sop   (p_sop),
    .out_eop   (p_eop),
    .out_data  (p_data),
    .out_abort (p_abort),
    .pkt_ok    (pkt_ok),
    .pkt_drop  (pkt_drop)
  );

  hem #(.L2_BYTES(L2_BYTES)) u_hem (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p_valid),
    .in_sop    (p_sop),
    .in_eop    (p_eop),
    .in_data   (p_data),
    .in_abort  (p_abort),
    .hdr_valid (h_valid),
    .hdr       (h),
    .hdr_drop  (hdr_drop)
  );

  mbv_pc_core #(.N(N), .W(W), .K(K)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .hdr_valid (h_valid),
    .sa        (h.sa[IP_ADDR_W-1 -: W]),
    .da        (h.da[IP_ADDR_W-1 -: W]),
    .sp        (h.sp[PORT_W-1 -: W]),
    .dp        (h.dp[PORT_W-1 -: W]),
    .out_valid (cls_valid),
    .out_match (cls_match),
    .out_rule  (cls_rule),
    .out_bv    (cls_bv),
    .cfg_we    (cfg_we),
    .cfg_tgt   (cfg_tgt),
    .cfg_stage (cfg_stage),
    .cfg_index (cfg_index),
    .cfg_bv    (cfg_bv),
    .cfg_lb    (cfg_lb),
    .cfg_ub    (cfg_ub)
  );

endmodule
