// mbv_field: the MBV match of one address field (source or destination).
//
// W/K mbv_stage instances are chained: the header and the partial bit
// vector move one stage per clock, and each stage ANDs in the rules that
// accept its K-bit sub-field.  After W/K clocks bv_out has bit i set exactly
// when rule i matches every sub-field of the header (and bit i of bv_in was
// set).  With the published W = 16, K = 4 this is the four-stage chain
// MBV_SA1..MBV_SA4 (or MBV_DA1..MBV_DA4).
//
// Interface: in_valid/hdr_in/bv_in enter the first stage; out_valid/bv_out
// leave the last one W/K clocks later.  mem_we writes row mem_addr of the
// memory of stage mem_stage.
module mbv_field #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16,
  parameter int unsigned K = 4,
  localparam int unsigned STAGES = W / K,
  localparam int unsigned STG_W  = (STAGES > 1) ? $clog2(STAGES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     hdr_in,
  input  logic [N-1:0]     bv_in,
  output logic             out_valid,
  output logic [N-1:0]     bv_out,
  input  logic             mem_we,
  input  logic [STG_W-1:0] mem_stage,
  input  logic [K-1:0]     mem_addr,
  input  logic [N-1:0]     mem_wdata
);

  if (W % K != 0) begin : g_bad_k
    $error("mbv_field: W must be a multiple of K");
  end

  logic         vld [STAGES+1];
  logic [W-1:0] hdr [STAGES+1];
  logic [N-1:0] bv  [STAGES+1];

  assign vld[0] = in_valid;
  assign hdr[0] = hdr_in;
  assign bv[0]  = bv_in;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    mbv_stage #(.N(N), .W(W), .K(K), .STAGE(s)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (vld[s]),
      .hdr_in    (hdr[s]),
      .bv_in     (bv[s]),
      .out_valid (vld[s+1]),
      .hdr_out   (hdr[s+1]),
      .bv_out    (bv[s+1]),
      .mem_we    (mem_we && (mem_stage == STG_W'(s))),
      .mem_addr  (mem_addr),
      .mem_wdata (mem_wdata)
    );
  end

  assign out_valid = vld[STAGES];
  assign bv_out    = bv[STAGES];

endmodule
