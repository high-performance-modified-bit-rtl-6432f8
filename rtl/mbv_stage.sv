// mbv_stage: one stage of the modified bit-vector (MBV) address match.
//
// Sub-field STAGE of the W-bit header (stage 0 takes the most significant K
// bits) addresses a 2^K-entry memory of N-bit vectors.  Row v of the memory
// has bit i set when rule i accepts the value v in this sub-field.  The row
// read is ANDed with the bit vector arriving from the previous stage, and
// the result is registered together with the header, so the stage adds one
// clock of latency and accepts a new header every clock.  This structure
// (memory, AND, registered BV and header outputs) is the published one;
// the MSB-first order of the sub-fields is this design's choice.
//
// The memory is written one row at a time through mem_we/mem_addr/mem_wdata
// and is not reset: it must be loaded before use.  A write is visible to a
// header read in the following clock.
module mbv_stage #(
  parameter int unsigned N     = 32,
  parameter int unsigned W     = 16,
  parameter int unsigned K     = 4,
  parameter int unsigned STAGE = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  // pipeline input
  input  logic         in_valid,
  input  logic [W-1:0] hdr_in,
  input  logic [N-1:0] bv_in,
  // pipeline output, one clock later
  output logic         out_valid,
  output logic [W-1:0] hdr_out,
  output logic [N-1:0] bv_out,
  // BV memory write port
  input  logic         mem_we,
  input  logic [K-1:0] mem_addr,
  input  logic [N-1:0] mem_wdata
);

  localparam int unsigned MSB = W - 1 - STAGE * K;

  logic [N-1:0] bv_mem [2**K];
  logic [K-1:0] sub_field;
  logic [N-1:0] bv_match;

  assign sub_field = hdr_in[MSB -: K];
  assign bv_match  = bv_mem[sub_field] & bv_in;

  always_ff @(posedge clk) begin
    if (mem_we) bv_mem[mem_addr] <= mem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hdr_out   <= '0;
      bv_out    <= '0;
    end else begin
      out_valid <= in_valid;
      hdr_out   <= hdr_in;
      bv_out    <= bv_match;
    end
  end

endmodule
