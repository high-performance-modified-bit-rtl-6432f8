// hem: header extractor.
//
// Parses the byte stream of one packet (as forwarded by pgm) and extracts
// the four fields the classifier matches:
//   IP header  -> source address sa, destination address da
//   TCP header -> source port sp, destination port dp
// The packet is expected to begin with an L2_BYTES-byte Ethernet header
// (EtherType 0x0800 checked when L2_BYTES is 14), followed by an IPv4
// header whose IHL field gives the offset of the TCP header.  The module
// tracks the byte position, captures each header byte as it passes and,
// on the EOP byte, either presents the header (hdr_valid pulse) or, if the
// packet was too short or not IPv4/TCP, pulses hdr_drop instead.  An
// in_abort pulse throws away the packet being collected.
// Extracting the IP and TCP fields and ignoring the Ethernet fields follows
// the published description; the byte-stream parsing, the checks and the
// choice to release the header at EOP (so that a packet discarded for an
// error is never classified) are this design's own.
//
// Timing: hdr_valid/hdr/hdr_drop are registered, one clock after the EOP
// byte.  One byte per clock, no back-pressure.
module hem
  import pc_pkg::*;
#(
  parameter int unsigned L2_BYTES = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic       in_eop,
  input  logic [7:0] in_data,
  input  logic       in_abort,
  output logic       hdr_valid,
  output hdr_t       hdr,
  output logic       hdr_drop
);

  localparam int unsigned IP = L2_BYTES;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  PROTO_TCP      = 8'd6;

  logic        act_q;          // a packet is being collected
  logic [15:0] cnt_q;          // position of the next byte
  logic [15:0] eth_type_q, eth_type_n;
  logic [7:0]  ver_ihl_q, ver_ihl_n;
  logic [7:0]  proto_q, proto_n;
  hdr_t        fld_q, fld_n;

  logic        act;
  logic [15:0] idx;
  logic [15:0] tcp;            // position of the TCP header
  logic        ok;

  assign act = in_valid && (in_sop || (act_q && !in_abort));
  assign idx = in_sop ? 16'd0 : cnt_q;

  always_comb begin
    eth_type_n = in_sop ? 16'd0 : eth_type_q;
    ver_ihl_n  = in_sop ? 8'd0  : ver_ihl_q;
    proto_n    = in_sop ? 8'd0  : proto_q;
    fld_n      = in_sop ? '0    : fld_q;
    tcp        = 16'(IP) + 16'({ver_ihl_q[3:0], 2'b00});
    if (act) begin
      if (L2_BYTES == 14 && idx == 16'd12) eth_type_n[15:8] = in_data;
      if (L2_BYTES == 14 && idx == 16'd13) eth_type_n[7:0]  = in_data;
      if (idx == 16'(IP))      ver_ihl_n = in_data;
      if (idx == 16'(IP + 9))  proto_n   = in_data;
      for (int b = 0; b < 4; b++) begin
        if (idx == 16'(IP + 12 + b)) fld_n.sa[31-8*b -: 8] = in_data;
        if (idx == 16'(IP + 16 + b)) fld_n.da[31-8*b -: 8] = in_data;
      end
      // The TCP offset is known once the IHL byte has been stored.
      if (idx > 16'(IP)) begin
        if (idx == tcp)         fld_n.sp[15:8] = in_data;
        if (idx == tcp + 16'd1) fld_n.sp[7:0]  = in_data;
        if (idx == tcp + 16'd2) fld_n.dp[15:8] = in_data;
        if (idx == tcp + 16'd3) fld_n.dp[7:0]  = in_data;
      end
    end
    ok = (idx > 16'(IP)) && (idx >= tcp + 16'd3) &&
         (ver_ihl_q[7:4] == 4'd4) && (ver_ihl_q[3:0] >= 4'd5) &&
         (proto_n == PROTO_TCP) &&
         (L2_BYTES != 14 || eth_type_n == ETHERTYPE_IPV4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q      <= 1'b0;
      cnt_q      <= '0;
      eth_type_q <= '0;
      ver_ihl_q  <= '0;
      proto_q    <= '0;
      fld_q      <= '0;
      hdr_valid  <= 1'b0;
      hdr_drop   <= 1'b0;
      hdr        <= '0;
    end else begin
      hdr_valid <= 1'b0;
      hdr_drop  <= 1'b0;
      if (in_abort && !(in_valid && in_sop)) act_q <= 1'b0;
      if (act) begin
        eth_type_q <= eth_type_n;
        ver_ihl_q  <= ver_ihl_n;
        proto_q    <= proto_n;
        fld_q      <= fld_n;
        cnt_q      <= (idx == 16'hFFFF) ? idx : idx + 16'd1;
        act_q      <= !in_eop;
        if (in_eop) begin
          hdr_valid <= ok;
          hdr_drop  <= !ok;
          hdr       <= fld_n;
        end
      end
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    !(hdr_valid && hdr_drop));

endmodule
