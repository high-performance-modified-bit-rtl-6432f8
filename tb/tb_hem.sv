// tb_hem: self-checking test of the header extractor.
//
// Builds Ethernet/IPv4/TCP packets byte by byte: random addresses and
// ports, IHL from 5 to 8 (so the TCP header moves), random payload length.
// Also sends UDP packets, non-IPv4 EtherTypes and packets that end before
// the destination port (all must give hdr_drop), and packets aborted half
// way (must give nothing).  Every hdr_valid must carry exactly the SA, DA,
// SP and DP written into the packet.  Each case must occur at least once.
module tb_hem;
  import pc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0, in_abort = 1'b0;
  logic [7:0] in_data = '0;
  logic       hdr_valid, hdr_drop;
  hdr_t       hdr;

  int checks = 0, failures = 0;
  int n_ok = 0, n_udp = 0, n_eth = 0, n_short = 0, n_abort = 0, n_opt = 0;
  // expected result: {is_valid, header}
  logic [$bits(hdr_t):0] expq [$];

  hem #(.L2_BYTES(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && (hdr_valid || hdr_drop)) begin
    logic [$bits(hdr_t):0] e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected result valid=%b drop=%b", hdr_valid, hdr_drop);
    end else begin
      e = expq.pop_front();
      if (hdr_valid !== e[$bits(hdr_t)] || hdr_drop !== !e[$bits(hdr_t)] ||
          (hdr_valid && hdr !== e[$bits(hdr_t)-1:0])) begin
        failures++;
        $display("FAIL got valid=%b hdr=%h expected valid=%b hdr=%h",
                 hdr_valid, hdr, e[$bits(hdr_t)], e[$bits(hdr_t)-1:0]);
      end
    end
  end

  task automatic send_bytes(logic [7:0] pkt [], int abort_at);
    for (int b = 0; b < pkt.size(); b++) begin
      @(negedge clk);
      in_valid = 1'b1; in_sop = (b == 0); in_eop = (b == pkt.size() - 1);
      in_data = pkt[b]; in_abort = 1'b0;
      if (b == abort_at) begin
        in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0; in_abort = 1'b1;
        @(negedge clk);
        in_abort = 1'b0;
        return;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 120; p++) begin
      logic [7:0] pkt [];
      hdr_t h;
      int ihl, tcp, len, kind;
      logic [15:0] etype;
      logic [7:0]  proto;
      kind  = (p < 5) ? p : $urandom_range(5, 0);
      ihl   = $urandom_range(8, 5);
      tcp   = 14 + 4 * ihl;
      len   = tcp + 20 + $urandom_range(10, 0);
      h     = {32'($urandom), 32'($urandom), 16'($urandom), 16'($urandom)};
      etype = (kind == 2) ? 16'h86DD : 16'h0800;
      proto = (kind == 1) ? 8'd17 : 8'd6;
      if (kind == 3) len = tcp + $urandom_range(3, 0);   // ends before DP is complete
      pkt = new[len];
      foreach (pkt[i]) pkt[i] = 8'($urandom);
      pkt[12] = etype[15:8]; pkt[13] = etype[7:0];
      pkt[14] = {4'd4, 4'(ihl)};
      pkt[14 + 9] = proto;
      for (int b = 0; b < 4; b++) begin
        pkt[14 + 12 + b] = h.sa[31 - 8*b -: 8];
        pkt[14 + 16 + b] = h.da[31 - 8*b -: 8];
      end
      if (tcp + 0 < len) pkt[tcp + 0] = h.sp[15:8];
      if (tcp + 1 < len) pkt[tcp + 1] = h.sp[7:0];
      if (tcp + 2 < len) pkt[tcp + 2] = h.dp[15:8];
      if (tcp + 3 < len) pkt[tcp + 3] = h.dp[7:0];
      case (kind)
        1: begin expq.push_back({1'b0, h}); n_udp++;   send_bytes(pkt, -1); end
        2: begin expq.push_back({1'b0, h}); n_eth++;   send_bytes(pkt, -1); end
        3: begin expq.push_back({1'b0, h}); n_short++; send_bytes(pkt, -1); end
        4: begin n_abort++; send_bytes(pkt, $urandom_range(len - 1, 1)); end
        default: begin
          expq.push_back({1'b1, h}); n_ok++;
          if (ihl > 5) n_opt++;
          send_bytes(pkt, -1);
        end
      endcase
      if ($urandom_range(1, 0) == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    checks++;
    if (n_ok == 0 || n_udp == 0 || n_eth == 0 || n_short == 0 || n_abort == 0 || n_opt == 0) begin
      failures++;
      $display("FAIL case never ran");
    end
    $display("ok=%0d options=%0d udp=%0d eth=%0d short=%0d abort=%0d",
             n_ok, n_opt, n_udp, n_eth, n_short, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
