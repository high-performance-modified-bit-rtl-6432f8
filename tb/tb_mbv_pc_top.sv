// tb_mbv_pc_top: end-to-end test of the complete classifier.
//
// Runs the top with its default parameters (32 rules, 16-bit fields, 4-bit
// sub-fields).  A random rule set is compiled into the BV memories and range
// registers, a few rules are disabled, and then Ethernet/IPv4/TCP packets
// are sent as a byte stream.  Most packets carry a header picked from
// inside a rule; the rest are random, so both hits and misses occur.  Mixed
// in are packets with an error byte (discarded by pgm), packets cut short
// by the next SOP, stray bytes, and UDP packets (dropped by hem); about
// half the packets follow the previous one with no idle clock.
// For every classifiable packet the expected rule is computed from the
// rule list and compared with cls_valid/cls_match/cls_rule/cls_bv, which
// must arrive exactly 6 clocks after the EOP byte (1 in pgm, 1 in hem, 4 in
// the classification pipeline).  Each mechanism must occur at least once.
module tb_mbv_pc_top;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int N = 32, W = 16, K = 4, S = W / K, TOP_LAT = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0, in_err = 1'b0;
  logic [7:0]   in_data = '0;
  logic         cls_valid, cls_match, hdr_drop;
  logic [4:0]   cls_rule;
  logic [N-1:0] cls_bv;
  logic [31:0]  pkt_ok, pkt_drop;
  logic         cfg_we = 1'b0;
  cfg_tgt_e     cfg_tgt = CFG_RULE_EN;
  logic [7:0]   cfg_stage = '0;
  logic [15:0]  cfg_index = '0;
  logic [N-1:0] cfg_bv = '0;
  logic [W-1:0] cfg_lb = '0, cfg_ub = '0;

  int checks = 0, failures = 0;
  int n_match = 0, n_miss = 0, n_multi = 0, n_disabled = 0;
  int n_err = 0, n_trunc = 0, n_stray = 0, n_udp = 0, n_hdr_drop = 0, n_b2b = 0;
  int cyc = 0;
  rule_t        rules [N];
  logic [N-1:0] enable;
  logic [N-1:0] expq [$];
  int           eopq [$];

  mbv_pc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && hdr_drop) n_hdr_drop++;
    if (rst_n && cls_valid) begin
      logic [N-1:0] e;
      int idx, t;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected classification");
      end else begin
        e = expq.pop_front();
        t = eopq.pop_front();
        idx = 0;
        for (int i = N - 1; i >= 0; i--) if (e[i]) idx = i;
        if (cls_bv !== e || cls_match !== (e != 0) || (e != 0 && cls_rule !== 5'(idx)) ||
            cyc - t != TOP_LAT) begin
          failures++;
          $display("FAIL bv=%h/%h match=%b rule=%0d/%0d latency=%0d", cls_bv, e, cls_match,
                   cls_rule, idx, cyc - t);
        end
      end
    end
    cyc++;
  end

  task automatic cfg(cfg_tgt_e t, int stage, int index, logic [N-1:0] bv,
                     logic [W-1:0] lb, logic [W-1:0] ub);
    @(negedge clk);
    cfg_we = 1'b1; cfg_tgt = t; cfg_stage = 8'(stage); cfg_index = 16'(index);
    cfg_bv = bv; cfg_lb = lb; cfg_ub = ub;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Sends a packet; err_at >= 0 flags that byte, no_eop leaves it open.
  // Called at a falling edge; returns at a falling edge.  About half the
  // packets are followed directly by the next one, with no idle clock.
  task automatic send(logic [7:0] pkt [], int err_at, bit no_eop);
    for (int b = 0; b < pkt.size(); b++) begin
      in_valid = 1'b1; in_sop = (b == 0); in_err = (b == err_at);
      in_eop = (b == pkt.size() - 1) && !no_eop; in_data = pkt[b];
      if (in_eop && err_at < 0) eopq.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0; in_err = 1'b0;
    if ($urandom_range(1, 0) == 0) @(negedge clk);
    else n_b2b++;
  endtask

  function automatic void build(ref logic [7:0] pkt [], input hdr_t h, input logic [7:0] proto);
    int ihl, tcp;
    ihl = $urandom_range(6, 5);
    tcp = 14 + 4 * ihl;
    pkt = new[tcp + 20 + $urandom_range(8, 0)];
    foreach (pkt[i]) pkt[i] = 8'($urandom);
    pkt[12] = 8'h08; pkt[13] = 8'h00;
    pkt[14] = {4'd4, 4'(ihl)};
    pkt[23] = proto;
    for (int b = 0; b < 4; b++) begin
      pkt[26 + b] = h.sa[31 - 8*b -: 8];
      pkt[30 + b] = h.da[31 - 8*b -: 8];
    end
    pkt[tcp] = h.sp[15:8]; pkt[tcp + 1] = h.sp[7:0];
    pkt[tcp + 2] = h.dp[15:8]; pkt[tcp + 3] = h.dp[7:0];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (rules[i]) rules[i] = random_rule();
    // every fourth rule is followed by a wider copy of itself, so that
    // headers often match several rules and priority decides
    for (int i = 0; i + 1 < N; i += 4) begin
      rules[i + 1] = rules[i];
      rules[i + 1].sa_mask = rules[i].sa_mask & 16'hFF00;
      rules[i + 1].dp_lo   = 16'h0000;
      rules[i + 1].dp_hi   = 16'hFFFF;
    end
    enable = '1;
    for (int i = 0; i < N; i += 5) enable[i] = 1'b0;
    for (int s = 0; s < S; s++)
      for (int v = 0; v < 2**K; v++) begin
        logic [N-1:0] bsa, bda;
        for (int i = 0; i < N; i++) begin
          bsa[i] = subfield_ok(rules[i].sa_val, rules[i].sa_mask, s, K, v);
          bda[i] = subfield_ok(rules[i].da_val, rules[i].da_mask, s, K, v);
        end
        cfg(CFG_SA, s, v, bsa, '0, '0);
        cfg(CFG_DA, s, v, bda, '0, '0);
      end
    for (int i = 0; i < N; i++) begin
      cfg(CFG_SP, 0, i, '0, rules[i].sp_lo, rules[i].sp_hi);
      cfg(CFG_DP, 0, i, '0, rules[i].dp_lo, rules[i].dp_hi);
    end
    cfg(CFG_RULE_EN, 0, 0, enable, '0, '0);
    @(negedge clk);

    for (int p = 0; p < 400; p++) begin
      logic [7:0] pkt [];
      hdr_t h;
      int r, kind;
      r = $urandom_range(N - 1, 0);
      if ($urandom_range(4, 0) != 0)
        h = {pick_in(rules[r].sa_val, rules[r].sa_mask), 16'($urandom),
             pick_in(rules[r].da_val, rules[r].da_mask), 16'($urandom),
             pick_range(rules[r].sp_lo, rules[r].sp_hi),
             pick_range(rules[r].dp_lo, rules[r].dp_hi)};
      else
        h = {32'($urandom), 32'($urandom), 16'($urandom), 16'($urandom)};
      kind = (p < 4) ? p : $urandom_range(9, 0);
      case (kind)
        0: begin  // error byte: discarded, never classified
          build(pkt, h, 8'd6);
          send(pkt, $urandom_range(pkt.size() - 1, 0), 1'b0);
          n_err++;
        end
        1: begin  // cut short by the next packet's SOP
          build(pkt, h, 8'd6);
          send(pkt, -1, 1'b1);
          n_trunc++;
        end
        2: begin  // stray bytes between packets
          build(pkt, h, 8'd6);
          pkt = new[3](pkt);
          for (int b = 0; b < 3; b++) begin
            in_valid = 1'b1; in_data = pkt[b];
            @(negedge clk);
          end
          in_valid = 1'b0;
          @(negedge clk);
          n_stray++;
        end
        3: begin  // UDP: not classified
          build(pkt, h, 8'd17);
          send(pkt, -1, 1'b0);
          eopq.delete(eopq.size() - 1);
          n_udp++;
        end
        default: begin
          logic [N-1:0] e, all;
          for (int i = 0; i < N; i++) begin
            all[i] = rule_hit(rules[i], h.sa[31:16], h.da[31:16], h.sp, h.dp);
            e[i]   = all[i] && enable[i];
          end
          if (e == 0) n_miss++; else n_match++;
          if ($countones(e) > 1) n_multi++;
          for (int i = 0; i < N; i++) if (all[i]) begin
            if (!enable[i]) n_disabled++;
            break;
          end
          expq.push_back(e);
          build(pkt, h, 8'd6);
          send(pkt, -1, 1'b0);
        end
      endcase
    end
    repeat (TOP_LAT + 4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d classifications missing", expq.size());
    end
    checks++;
    if (n_udp + 0 != n_hdr_drop) begin
      failures++;
      $display("FAIL hem dropped %0d packets, expected %0d", n_hdr_drop, n_udp);
    end
    $display("match=%0d miss=%0d multi=%0d disabled_winner=%0d err=%0d trunc=%0d stray=%0d udp=%0d back_to_back=%0d",
             n_match, n_miss, n_multi, n_disabled, n_err, n_trunc, n_stray, n_udp, n_b2b);
    checks++;
    if (n_match == 0 || n_miss == 0 || n_multi == 0 || n_disabled == 0 || n_err == 0 ||
        n_trunc == 0 || n_stray == 0 || n_udp == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
