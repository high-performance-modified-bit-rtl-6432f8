// tb_mbv_pc_core: self-checking test of the classification engine.
//
// Builds a random rule set of N rules (prefix rules on both addresses,
// ranges on both ports), compiles it into the BV memories and range
// registers through the configuration port, disables a few rules, and then
// presents one header per clock.  Most headers are drawn from inside a
// random rule, so several rules often match at once.  For every header the
// aggregated vector and the chosen rule are computed from the rule list
// and must appear exactly 4 clocks later (the published latency).
// Counted mechanisms: match, no match, several matches resolved by
// priority, a disabled rule that would otherwise have won.
module tb_mbv_pc_core;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int N = 32, W = 16, K = 4, S = W / K, LAT = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         hdr_valid = 1'b0;
  logic [W-1:0] sa = '0, da = '0, sp = '0, dp = '0;
  logic         out_valid, out_match;
  logic [4:0]   out_rule;
  logic [N-1:0] out_bv;
  logic         cfg_we = 1'b0;
  cfg_tgt_e     cfg_tgt = CFG_RULE_EN;
  logic [7:0]   cfg_stage = '0;
  logic [15:0]  cfg_index = '0;
  logic [N-1:0] cfg_bv = '0;
  logic [W-1:0] cfg_lb = '0, cfg_ub = '0;

  int checks = 0, failures = 0;
  int n_match = 0, n_miss = 0, n_multi = 0, n_disabled = 0;
  rule_t        rules [N];
  logic [N-1:0] enable;
  logic [N-1:0] expq [$];
  logic         vq   [$];

  mbv_pc_core #(.N(N), .W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(cfg_tgt_e t, int stage, int index, logic [N-1:0] bv,
                     logic [W-1:0] lb, logic [W-1:0] ub);
    @(negedge clk);
    cfg_we = 1'b1; cfg_tgt = t; cfg_stage = 8'(stage); cfg_index = 16'(index);
    cfg_bv = bv; cfg_lb = lb; cfg_ub = ub;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // reference, sampled in the clock the header enters
  always @(posedge clk) if (rst_n && !cfg_we) begin
    logic [N-1:0] e, all;
    for (int i = 0; i < N; i++) begin
      all[i] = rule_hit(rules[i], sa, da, sp, dp);
      e[i]   = all[i] && enable[i];
    end
    if (hdr_valid) begin
      if (e == 0) n_miss++; else n_match++;
      if ($countones(e) > 1) n_multi++;
      for (int i = 0; i < N; i++) if (all[i]) begin
        if (!enable[i]) n_disabled++;
        break;
      end
    end
    expq.push_back(e);
    vq.push_back(hdr_valid);
    if (expq.size() > LAT) check_out();
  end

  // compare the output with the header that entered LAT clocks ago
  function automatic void check_out();
    logic [N-1:0] e;
    logic         v;
    int           idx;
    e = expq.pop_front();
    v = vq.pop_front();
    idx = 0;
    for (int i = N - 1; i >= 0; i--) if (e[i]) idx = i;
    checks++;
    if (out_valid !== v ||
        (v && (out_bv !== e || out_match !== (e != 0) || (e != 0 && out_rule !== 5'(idx))))) begin
      failures++;
      $display("FAIL v=%b/%b bv=%h/%h rule=%0d/%0d", out_valid, v, out_bv, e, out_rule, idx);
    end
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
    for (int i = 0; i < N; i += 7) enable[i] = 1'b0;
    // compile the rule set into bit vectors
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
    repeat (2) @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = $urandom_range(N - 1, 0);
      hdr_valid <= ($urandom_range(7, 0) != 0);
      if ($urandom_range(4, 0) != 0) begin
        sa <= pick_in(rules[r].sa_val, rules[r].sa_mask);
        da <= pick_in(rules[r].da_val, rules[r].da_mask);
        sp <= pick_range(rules[r].sp_lo, rules[r].sp_hi);
        dp <= pick_range(rules[r].dp_lo, rules[r].dp_hi);
      end else begin
        sa <= W'($urandom); da <= W'($urandom); sp <= W'($urandom); dp <= W'($urandom);
      end
      @(negedge clk);
    end
    hdr_valid <= 1'b0;
    repeat (LAT + 2) @(negedge clk);
    $display("match=%0d miss=%0d multi=%0d disabled_winner=%0d", n_match, n_miss, n_multi, n_disabled);
    checks++;
    if (n_match == 0 || n_miss == 0 || n_multi == 0 || n_disabled == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
