// tb_mbv_pc_workload: throughput and latency of the classification engine.
//
// Runs mbv_pc_core at its default size (32 rules, 16-bit fields, 4-bit
// sub-fields) with a header on every clock for 1000 clocks.  Checks that
// the first result appears exactly 4 clocks after the first header, that
// results then arrive on every clock with no gap (one classification per
// clock), and that each result names the rule a reference search over the
// rule list picks.  Prints the measured results per clock.
module tb_mbv_pc_workload;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int N = 32, W = 16, K = 4, S = W / K, LAT = 4, HEADERS = 1000;

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
  int cyc = 0, first_in = -1, first_out = -1, last_out = -1, n_out = 0, n_hit = 0;
  rule_t rules [N];
  int    expq [$];   // expected rule, -1 for no match

  mbv_pc_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && hdr_valid) begin
      int e;
      e = -1;
      for (int i = N - 1; i >= 0; i--) if (rule_hit(rules[i], sa, da, sp, dp)) e = i;
      expq.push_back(e);
      if (first_in < 0) first_in = cyc;
    end
    if (rst_n && out_valid) begin
      int e;
      if (first_out < 0) first_out = cyc;
      else if (cyc != last_out + 1) begin
        failures++;
        $display("FAIL gap in results at clock %0d", cyc);
      end
      last_out = cyc;
      n_out++;
      e = expq.pop_front();
      checks++;
      if (out_match !== (e >= 0) || (e >= 0 && out_rule !== 5'(e))) begin
        failures++;
        $display("FAIL result %0d: match=%b rule=%0d expected %0d", n_out, out_match, out_rule, e);
      end
      if (e >= 0) n_hit++;
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (rules[i]) rules[i] = random_rule();
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
    cfg(CFG_RULE_EN, 0, 0, '1, '0, '0);
    @(negedge clk);
    for (int t = 0; t < HEADERS; t++) begin
      int r;
      r = $urandom_range(N - 1, 0);
      hdr_valid = 1'b1;
      sa = pick_in(rules[r].sa_val, rules[r].sa_mask);
      da = pick_in(rules[r].da_val, rules[r].da_mask);
      sp = pick_range(rules[r].sp_lo, rules[r].sp_hi);
      dp = pick_range(rules[r].dp_lo, rules[r].dp_hi);
      @(negedge clk);
    end
    hdr_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    // first_in counts the edge that took the first header in; its result is
    // registered LAT - 1 edges later and sampled high on the following edge.
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("FAIL latency %0d clocks", first_out - first_in);
    end
    checks++;
    if (n_out != HEADERS) begin
      failures++;
      $display("FAIL %0d results for %0d headers", n_out, HEADERS);
    end
    $display("latency=%0d clocks, %0d results in %0d clocks (%0d.%03d per clock), %0d matched",
             first_out - first_in, n_out, last_out - first_out + 1,
             n_out / (last_out - first_out + 1),
             (1000 * n_out / (last_out - first_out + 1)) % 1000, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
