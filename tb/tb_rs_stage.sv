// tb_rs_stage: self-checking test of one range-search stage.
//
// Uses stage 2 (header bits [7:4]).  Random bounds are chosen so that the
// sub-field of the header is often equal to, just above or just below the
// bound's sub-field; the running gt/eq/lt state inputs are random.  The
// registered outputs are compared one clock later with the comparison
// rules written out bit by bit here.
module tb_rs_stage;
  localparam int N = 32, W = 16, K = 4, STAGE = 2, MSB = W - 1 - STAGE * K;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                in_valid = 1'b0, out_valid;
  logic [W-1:0]        hdr_in = '0, hdr_out;
  logic [N-1:0]        lb_gt_in = '0, lb_eq_in = '0, ub_lt_in = '0, ub_eq_in = '0;
  logic [N-1:0][W-1:0] lb = '0, ub = '0;
  logic [N-1:0]        lb_gt_out, lb_eq_out, ub_lt_out, ub_eq_out;

  int checks = 0, failures = 0;

  rs_stage #(.N(N), .W(W), .K(K), .STAGE(STAGE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] e_gt, e_eq, e_lt, e_ueq;
    int gt_seen = 0, eq_seen = 0, lt_seen = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      hdr_in   = W'($urandom);
      lb_gt_in = N'($urandom); lb_eq_in = N'($urandom);
      ub_lt_in = N'($urandom); ub_eq_in = N'($urandom);
      for (int i = 0; i < N; i++) begin
        int d;
        lb[i] = W'($urandom); ub[i] = W'($urandom);
        d = $urandom_range(2, 0);
        lb[i][MSB -: K] = K'(int'(hdr_in[MSB -: K]) + d - 1);
        d = $urandom_range(2, 0);
        ub[i][MSB -: K] = K'(int'(hdr_in[MSB -: K]) + d - 1);
      end
      for (int i = 0; i < N; i++) begin
        int h, l, u;
        h = int'(hdr_in[MSB -: K]); l = int'(lb[i][MSB -: K]); u = int'(ub[i][MSB -: K]);
        e_gt[i]  = lb_gt_in[i] || (lb_eq_in[i] && h > l);
        e_eq[i]  = lb_eq_in[i] && h == l;
        e_lt[i]  = ub_lt_in[i] || (ub_eq_in[i] && h < u);
        e_ueq[i] = ub_eq_in[i] && h == u;
        if (lb_eq_in[i] && !lb_gt_in[i] && h > l) gt_seen++;
        if (lb_eq_in[i] && h == l) eq_seen++;
        if (ub_eq_in[i] && !ub_lt_in[i] && h < u) lt_seen++;
      end
      @(negedge clk);
      checks++;
      if (!out_valid || hdr_out !== hdr_in || lb_gt_out !== e_gt || lb_eq_out !== e_eq ||
          ub_lt_out !== e_lt || ub_eq_out !== e_ueq) begin
        failures++;
        $display("FAIL t=%0d gt %h/%h eq %h/%h lt %h/%h ueq %h/%h", t,
                 lb_gt_out, e_gt, lb_eq_out, e_eq, ub_lt_out, e_lt, ub_eq_out, e_ueq);
      end
    end
    checks++;
    if (gt_seen == 0 || eq_seen == 0 || lt_seen == 0) begin
      failures++;
      $display("FAIL comparison cases not all exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
