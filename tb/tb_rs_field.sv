// tb_rs_field: self-checking test of a four-stage range-search field.
//
// Loads N random [LB, UB] ranges (some single values, some the full range,
// some empty with LB > UB), then streams one header per clock.  Headers are
// drawn from the bounds themselves and their neighbours (LB-1, LB, UB,
// UB+1) as well as at random, so the boundary cases of >= and <= are hit.
// Four clocks after each header the outputs must equal
// bv_lout[i] = (h >= LB_i) & bv_in[i] and bv_hout[i] = (h <= UB_i) & bv_in[i],
// with bv_in applied in the output clock as the address vector would be.
module tb_rs_field;
  localparam int N = 32, W = 16, K = 4, LAT = W / K;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, out_valid;
  logic [W-1:0] hdr_in = '0;
  logic [N-1:0] bv_in = '1, bv_lout, bv_hout;
  logic         cfg_we = 1'b0;
  logic [4:0]   cfg_rule = '0;
  logic [W-1:0] cfg_lb = '0, cfg_ub = '0;

  int checks = 0, failures = 0, in_range = 0, below = 0, above = 0;
  logic [W-1:0] lbm [N], ubm [N];
  logic [W-1:0] hq [$];
  logic         vq [$];

  rs_field #(.N(N), .W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The header that entered LAT clocks ago is checked against the bv_in of
  // the current clock.
  always @(negedge clk) if (rst_n && !cfg_we) begin
    hq.push_back(hdr_in);
    vq.push_back(in_valid);
  end

  always @(posedge clk) if (hq.size() >= LAT) begin
    logic [W-1:0] h;
    logic         v;
    logic [N-1:0] el, eh;
    h = hq.pop_front();
    v = vq.pop_front();
    for (int i = 0; i < N; i++) begin
      el[i] = (h >= lbm[i]) && bv_in[i];
      eh[i] = (h <= ubm[i]) && bv_in[i];
      if (v && bv_in[i]) begin
        if (h < lbm[i]) below++;
        else if (h > ubm[i]) above++;
        else in_range++;
      end
    end
    checks++;
    if (out_valid !== v || (v && (bv_lout !== el || bv_hout !== eh))) begin
      failures++;
      $display("FAIL h=%h v=%b/%b L %h/%h H %h/%h", h, out_valid, v, bv_lout, el, bv_hout, eh);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      case (i % 4)
        0: begin lbm[i] = a; ubm[i] = a; end
        1: begin lbm[i] = 0; ubm[i] = '1; end
        2: begin lbm[i] = (a < b) ? a : b; ubm[i] = (a < b) ? b : a; end
        default: begin lbm[i] = a; ubm[i] = W'(a - 16'd1 - W'(b[7:0])); end  // often empty
      endcase
      @(negedge clk);
      cfg_we <= 1'b1; cfg_rule <= 5'(i); cfg_lb <= lbm[i]; cfg_ub <= ubm[i];
    end
    @(negedge clk);
    cfg_we <= 1'b0;
    for (int t = 0; t < 600; t++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(N - 1, 0);
      in_valid <= ($urandom_range(5, 0) != 0);
      case ($urandom_range(5, 0))
        0: hdr_in <= lbm[r];
        1: hdr_in <= W'(lbm[r] - 1);
        2: hdr_in <= ubm[r];
        3: hdr_in <= W'(ubm[r] + 1);
        default: hdr_in <= W'($urandom);
      endcase
      bv_in <= (t % 3 == 0) ? N'($urandom) : '1;
    end
    @(negedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (in_range == 0 || below == 0 || above == 0) begin
      failures++;
      $display("FAIL cases in=%0d below=%0d above=%0d", in_range, below, above);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
