// tb_mbv_field: self-checking test of a four-stage MBV field pipeline.
//
// Fills the four stage memories with random rows (every row has about half
// its bits set, and some rows are all ones so that full matches happen),
// then presents a random header and bit vector on every clock.  Each
// result must appear exactly W/K = 4 clocks after its header and equal
// bv_in & row0[h[15:12]] & row1[h[11:8]] & row2[h[7:4]] & row3[h[3:0]].
module tb_mbv_field;
  localparam int N = 32, W = 16, K = 4, S = W / K, LAT = S;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, out_valid;
  logic [W-1:0] hdr_in = '0;
  logic [N-1:0] bv_in = '0, bv_out;
  logic         mem_we = 1'b0;
  logic [1:0]   mem_stage = '0;
  logic [K-1:0] mem_addr = '0;
  logic [N-1:0] mem_wdata = '0;

  int checks = 0, failures = 0, nonzero = 0;
  logic [N-1:0] model [S][2**K];
  logic [N-1:0] exp_bv [$];
  logic         exp_v  [$];

  mbv_field #(.N(N), .W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: compute the expected output when a header enters and
  // compare it LAT clocks later.
  always @(posedge clk) if (rst_n && !mem_we) begin
    logic [N-1:0] e;
    e = bv_in;
    for (int s = 0; s < S; s++) e &= model[s][hdr_in[W-1-s*K -: K]];
    exp_bv.push_back(e);
    exp_v.push_back(in_valid);
    if (exp_bv.size() > LAT) begin
      logic [N-1:0] eb;
      logic         ev;
      eb = exp_bv.pop_front();
      ev = exp_v.pop_front();
      checks++;
      if (out_valid !== ev || (ev && bv_out !== eb)) begin
        failures++;
        $display("FAIL got v=%b bv=%h exp v=%b bv=%h", out_valid, bv_out, ev, eb);
      end
      if (ev && eb != 0) nonzero++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    mem_we <= 1'b1;
    for (int s = 0; s < S; s++)
      for (int v = 0; v < 2**K; v++) begin
        model[s][v] = ($urandom_range(3, 0) == 0) ? '1 : N'($urandom) | N'($urandom);
        @(negedge clk);
        mem_stage <= 2'(s); mem_addr <= K'(v); mem_wdata <= model[s][v];
      end
    @(negedge clk);
    mem_we <= 1'b0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid <= ($urandom_range(4, 0) != 0);
      hdr_in   <= W'($urandom);
      bv_in    <= (t % 2 == 0) ? '1 : N'($urandom);
    end
    @(negedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (nonzero < 10) begin
      failures++;
      $display("FAIL only %0d non-zero results", nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
