// tb_mbv_stage: self-checking test of one MBV stage.
//
// Loads the 16-row BV memory of a stage (STAGE = 1, so header bits [11:8]
// address it) with random rows, then streams random headers and bit
// vectors, one per clock.  Every output is compared one clock later with
// row[sub-field] & bv_in, computed from a copy of the memory kept here;
// the header and valid must come out unchanged after exactly one clock.
module tb_mbv_stage;
  localparam int N = 32, W = 16, K = 4, STAGE = 1;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, out_valid;
  logic [W-1:0] hdr_in = '0, hdr_out;
  logic [N-1:0] bv_in = '0, bv_out;
  logic         mem_we = 1'b0;
  logic [K-1:0] mem_addr = '0;
  logic [N-1:0] mem_wdata = '0;

  int checks = 0, failures = 0;
  logic [N-1:0] model [2**K];

  mbv_stage #(.N(N), .W(W), .K(K), .STAGE(STAGE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_hdr;
    logic [N-1:0] exp_bv;
    logic         exp_v;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < 2**K; v++) begin
      model[v] = $urandom;
      @(negedge clk);
      mem_we <= 1'b1; mem_addr <= K'(v); mem_wdata <= model[v];
    end
    @(negedge clk);
    mem_we <= 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      exp_v   = ($urandom_range(3, 0) != 0);
      in_valid = exp_v;
      hdr_in   = W'($urandom);
      bv_in    = (t % 7 == 0) ? '1 : N'($urandom);
      exp_hdr  = hdr_in;
      exp_bv   = model[hdr_in[W-1-STAGE*K -: K]] & bv_in;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v || hdr_out !== exp_hdr || bv_out !== exp_bv) begin
        failures++;
        $display("FAIL t=%0d hdr=%h bv=%h got v=%b hdr=%h bv=%h exp bv=%h",
                 t, exp_hdr, bv_in, out_valid, hdr_out, bv_out, exp_bv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
