// tb_net_aggregator: self-checking test of the six-input bit-vector AND.
//
// Drives random vectors (biased towards ones so that outputs are not all
// zero) and checks every output bit against a bit-by-bit AND; also checks
// that a zero in any single input clears the matching output bit.
module tb_net_aggregator;
  localparam int N = 32;

  logic [N-1:0] bv_sa, bv_da, bv_sp_l, bv_sp_h, bv_dp_l, bv_dp_h, bv_out;
  int checks = 0, failures = 0;

  net_aggregator #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] dense();
    return N'($urandom) | N'($urandom) | N'($urandom);
  endfunction

  initial begin
    logic [N-1:0] e;
    for (int t = 0; t < 300; t++) begin
      bv_sa = dense(); bv_da = dense(); bv_sp_l = dense();
      bv_sp_h = dense(); bv_dp_l = dense(); bv_dp_h = dense();
      if (t < 6) begin
        // all ones except one input that clears bit t
        {bv_sa, bv_da, bv_sp_l, bv_sp_h, bv_dp_l, bv_dp_h} = '1;
        case (t)
          0: bv_sa[t] = 1'b0;   1: bv_da[t] = 1'b0;   2: bv_sp_l[t] = 1'b0;
          3: bv_sp_h[t] = 1'b0; 4: bv_dp_l[t] = 1'b0; default: bv_dp_h[t] = 1'b0;
        endcase
      end
      #1;
      for (int i = 0; i < N; i++)
        e[i] = bv_sa[i] && bv_da[i] && bv_sp_l[i] && bv_sp_h[i] && bv_dp_l[i] && bv_dp_h[i];
      checks++;
      if (bv_out !== e) begin
        failures++;
        $display("FAIL t=%0d got %h exp %h", t, bv_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
