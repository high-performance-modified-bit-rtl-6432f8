// tb_prio_encoder: self-checking test of the priority encoder.
//
// Applies the all-zero vector, every one-hot vector, vectors with two bits
// set and random vectors; the expected index is found by scanning from bit
// 0 upwards (rule 0 has the highest priority).
module tb_prio_encoder;
  localparam int N = 32;

  logic [N-1:0] bv;
  logic         match;
  logic [4:0]   idx;
  int checks = 0, failures = 0;

  prio_encoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] v);
    int e;
    bv = v;
    #1;
    e = -1;
    for (int i = 0; i < N; i++) if (v[i]) begin e = i; break; end
    checks++;
    if (match !== (e >= 0) || (e >= 0 && idx !== 5'(e))) begin
      failures++;
      $display("FAIL bv=%h got match=%b idx=%0d exp %0d", v, match, idx, e);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < N; i++) check(N'(1) << i);
    for (int i = 0; i < N; i++) check((N'(1) << i) | (N'(1) << $urandom_range(N - 1, i)));
    check('1);
    for (int t = 0; t < 200; t++) check(N'($urandom) & N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
