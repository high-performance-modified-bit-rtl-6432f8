// tb_pgm: self-checking test of the packet generation module.
//
// Sends a random mix of packets: good ones, ones with an error flag on a
// middle byte, ones with an error on the SOP byte, ones cut short by the
// next SOP, and stray bytes between packets, with idle gaps.  For each the
// expected output events (forwarded bytes with SOP/EOP, abort pulses) are
// queued as they are sent and compared in order with what the module
// emits; the packet counters are checked at the end.  Each scenario must
// have occurred at least once.
module tb_pgm;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0, in_err = 1'b0;
  logic [7:0]  in_data = '0;
  logic        out_valid, out_sop, out_eop, out_abort;
  logic [7:0]  out_data;
  logic [31:0] pkt_ok, pkt_drop;

  int checks = 0, failures = 0;
  int n_good = 0, n_err_mid = 0, n_err_sop = 0, n_trunc = 0, n_stray = 0;
  // event: {abort, sop, eop, data}
  logic [10:0] expq [$];

  pgm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: an abort is ordered before a byte emitted in the same clock
  always @(posedge clk) if (rst_n) begin
    if (out_abort) check_event({1'b1, 10'b0});
    if (out_valid) check_event({1'b0, out_sop, out_eop, out_data});
  end

  function automatic void check_event(logic [10:0] got);
    logic [10:0] e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected event %h", got);
      return;
    end
    e = expq.pop_front();
    if (got !== e) begin
      failures++;
      $display("FAIL got event %h expected %h", got, e);
    end
  endfunction

  task automatic send(logic sop, logic eop, logic err, logic [7:0] d);
    @(negedge clk);
    in_valid = 1'b1; in_sop = sop; in_eop = eop; in_err = err; in_data = d;
    @(negedge clk);
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0; in_err = 1'b0;
    if ($urandom_range(3, 0) == 0) @(negedge clk);
  endtask

  // open == 1 when the previous scenario left a packet open (no EOP)
  bit open = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 150; p++) begin
      int len, kind, j;
      logic [7:0] d;
      len  = $urandom_range(12, 1);
      kind = (p < 5) ? p : $urandom_range(4, 0);
      if (open && kind != 3) begin
        // the previously truncated packet is ended by this SOP
        expq.push_back({1'b1, 10'b0});
        open = 0;
      end
      case (kind)
        0: begin  // good packet
          for (int b = 0; b < len; b++) begin
            d = 8'($urandom);
            expq.push_back({1'b0, b == 0, b == len - 1, d});
            send(b == 0, b == len - 1, 1'b0, d);
          end
          n_good++;
        end
        1: begin  // error on a later byte
          if (len < 2) len = 2;
          j = $urandom_range(len - 1, 1);
          for (int b = 0; b < len; b++) begin
            d = 8'($urandom);
            if (b < j) expq.push_back({1'b0, b == 0, 1'b0, d});
            if (b == j) expq.push_back({1'b1, 10'b0});
            send(b == 0, b == len - 1, b == j, d);
          end
          n_err_mid++;
        end
        2: begin  // error on the SOP byte
          for (int b = 0; b < len; b++) send(b == 0, b == len - 1, b == 0, 8'($urandom));
          n_err_sop++;
        end
        3: begin  // stray bytes outside any packet
          if (!open) begin
            for (int b = 0; b < 3; b++) send(1'b0, b == 2, 1'b0, 8'($urandom));
            n_stray++;
          end
        end
        default: begin  // packet without EOP, cut short by the next SOP
          for (int b = 0; b < len; b++) begin
            d = 8'($urandom);
            expq.push_back({1'b0, b == 0, 1'b0, d});
            send(b == 0, 1'b0, 1'b0, d);
          end
          open = 1;
          n_trunc++;
        end
      endcase
    end
    if (open) begin
      expq.push_back({1'b1, 10'b0});
      expq.push_back({1'b0, 1'b1, 1'b1, 8'h5A});
      send(1'b1, 1'b1, 1'b0, 8'h5A);
      n_good++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d expected events never came out", expq.size());
    end
    checks++;
    if (pkt_ok != 32'(n_good) || pkt_drop != 32'(n_err_mid + n_err_sop + n_trunc)) begin
      failures++;
      $display("FAIL counters ok=%0d drop=%0d exp %0d %0d", pkt_ok, pkt_drop,
               n_good, n_err_mid + n_err_sop + n_trunc);
    end
    checks++;
    if (n_good == 0 || n_err_mid == 0 || n_err_sop == 0 || n_trunc == 0 || n_stray == 0) begin
      failures++;
      $display("FAIL scenario never ran");
    end
    $display("good=%0d err_mid=%0d err_sop=%0d trunc=%0d stray=%0d",
             n_good, n_err_mid, n_err_sop, n_trunc, n_stray);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
