// pgm: packet generation module, the front door of the classifier.
//
// Input is a byte stream: in_valid qualifies in_data (8 bits), in_sop marks
// the first byte of a packet, in_eop the last, and in_err flags a byte as
// corrupt.  The module forwards the bytes of a packet from its SOP byte to
// its EOP byte.  Bytes that arrive outside a packet (no SOP seen) are
// invalid and are dropped.  When a byte of an open packet is flagged in_err,
// or a new SOP arrives before the EOP of the open packet, the open packet is
// discarded at once: out_abort pulses so that downstream logic throws away
// what it has collected, and the remaining bytes up to EOP are dropped.
// That SOP-framed, validity-checked, error-discarding behaviour is the
// published function; the signal set and the abort pulse are this design's
// choice.
//
// Timing: every output is registered, one clock after the input byte.  No
// back-pressure: one byte per clock.  pkt_ok and pkt_drop are running
// counts of forwarded and discarded packets.
module pgm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic        in_err,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  output logic        out_sop,
  output logic        out_eop,
  output logic [7:0]  out_data,
  output logic        out_abort,
  output logic [31:0] pkt_ok,
  output logic [31:0] pkt_drop
);

  typedef enum logic [1:0] {
    S_IDLE,     // no packet open, waiting for SOP
    S_PKT,      // inside a good packet, forwarding
    S_DISCARD   // inside a bad packet, dropping until EOP
  } state_e;

  state_e state, state_nxt;
  logic   fwd, abort, done, drop_new;

  always_comb begin
    state_nxt = state;
    fwd       = 1'b0;   // forward this byte
    abort     = 1'b0;   // discard the packet that is open downstream
    done      = 1'b0;   // a good packet completes with this byte
    drop_new  = 1'b0;   // a packet is discarded before any byte went out
    if (in_valid) begin
      if (in_sop) begin
        if (state == S_PKT) abort = 1'b1;    // previous packet lost its EOP
        if (in_err) begin
          drop_new  = 1'b1;
          state_nxt = in_eop ? S_IDLE : S_DISCARD;
        end else begin
          fwd       = 1'b1;
          done      = in_eop;
          state_nxt = in_eop ? S_IDLE : S_PKT;
        end
      end else begin
        unique case (state)
          S_PKT: begin
            if (in_err) begin
              abort     = 1'b1;
              state_nxt = in_eop ? S_IDLE : S_DISCARD;
            end else begin
              fwd       = 1'b1;
              done      = in_eop;
              state_nxt = in_eop ? S_IDLE : S_PKT;
            end
          end
          S_DISCARD: if (in_eop) state_nxt = S_IDLE;
          default: ;  // S_IDLE: byte outside a packet, dropped
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
      out_abort <= 1'b0;
      pkt_ok    <= '0;
      pkt_drop  <= '0;
    end else begin
      state     <= state_nxt;
      out_valid <= fwd;
      out_sop   <= fwd && in_sop;
      out_eop   <= fwd && in_eop;
      out_data  <= in_data;
      out_abort <= abort;
      if (done) pkt_ok <= pkt_ok + 32'd1;
      pkt_drop  <= pkt_drop + 32'(abort) + 32'(drop_new);
    end
  end

  a_sop_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (out_sop || out_eop) |-> out_valid);

endmodule
