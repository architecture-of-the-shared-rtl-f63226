// arb_controller: the per-processor half of the round-robin shared-bus arbiter.
//
// Each processor owns one controller holding two flip-flops:
//   * Request flip-flop - set by a rising edge of the processor's REQUEST (req). Its
//     inverted output is the processor's WAIT line (wait_n), so the processor is held
//     in wait states from the moment it asks for the shared memory.
//   * Grant flip-flop - set when the scanner's scanning signal for this processor
//     (scan) is active while the Request flip-flop is set. Its inverted output is the
//     GRANT line (grant_n, active low). GRANT enables the processor's bus interface
//     and stops the scanner.
// One clock after GRANT becomes active the Request flip-flop is cleared, which lifts
// WAIT: that clock lets the address settle on the shared bus before the access. The
// processor then finishes its memory cycle; its next opcode fetch drives M1 (m1_n)
// low, which clears the Grant flip-flop and lets the scanner move on.
//
// The structure (two flip-flops, a one-clock delay, WAIT from the Request flip-flop,
// GRANT from the Grant flip-flop, M1 clearing the grant) follows the reference
// scheme. Its flip-flops were clocked by REQUEST and by the scanning signal and had
// asynchronous clears; here every flip-flop runs on the CPU clock, the REQUEST edge
// is detected on that clock and the clears are synchronous, with a clear winning over
// a set in the same clock. grant_next (the grant being taken in this clock) lets the
// scanner hold still in the same clock, as the gated-clock original does.
//
// Timing, cycle by cycle from the clock edge that samples req rising:
//   edge 0: req seen high (was low)      -> wait_n = 0
//   edge k: scan && request set && m1_n   -> grant_n = 0   (k >= 1)
//   edge k+1:                             -> wait_n = 1   (one-clock delay)
//   edge after m1_n sampled low           -> grant_n = 1
module arb_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic req,        // REQUEST R_i, active high
  input  logic m1_n,       // FETCH state indicator M1, active low
  input  logic scan,       // scanning signal S_i, active high
  output logic wait_n,     // WAIT to the processor, active low
  output logic grant_n,    // GRANT G_i, active low
  output logic grant_next  // grant is being taken in this clock
);

  logic req_prev;   // req on the previous clock, for edge detection
  logic req_q;      // Request flip-flop
  logic grant_q;    // Grant flip-flop
  logic delay_q;    // grant delayed by one clock
  logic req_clear;  // one-clock clear pulse for the Request flip-flop

  assign req_clear  = grant_q && !delay_q;
  assign grant_next = scan && req_q && m1_n && !grant_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_prev <= 1'b0;
      req_q    <= 1'b0;
      grant_q  <= 1'b0;
      delay_q  <= 1'b0;
    end else begin
      req_prev <= req;
      delay_q  <= grant_q;
      // Request flip-flop: DATA tied to 1, clocked by the REQUEST edge, cleared by
      // the delayed grant.
      if (req_clear)            req_q <= 1'b0;
      else if (req && !req_prev) req_q <= 1'b1;
      // Grant flip-flop: DATA from the Request flip-flop, clocked by the scanning
      // signal, cleared by M1.
      if (!m1_n)           grant_q <= 1'b0;
      else if (grant_next) grant_q <= 1'b1;
    end
  end

  assign wait_n  = !req_q;
  assign grant_n = !grant_q;

  // A grant is only ever given to a processor that is waiting for it.
  property p_grant_needs_request;
    @(posedge clk) disable iff (!rst_n) $rose(grant_q) |-> $past(req_q);
  endproperty
  a_grant_needs_request: assert property (p_grant_needs_request);

endmodule
