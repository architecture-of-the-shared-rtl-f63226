// arbiter: the round-robin shared-bus arbiter for N processors.
//
// One scanner and N controllers. Processor i raises REQUEST (req[i]) and is put
// into wait states at once (wait_n[i] low). The scanner walks a one-hot scanning
// signal over the processors, one per clock; when it reaches a processor whose
// request is pending, that processor's controller sets its GRANT (grant_n[i] low),
// the scanner stops, and one clock later WAIT is lifted so the processor performs
// its shared-memory access through its bus interface. The processor's next opcode
// fetch (m1_n[i] low) ends the grant and the scanner moves on to the next processor.
// A processor therefore waits at most for the other N-1 processors' accesses plus
// one scan of the ring.
//
// The split into one shared scanner and one controller per processor, the ring
// counter and the signal names follow the reference scheme; the single-clock
// rewrite is described in the two sub-modules.
module arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,      // R_i
  input  logic [N-1:0] m1_n,     // M_i, active low
  output logic [N-1:0] wait_n,   // W_i, active low
  output logic [N-1:0] grant_n,  // G_i, active low
  output logic [N-1:0] scan      // S_i
);

  logic [N-1:0] grant_next;

  scanner #(.N(N)) u_scanner (
    .clk, .rst_n, .grant_n, .grant_next, .scan
  );

  for (genvar i = 0; i < N; i++) begin : g_ctrl
    arb_controller u_ctrl (
      .clk, .rst_n,
      .req       (req[i]),
      .m1_n      (m1_n[i]),
      .scan      (scan[i]),
      .wait_n    (wait_n[i]),
      .grant_n   (grant_n[i]),
      .grant_next(grant_next[i])
    );
  end

  // Only one processor may own the shared bus at any time.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(~grant_n));

endmodule
