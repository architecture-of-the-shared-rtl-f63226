// scanner: the round-robin half of the shared-bus arbiter.
//
// A one-hot ring counter of N bits produces the scanning signals S1..SN (scan), one
// active at a time. While no processor holds the shared bus the counter advances one
// position per CPU clock, offering the bus to each processor in turn. An enable gate
// stops the counter whenever any GRANT line (grant_n, active low) is active, so the
// scanning signal stays on the processor that owns the bus; when that grant ends the
// counter resumes on the next clock and the next processor is scanned.
//
// This follows the reference scheme (ring counter for round robin, stopped by any
// grant). The reference gates the counter's clock; here the counter keeps the CPU
// clock and the gate becomes a clock enable. Because the grant flip-flops are
// registered on the same clock, the enable also looks at grant_next, the grants
// being taken in the current clock, so the counter does not step away from a
// processor in the clock in which it is granted. Reset puts the counter on S1.
// Another priority rule can be had by replacing the ring counter with another
// pattern generator that keeps scan one-hot.
module scanner #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] grant_n,     // G1..GN, active low
  input  logic [N-1:0] grant_next,  // grants being taken this clock
  output logic [N-1:0] scan         // S1..SN, one-hot
);

  logic enable;  // the ENABLE gate: no grant held and none being taken

  assign enable = (&grant_n) && !(|grant_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      scan <= N'(1);
    else if (enable) scan <= {scan[N-2:0], scan[N-1]};
  end

  a_scan_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(scan));

endmodule
