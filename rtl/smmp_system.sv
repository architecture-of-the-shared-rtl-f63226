// smmp_system: a shared-memory multiple-microprocessor system.
//
// N processors, each with its own local bus, share one RAM over a common bus. The
// round-robin arbiter lets exactly one processor at a time onto the shared bus: a
// processor raises REQUEST (req[i]) when it addresses the shared memory and is held
// by WAIT (wait_n[i]) until the scanner reaches it and grants it the bus
// (grant_n[i]). The grant enables that processor's bus interface, which puts its
// address, data and strobes on the shared bus; one clock later WAIT is lifted and
// the processor completes the access. Its next opcode fetch (m1_n[i] low) releases
// the bus. Each processor therefore sees the shared memory as an extension of its
// own memory and needs no software for mutual exclusion on the bus.
//
// Interface: per processor, req / m1_n in, wait_n / grant_n out, the local bus in
// (lbus_t) and the read data out (lrdata, zero unless granted). sbus_mon shows the
// shared bus for observation. Read data from the memory is registered, so a read
// returns the byte at the address one clock after the address is on the shared bus;
// the one-clock WAIT delay after the grant covers this.
//
// The arrangement (scanner, controllers, one bus interface circuit per processor,
// one shared memory) is the reference system; the memory size is this design's.
module smmp_system
  import smmp_pkg::*;
#(
  parameter int unsigned N  = N_CPU,
  parameter int unsigned AW = SHARED_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      req,
  input  logic [N-1:0]      m1_n,
  output logic [N-1:0]      wait_n,
  output logic [N-1:0]      grant_n,
  output logic [N-1:0]      scan,
  input  lbus_t             lbus   [N],
  output logic [DATA_W-1:0] lrdata [N],
  output sbus_t             sbus_mon
);

  sbus_t             sbus_drv [N];
  sbus_t             sbus;
  logic [DATA_W-1:0] srdata;

  arbiter #(.N(N)) u_arbiter (
    .clk, .rst_n, .req, .m1_n, .wait_n, .grant_n, .scan
  );

  for (genvar i = 0; i < N; i++) begin : g_if
    bus_interface u_if (
      .grant_n(grant_n[i]),
      .lbus   (lbus[i]),
      .sbus   (sbus_drv[i]),
      .srdata (srdata),
      .lrdata (lrdata[i])
    );
  end

  // The common bus: OR of all interface drives (only the granted one is non-zero).
  always_comb begin
    sbus = '0;
    for (int i = 0; i < N; i++) sbus = sbus | sbus_drv[i];
  end

  shared_memory #(.AW(AW)) u_mem (
    .clk, .sbus, .rdata(srdata)
  );

  assign sbus_mon = sbus;

endmodule
