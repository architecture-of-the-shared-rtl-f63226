// bus_interface: connects one processor's local bus to the shared memory bus.
//
// While the processor's GRANT (grant_n) is active the interface passes the local
// address, write data and strobes onto the shared bus and returns the shared read
// data to the local bus; otherwise everything it drives is zero. The shared bus is
// then formed by OR-ing the outputs of all interfaces, which is safe because the
// arbiter grants one processor at a time. The active-low strobes of the processor
// become active-high strobes on the shared bus so an idle bus reads as no access.
// Purely combinational.
//
// That GRANT enables the interface is the reference scheme; its insides (AND/OR
// gating instead of tri-state buffers) are this design's choice.
module bus_interface
  import smmp_pkg::*;
(
  input  logic              grant_n,  // GRANT, active low
  input  lbus_t             lbus,     // processor's local bus
  output sbus_t             sbus,     // this interface's drive onto the shared bus
  input  logic [DATA_W-1:0] srdata,   // shared memory read data
  output logic [DATA_W-1:0] lrdata    // read data towards the processor
);

  logic en;
  assign en = !grant_n;

  always_comb begin
    sbus.addr  = en ? lbus.addr  : '0;
    sbus.wdata = en ? lbus.wdata : '0;
    sbus.rd    = en && !lbus.rd_n;
    sbus.wr    = en && !lbus.wr_n;
    lrdata     = en ? srdata : '0;
  end

endmodule
