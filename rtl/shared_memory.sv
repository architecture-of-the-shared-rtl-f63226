// shared_memory: the byte-wide RAM on the shared bus that the processors use as a
// mailbox.
//
// 2**AW bytes, addressed by the low AW bits of the shared bus address. A byte is
// written at the clock edge while the shared write strobe is high. Read data is
// registered: every clock it takes the byte at the current address, so it is valid
// one clock after the address appears (the processor holds its address through the
// whole memory cycle). The contents are cleared to zero at start-up so the mailbox
// has a defined state before anyone writes it.
//
// A shared RAM as mailbox is the reference scheme; its size, width and timing are
// this design's choice (4 KiB by default).
module shared_memory
  import smmp_pkg::*;
#(
  parameter int unsigned AW = SHARED_AW
) (
  input  logic              clk,
  input  sbus_t             sbus,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**AW];
  logic [AW-1:0]     a;

  assign a = sbus.addr[AW-1:0];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (sbus.wr) mem[a] <= sbus.wdata;
    rdata <= mem[a];
  end

endmodule
