// smmp_pkg: types and constants shared by the shared-memory multiple-microprocessor
// system.
//
// The processors are 8-bit machines with a 16-bit address bus (Z-80 class), so a
// local bus carries a 16-bit address, an 8-bit data byte and the active-low read and
// write strobes of such a processor. The shared bus that the bus interfaces drive is
// built from AND/OR gating rather than tri-state buffers, so its strobes are active
// high and an idle bus (all zeros) means "no access". The widths are taken from the
// processor family; the shared memory size (SHARED_AW) is this design's own choice.
package smmp_pkg;

  localparam int unsigned CPU_AW    = 16;  // processor address bus width
  localparam int unsigned DATA_W    = 8;   // processor data bus width
  localparam int unsigned SHARED_AW = 12;  // default shared memory: 4 KiB
  localparam int unsigned N_CPU     = 4;   // processors in the reference system

  // Local (processor-side) bus, as a processor presents it to its bus interface.
  typedef struct packed {
    logic [CPU_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              rd_n;   // read strobe, active low
    logic              wr_n;   // write strobe, active low
  } lbus_t;

  // Shared memory bus: the OR of every bus interface's gated drive.
  typedef struct packed {
    logic [CPU_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              rd;     // read strobe, active high
    logic              wr;     // write strobe, active high
  } sbus_t;

  localparam lbus_t LBUS_IDLE = '{addr: '0, wdata: '0, rd_n: 1'b1, wr_n: 1'b1};

endpackage
