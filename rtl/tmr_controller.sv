// tmr_controller: the hardware of a tri-modular redundant controller for a mobile
// trolley.
//
// Three identical processor boards (A, B, C) run identical software. They exchange
// data through a single global memory, allotted to one board at a time by the
// round-robin bus arbiter: board X raises REQUEST, waits, gets GRANT X and uses its
// buffered bus. Each board also produces motor commands on its I/O bus and two fault
// flags from its comparison with the other boards. The channel select logic turns
// the six flags into the choice of a healthy board and the 3:1 multiplexer passes
// that board's commands to the actuator drivers. The global memory, arbiter and
// multiplexing logic are single, not triplicated.
//
// Interface: per board the arbiter and buffered-bus signals as in smmp_system
// (index 0 = A, 1 = B, 2 = C), the fault flags, the command buses; out come the
// chosen commands, the one-hot choice, the boards judged faulty and the link
// disagreement signals. Timing of the memory side as smmp_system; the command path
// is combinational.
//
// The block structure follows the reference drawing; the meaning of the flags, the
// decision rule and all widths are this design's choices (see tmr_channel_select,
// tmr_mux).
module tmr_controller
  import smmp_pkg::*;
#(
  parameter int unsigned AW    = SHARED_AW,
  parameter int unsigned CMD_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        req,       // REQUEST of A, B, C
  input  logic [2:0]        m1_n,
  output logic [2:0]        wait_n,
  output logic [2:0]        grant_n,   // GRANT A, B, C (active low)
  input  lbus_t             lbus   [3],
  output logic [DATA_W-1:0] lrdata [3],
  input  logic [1:0]        af,        // {AF2, AF1}
  input  logic [1:0]        bf,
  input  logic [1:0]        cf,
  input  logic [CMD_W-1:0]  cmd_a,
  input  logic [CMD_W-1:0]  cmd_b,
  input  logic [CMD_W-1:0]  cmd_c,
  output logic [CMD_W-1:0]  cmd_out,   // to the actuator driver circuits
  output logic [2:0]        sel,
  output logic [2:0]        faulty,
  output logic [2:0]        link_bad,
  output logic              none_healthy
);

  logic [2:0] scan;
  sbus_t      sbus_mon;

  smmp_system #(.N(3), .AW(AW)) u_gm (
    .clk, .rst_n, .req, .m1_n, .wait_n, .grant_n, .scan,
    .lbus, .lrdata, .sbus_mon
  );

  tmr_channel_select u_csel (
    .af, .bf, .cf, .sel, .faulty, .link_bad, .none_healthy
  );

  tmr_mux #(.CMD_W(CMD_W)) u_mux (
    .sel, .cmd_a, .cmd_b, .cmd_c, .cmd_out
  );

endmodule
