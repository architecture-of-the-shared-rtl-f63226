// frontend_system: the front-end communication subsystem of a host computer, built
// as a three-processor shared-memory system.
//
// Two remote link units (RLU-1 for remote terminals 1-16, RLU-2 for terminals
// 17-32) poll their terminals over serial links and store the checked samples in
// the shared memory; the host interface unit (HIU) groups the data of all 32
// terminals in the shared memory and sends the block to the host over a parallel
// bus. The three units are processors outside this module; this module is what they
// share: the round-robin arbiter, their bus interfaces and the shared memory, with
// each unit's arbiter and local-bus signals brought out under its own name.
//
// Timing and handshake are those of smmp_system. The unit-to-port assignment (HIU on
// port 0, RLU-1 on port 1, RLU-2 on port 2) and the 4 KiB memory, room for one poll
// of 32 x 64 one-byte samples twice over, are this design's choices.
module frontend_system
  import smmp_pkg::*;
#(
  parameter int unsigned AW = SHARED_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // host interface unit
  input  logic              hiu_req,
  input  logic              hiu_m1_n,
  output logic              hiu_wait_n,
  output logic              hiu_grant_n,
  input  lbus_t             hiu_lbus,
  output logic [DATA_W-1:0] hiu_rdata,
  // remote link unit 1 (terminals 1-16)
  input  logic              rlu1_req,
  input  logic              rlu1_m1_n,
  output logic              rlu1_wait_n,
  output logic              rlu1_grant_n,
  input  lbus_t             rlu1_lbus,
  output logic [DATA_W-1:0] rlu1_rdata,
  // remote link unit 2 (terminals 17-32)
  input  logic              rlu2_req,
  input  logic              rlu2_m1_n,
  output logic              rlu2_wait_n,
  output logic              rlu2_grant_n,
  input  lbus_t             rlu2_lbus,
  output logic [DATA_W-1:0] rlu2_rdata,
  output sbus_t             sbus_mon
);

  localparam int unsigned N = 3;

  logic [N-1:0]      wait_n, grant_n, scan;
  lbus_t             lbus   [N];
  logic [DATA_W-1:0] lrdata [N];

  assign lbus[0] = hiu_lbus;
  assign lbus[1] = rlu1_lbus;
  assign lbus[2] = rlu2_lbus;

  smmp_system #(.N(N), .AW(AW)) u_sys (
    .clk, .rst_n,
    .req     ({rlu2_req, rlu1_req, hiu_req}),
    .m1_n    ({rlu2_m1_n, rlu1_m1_n, hiu_m1_n}),
    .wait_n, .grant_n, .scan,
    .lbus, .lrdata, .sbus_mon
  );

  assign {rlu2_wait_n, rlu1_wait_n, hiu_wait_n}    = wait_n;
  assign {rlu2_grant_n, rlu1_grant_n, hiu_grant_n} = grant_n;
  assign hiu_rdata  = lrdata[0];
  assign rlu1_rdata = lrdata[1];
  assign rlu2_rdata = lrdata[2];

endmodule
