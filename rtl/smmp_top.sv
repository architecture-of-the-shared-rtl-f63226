// smmp_top: the three shared-memory multiprocessor systems side by side.
//
//   main_* : the reference four-processor system - round-robin arbiter (scanner and
//            four controllers), four bus interfaces and the shared memory.
//   fe_*   : the front-end communication subsystem of a host computer - the same
//            scheme with three processors, the host interface unit and two remote
//            link units.
//   tmr_*  : the tri-modular redundant trolley controller - three boards sharing a
//            global memory through the same arbiter, plus channel select logic and
//            the 3:1 command multiplexer.
// The processors themselves, their local memories and peripherals, modems,
// terminals, host, motors and sensors are outside; every signal by which they
// connect is a port. The three systems share only clock and reset.
//
// Timing: see smmp_system (arbitration and memory) and tmr_controller (commands).
module smmp_top
  import smmp_pkg::*;
#(
  parameter int unsigned AW    = SHARED_AW,
  parameter int unsigned CMD_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // four-processor system
  input  logic [3:0]        main_req,
  input  logic [3:0]        main_m1_n,
  output logic [3:0]        main_wait_n,
  output logic [3:0]        main_grant_n,
  output logic [3:0]        main_scan,
  input  lbus_t             main_lbus   [4],
  output logic [DATA_W-1:0] main_rdata  [4],
  output sbus_t             main_sbus,
  // front-end communication subsystem: index 0 = HIU, 1 = RLU-1, 2 = RLU-2
  input  logic [2:0]        fe_req,
  input  logic [2:0]        fe_m1_n,
  output logic [2:0]        fe_wait_n,
  output logic [2:0]        fe_grant_n,
  input  lbus_t             fe_lbus     [3],
  output logic [DATA_W-1:0] fe_rdata    [3],
  output sbus_t             fe_sbus,
  // TMR controller: index 0 = A, 1 = B, 2 = C
  input  logic [2:0]        tmr_req,
  input  logic [2:0]        tmr_m1_n,
  output logic [2:0]        tmr_wait_n,
  output logic [2:0]        tmr_grant_n,
  input  lbus_t             tmr_lbus    [3],
  output logic [DATA_W-1:0] tmr_rdata   [3],
  input  logic [1:0]        tmr_af,
  input  logic [1:0]        tmr_bf,
  input  logic [1:0]        tmr_cf,
  input  logic [CMD_W-1:0]  tmr_cmd_a,
  input  logic [CMD_W-1:0]  tmr_cmd_b,
  input  logic [CMD_W-1:0]  tmr_cmd_c,
  output logic [CMD_W-1:0]  tmr_cmd_out,
  output logic [2:0]        tmr_sel,
  output logic [2:0]        tmr_faulty,
  output logic [2:0]        tmr_link_bad,
  output logic              tmr_none_healthy
);

  smmp_system #(.N(4), .AW(AW)) u_main (
    .clk, .rst_n,
    .req     (main_req),
    .m1_n    (main_m1_n),
    .wait_n  (main_wait_n),
    .grant_n (main_grant_n),
    .scan    (main_scan),
    .lbus    (main_lbus),
    .lrdata  (main_rdata),
    .sbus_mon(main_sbus)
  );

  frontend_system #(.AW(AW)) u_fe (
    .clk, .rst_n,
    .hiu_req (fe_req[0]),  .hiu_m1_n (fe_m1_n[0]),
    .hiu_wait_n (fe_wait_n[0]),  .hiu_grant_n (fe_grant_n[0]),
    .hiu_lbus (fe_lbus[0]),  .hiu_rdata (fe_rdata[0]),
    .rlu1_req(fe_req[1]),  .rlu1_m1_n(fe_m1_n[1]),
    .rlu1_wait_n(fe_wait_n[1]),  .rlu1_grant_n(fe_grant_n[1]),
    .rlu1_lbus(fe_lbus[1]),  .rlu1_rdata(fe_rdata[1]),
    .rlu2_req(fe_req[2]),  .rlu2_m1_n(fe_m1_n[2]),
    .rlu2_wait_n(fe_wait_n[2]),  .rlu2_grant_n(fe_grant_n[2]),
    .rlu2_lbus(fe_lbus[2]),  .rlu2_rdata(fe_rdata[2]),
    .sbus_mon(fe_sbus)
  );

  tmr_controller #(.AW(AW), .CMD_W(CMD_W)) u_tmr (
    .clk, .rst_n,
    .req     (tmr_req),
    .m1_n    (tmr_m1_n),
    .wait_n  (tmr_wait_n),
    .grant_n (tmr_grant_n),
    .lbus    (tmr_lbus),
    .lrdata  (tmr_rdata),
    .af      (tmr_af),
    .bf      (tmr_bf),
    .cf      (tmr_cf),
    .cmd_a   (tmr_cmd_a),
    .cmd_b   (tmr_cmd_b),
    .cmd_c   (tmr_cmd_c),
    .cmd_out (tmr_cmd_out),
    .sel     (tmr_sel),
    .faulty  (tmr_faulty),
    .link_bad(tmr_link_bad),
    .none_healthy(tmr_none_healthy)
  );

endmodule
