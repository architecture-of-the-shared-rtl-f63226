// tmr_mux: the 3:1 multiplexer between the three redundant boards and the actuator
// driver circuits.
//
// Passes the control commands (step motor drive sequences) of the board selected by
// the one-hot sel to cmd_out; with no board selected the output is all zero, which
// leaves the motors undriven. Combinational, built as an AND-OR so that an invalid
// select can never merge two boards' commands silently: that case is flagged by the
// assertion.
//
// The 3:1 multiplexing of the three boards' commands is the reference design; the
// command width (8 bits: four phase lines for each of two step motors) is this
// design's choice.
module tmr_mux #(
  parameter int unsigned CMD_W = 8
) (
  input  logic [2:0]       sel,    // one-hot {C, B, A}
  input  logic [CMD_W-1:0] cmd_a,
  input  logic [CMD_W-1:0] cmd_b,
  input  logic [CMD_W-1:0] cmd_c,
  output logic [CMD_W-1:0] cmd_out
);

  always_comb begin
    cmd_out = ({CMD_W{sel[0]}} & cmd_a)
            | ({CMD_W{sel[1]}} & cmd_b)
            | ({CMD_W{sel[2]}} & cmd_c);
  end

  always_comb a_sel_onehot0: assert ($onehot0(sel) || $isunknown(sel));

endmodule
