// tb_tmr_controller: the triple-redundant trolley controller with the boards'
// voting software modelled in the testbench.
// In every control round each board (A, B, C) writes its motor command into its
// own slot of the global memory (0x010 + board), then reads the other two slots
// through the arbiter and raises a fault flag for each neighbour whose command
// differs from its own (XF1/XF2 as wired: A: F1 = C, F2 = B; B: F1 = A, F2 = C;
// C: F1 = B, F2 = A). A removed board takes no part and is flagged by both others.
// Rounds:
//   1 all healthy                         -> A drives the motors
//   2 A computes a wrong command           -> B drives (A outvoted)
//   3 A removed, B and C agree             -> B drives (two-board state)
//   4 A removed, B goes wrong              -> no board chosen, motors undriven
//                                             (fault detected, not masked)
//   5 A reinstalled, all healthy again     -> A drives again
//   6 C wrong                              -> A drives, C judged faulty
// Each round checks the choice, the boards judged faulty and the command reaching
// the actuators, and that the memory traffic read back what was written.
module tb_tmr_controller
  import smmp_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [2:0]  req, m1_n, wait_n, grant_n;
  logic [2:0]  start = '0, is_write = '0, busy, done, perr;
  logic [15:0] addr [3];
  logic [7:0]  wdata [3];
  lbus_t       lbus [3];
  logic [7:0]  lrdata [3], rd_out [3];
  int          wcyc [3];
  logic [1:0]  af = '0, bf = '0, cf = '0;
  logic [7:0]  cmd [3];
  logic [7:0]  cmd_out;
  logic [2:0]  sel, faulty, link_bad;
  logic        none_healthy;

  tmr_controller dut (
    .clk, .rst_n, .req, .m1_n, .wait_n, .grant_n, .lbus, .lrdata,
    .af, .bf, .cf, .cmd_a(cmd[0]), .cmd_b(cmd[1]), .cmd_c(cmd[2]),
    .cmd_out, .sel, .faulty, .link_bad, .none_healthy
  );

  for (genvar i = 0; i < 3; i++) begin : g_cpu
    cpu_model u_cpu (
      .clk, .rst_n, .start(start[i]), .is_write(is_write[i]), .addr(addr[i]), .wdata(wdata[i]),
      .wait_n(wait_n[i]), .grant_n(grant_n[i]), .rdata(lrdata[i]),
      .req(req[i]), .m1_n(m1_n[i]), .lbus(lbus[i]), .busy(busy[i]), .done(done[i]),
      .rdata_out(rd_out[i]), .wait_cycles(wcyc[i]), .protocol_err(perr[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s (sel=%b faulty=%b out=%h)", $time, what, sel, faulty, cmd_out);
    end
  endtask

  task automatic access(input int i, input logic w, input logic [15:0] a, input logic [7:0] d);
    #1;
    is_write[i] = w; addr[i] = a; wdata[i] = d; start[i] = 1'b1;
    @(posedge clk); #1 start[i] = 1'b0;
    wait (done[i]);
    @(posedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour order per board: flag 1, flag 2
  function automatic int nb(int x, int f);
    case (x)
      0: return (f == 1) ? 2 : 1;
      1: return (f == 1) ? 0 : 2;
      default: return (f == 1) ? 1 : 0;
    endcase
  endfunction

  logic [7:0] seen [3][3];  // seen[x][y]: board x's copy of board y's command

  task automatic board(input int x);
    access(x, 1'b1, 16'h0010 + 16'(x), cmd[x]);
  endtask

  task automatic board_read(input int x, input int y);
    access(x, 1'b0, 16'h0010 + 16'(y), 8'h00);
    seen[x][y] = rd_out[0 + x];
  endtask

  // one control round; present[x] = 0 for a removed board
  task automatic round(input logic [2:0] present, input logic [7:0] good, input logic [2:0] wrong);
    logic [1:0] fl [3];
    for (int x = 0; x < 3; x++) cmd[x] = wrong[x] ? ~good : good;
    fork
      if (present[0]) board(0);
      if (present[1]) board(1);
      if (present[2]) board(2);
    join
    fork
      if (present[0]) begin board_read(0, nb(0, 1)); board_read(0, nb(0, 2)); end
      if (present[1]) begin board_read(1, nb(1, 1)); board_read(1, nb(1, 2)); end
      if (present[2]) begin board_read(2, nb(2, 1)); board_read(2, nb(2, 2)); end
    join
    for (int x = 0; x < 3; x++) begin
      fl[x] = '0;
      if (present[x])
        for (int f = 1; f <= 2; f++) begin
          int y;
          y = nb(x, f);
          if (!present[y]) fl[x][f-1] = 1'b1;
          else begin
            check(seen[x][y] == cmd[y], $sformatf("board %0d read board %0d's command", x, y));
            fl[x][f-1] = (seen[x][y] != cmd[x]);
          end
        end
    end
    af = fl[0]; bf = fl[1]; cf = fl[2];
    #1;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin addr[i] = '0; wdata[i] = '0; cmd[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    round(3'b111, 8'h35, 3'b000);
    check(sel == 3'b001 && faulty == '0 && cmd_out == 8'h35, "round 1: all healthy, A drives");
    round(3'b111, 8'h6A, 3'b001);
    check(sel == 3'b010 && faulty == 3'b001 && cmd_out == 8'h6A, "round 2: A outvoted, B drives");
    round(3'b110, 8'hC3, 3'b000);
    check(sel == 3'b010 && faulty == 3'b001 && cmd_out == 8'hC3, "round 3: A removed, B drives");
    round(3'b110, 8'h99, 3'b010);
    check(none_healthy && sel == '0 && cmd_out == 8'h00 && link_bad[2], "round 4: disagreement of two detected");
    round(3'b111, 8'h5A, 3'b000);
    check(sel == 3'b001 && faulty == '0 && cmd_out == 8'h5A, "round 5: A reinstalled");
    round(3'b111, 8'h12, 3'b100);
    check(sel == 3'b001 && faulty == 3'b100 && cmd_out == 8'h12, "round 6: C outvoted");
    check(perr == '0, "GRANT active in every T3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
