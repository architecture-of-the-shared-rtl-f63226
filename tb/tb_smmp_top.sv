// tb_smmp_top: end-to-end test of the whole top level at its default parameters,
// all three systems running at once.
//   Four-processor system: a mailbox transfer from processor 0 to processor 2,
//     then random colliding reads and writes from all four processors, checked
//     against a reference memory kept in completion order.
//   Front-end subsystem: one complete polling round - RLU-1 and RLU-2 store 64
//     samples of each of their 16 terminals, the HIU then groups all 2048 samples
//     into the block area and reads the block out, checked against the sample
//     formula (t*37 + s*11 + 5) mod 256.
//   TMR controller: six control rounds with the boards' comparison done through
//     the global memory; A fails, is removed, B fails in the two-board state, A is
//     reinstalled, C fails. The choice and the command at the actuators are checked.
// Every mechanism of the design is counted and must occur at least once: a
// processor held in WAIT while another owns the bus, the scanner stopped by a
// grant, the scanner wrapping from the last processor to the first, the grant
// ended by M1, reads and writes of the shared memory, a mailbox transfer between
// processors, the TMR switch-over to another board, the two-board state, a
// detected two-board disagreement and a reinstated board.
module tb_smmp_top
  import smmp_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic [3:0]  main_req, main_m1_n, main_wait_n, main_grant_n, main_scan;
  lbus_t       main_lbus [4];
  logic [7:0]  main_rdata [4];
  sbus_t       main_sbus;
  logic [2:0]  fe_req, fe_m1_n, fe_wait_n, fe_grant_n;
  lbus_t       fe_lbus [3];
  logic [7:0]  fe_rdata [3];
  sbus_t       fe_sbus;
  logic [2:0]  tmr_req, tmr_m1_n, tmr_wait_n, tmr_grant_n;
  lbus_t       tmr_lbus [3];
  logic [7:0]  tmr_rdata [3];
  logic [1:0]  tmr_af = '0, tmr_bf = '0, tmr_cf = '0;
  logic [7:0]  tcmd [3];
  logic [7:0]  tmr_cmd_out;
  logic [2:0]  tmr_sel, tmr_faulty, tmr_link_bad;
  logic        tmr_none_healthy;

  smmp_top dut (
    .clk, .rst_n,
    .main_req, .main_m1_n, .main_wait_n, .main_grant_n, .main_scan,
    .main_lbus, .main_rdata, .main_sbus,
    .fe_req, .fe_m1_n, .fe_wait_n, .fe_grant_n, .fe_lbus, .fe_rdata, .fe_sbus,
    .tmr_req, .tmr_m1_n, .tmr_wait_n, .tmr_grant_n, .tmr_lbus, .tmr_rdata,
    .tmr_af, .tmr_bf, .tmr_cf, .tmr_cmd_a(tcmd[0]), .tmr_cmd_b(tcmd[1]), .tmr_cmd_c(tcmd[2]),
    .tmr_cmd_out, .tmr_sel, .tmr_faulty, .tmr_link_bad, .tmr_none_healthy
  );

  // ---------------- processor models: 0-3 main, 4-6 front end, 7-9 TMR ----------------
  localparam int NP = 10;
  logic [NP-1:0] start = '0, is_write = '0, busy, done, perr, req, m1_n, wait_n, grant_n;
  logic [15:0]   addr [NP];
  logic [7:0]    wdata [NP], rdata [NP], rd_out [NP];
  lbus_t         lbus [NP];
  int            wcyc [NP];

  for (genvar i = 0; i < NP; i++) begin : g_cpu
    cpu_model u_cpu (
      .clk, .rst_n, .start(start[i]), .is_write(is_write[i]), .addr(addr[i]), .wdata(wdata[i]),
      .wait_n(wait_n[i]), .grant_n(grant_n[i]), .rdata(rdata[i]),
      .req(req[i]), .m1_n(m1_n[i]), .lbus(lbus[i]), .busy(busy[i]), .done(done[i]),
      .rdata_out(rd_out[i]), .wait_cycles(wcyc[i]), .protocol_err(perr[i])
    );
  end

  assign main_req  = req[3:0];
  assign main_m1_n = m1_n[3:0];
  assign fe_req    = req[6:4];
  assign fe_m1_n   = m1_n[6:4];
  assign tmr_req   = req[9:7];
  assign tmr_m1_n  = m1_n[9:7];
  assign wait_n    = {tmr_wait_n, fe_wait_n, main_wait_n};
  assign grant_n   = {tmr_grant_n, fe_grant_n, main_grant_n};
  for (genvar i = 0; i < 4; i++) begin : g_main
    assign main_lbus[i] = lbus[i];
    assign rdata[i]     = main_rdata[i];
  end
  for (genvar i = 0; i < 3; i++) begin : g_3
    assign fe_lbus[i]   = lbus[4 + i];
    assign rdata[4 + i] = fe_rdata[i];
    assign tmr_lbus[i]  = lbus[7 + i];
    assign rdata[7 + i] = tmr_rdata[i];
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
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
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters and bus rules ----------------
  int n_wait_behind = 0, n_scan_stop = 0, n_wrap = 0, n_m1_release = 0;
  int n_read = 0, n_write = 0, n_mailbox = 0;
  int n_switch = 0, n_degraded = 0, n_detect = 0, n_reinstate = 0;
  logic [3:0] scan_prev = 4'b0001;
  logic [9:0] grant_prev = '1, m1_prev = '1;

  always @(posedge clk) if (rst_n) begin
    check($countones(~main_grant_n) <= 1 && $countones(~fe_grant_n) <= 1 &&
          $countones(~tmr_grant_n) <= 1, "one grant per system");
    for (int i = 0; i < 4; i++)
      if (!main_wait_n[i] && main_grant_n[i] && main_grant_n != '1) n_wait_behind++;
    if (main_grant_n != '1 && main_scan == scan_prev) n_scan_stop++;
    if (scan_prev[3] && main_scan[0]) n_wrap++;
    for (int i = 0; i < NP; i++)
      if (!grant_prev[i] && grant_n[i] && !m1_prev[i]) n_m1_release++;
    for (int i = 0; i < NP; i++) if (done[i]) begin
      if (is_write[i]) n_write++; else n_read++;
    end
    scan_prev  <= main_scan;
    grant_prev <= grant_n;
    m1_prev    <= m1_n;
  end

  // ---------------- four-processor system ----------------
  logic [7:0] ref_main [2**SHARED_AW];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 4; i++) if (done[i]) begin
      if (is_write[i]) ref_main[addr[i][SHARED_AW-1:0]] = wdata[i];
      else check(rd_out[i] == ref_main[addr[i][SHARED_AW-1:0]],
                 $sformatf("main cpu%0d read %h got %h", i, addr[i], rd_out[i]));
    end

  task automatic run_main();
    for (int k = 0; k < 8; k++) access(0, 1'b1, 16'h0200 + 16'(k), 8'h5C ^ 8'(k));
    for (int k = 0; k < 8; k++) begin
      access(2, 1'b0, 16'h0200 + 16'(k), 8'h00);
      check(rd_out[2] == (8'h5C ^ 8'(k)), "main mailbox byte");
      if (rd_out[2] == (8'h5C ^ 8'(k))) n_mailbox++;
    end
    for (int c = 0; c < 4000; c++) begin
      #1;
      for (int i = 0; i < 4; i++)
        if (!busy[i] && !done[i] && !start[i] && $urandom_range(0, 2) == 0) begin
          is_write[i] = 1'($urandom);
          addr[i]     = 16'($urandom_range(0, 15));
          wdata[i]    = 8'($urandom);
          start[i]    = 1'b1;
        end else start[i] = 1'b0;
      @(posedge clk);
    end
    #1 start[3:0] = '0;
    wait (busy[3:0] == '0);
  endtask

  // ---------------- front-end subsystem ----------------
  function automatic logic [7:0] sample(int t, int s);
    return 8'((t * 37 + s * 11 + 5) % 256);
  endfunction

  task automatic rlu(input int i, input int first_t);
    for (int t = first_t; t < first_t + 16; t++)
      for (int s = 0; s < 64; s++)
        access(i, 1'b1, 16'((t - 1) * 64 + s), sample(t, s));
  endtask

  task automatic run_fe();
    fork
      rlu(5, 1);
      rlu(6, 17);
    join
    for (int t = 1; t <= 32; t++)
      for (int s = 0; s < 64; s++) begin
        access(4, 1'b0, 16'((t - 1) * 64 + s), 8'h00);
        check(rd_out[4] == sample(t, s), "front end raw sample");
        access(4, 1'b1, 16'(32'h800 + s * 32 + (t - 1)), rd_out[4]);
      end
    for (int s = 0; s < 64; s++)
      for (int t = 1; t <= 32; t++) begin
        access(4, 1'b0, 16'(32'h800 + s * 32 + (t - 1)), 8'h00);
        check(rd_out[4] == sample(t, s), "front end block sample");
      end
  endtask

  // ---------------- TMR controller ----------------
  function automatic int nb(int x, int f);
    case (x)
      0: return (f == 1) ? 2 : 1;
      1: return (f == 1) ? 0 : 2;
      default: return (f == 1) ? 1 : 0;
    endcase
  endfunction

  logic [7:0] seen [3][3];

  task automatic tmr_read(input int x, input int y);
    access(7 + x, 1'b0, 16'h0010 + 16'(y), 8'h00);
    seen[x][y] = rd_out[7 + x];
  endtask

  task automatic tmr_round(input logic [2:0] present, input logic [7:0] good, input logic [2:0] wrong);
    logic [1:0] fl [3];
    for (int x = 0; x < 3; x++) tcmd[x] = wrong[x] ? ~good : good;
    fork
      if (present[0]) access(7, 1'b1, 16'h0010, tcmd[0]);
      if (present[1]) access(8, 1'b1, 16'h0011, tcmd[1]);
      if (present[2]) access(9, 1'b1, 16'h0012, tcmd[2]);
    join
    fork
      if (present[0]) begin tmr_read(0, nb(0, 1)); tmr_read(0, nb(0, 2)); end
      if (present[1]) begin tmr_read(1, nb(1, 1)); tmr_read(1, nb(1, 2)); end
      if (present[2]) begin tmr_read(2, nb(2, 1)); tmr_read(2, nb(2, 2)); end
    join
    for (int x = 0; x < 3; x++) begin
      fl[x] = '0;
      if (present[x])
        for (int f = 1; f <= 2; f++) begin
          int y;
          y = nb(x, f);
          fl[x][f-1] = !present[y] || (seen[x][y] != tcmd[x]);
        end
    end
    tmr_af = fl[0]; tmr_bf = fl[1]; tmr_cf = fl[2];
    #1;
  endtask

  task automatic run_tmr();
    logic [2:0] prev_sel;
    tmr_round(3'b111, 8'h35, 3'b000);
    check(tmr_sel == 3'b001 && tmr_cmd_out == 8'h35, "TMR all healthy");
    prev_sel = tmr_sel;
    tmr_round(3'b111, 8'h6A, 3'b001);
    check(tmr_sel == 3'b010 && tmr_cmd_out == 8'h6A, "TMR A outvoted");
    if (tmr_sel != prev_sel) n_switch++;
    tmr_round(3'b110, 8'hC3, 3'b000);
    check(tmr_sel == 3'b010 && tmr_faulty == 3'b001 && tmr_cmd_out == 8'hC3, "TMR two-board state");
    if (tmr_faulty == 3'b001 && !tmr_none_healthy) n_degraded++;
    tmr_round(3'b110, 8'h99, 3'b010);
    check(tmr_none_healthy && tmr_cmd_out == 8'h00, "TMR two-board disagreement");
    if (tmr_none_healthy) n_detect++;
    tmr_round(3'b111, 8'h5A, 3'b000);
    check(tmr_sel == 3'b001 && tmr_cmd_out == 8'h5A, "TMR A reinstalled");
    if (tmr_sel == 3'b001) n_reinstate++;
    tmr_round(3'b111, 8'h12, 3'b100);
    check(tmr_sel == 3'b001 && tmr_faulty == 3'b100 && tmr_cmd_out == 8'h12, "TMR C outvoted");
    // every command path of the multiplexer, with three different commands
    tcmd[0] = 8'hA1; tcmd[1] = 8'hB2; tcmd[2] = 8'hC3;
    tmr_af = 2'b11; tmr_bf = 2'b00; tmr_cf = 2'b00; #1;    // A outvoted
    check(tmr_sel == 3'b010 && tmr_cmd_out == 8'hB2, "TMR path B");
    tmr_af = 2'b00; tmr_bf = 2'b11; tmr_cf = 2'b01; #1;    // B outvoted, A and C links clean
    check(tmr_sel == 3'b001 && tmr_cmd_out == 8'hA1, "TMR path A");
    tmr_af = 2'b00; tmr_bf = 2'b00; tmr_cf = 2'b00; #1;    // all agree
    check(tmr_sel == 3'b001 && tmr_cmd_out == 8'hA1 && !tmr_none_healthy, "TMR flags cleared");
  endtask

  // ---------------- run ----------------
  initial begin
    for (int i = 0; i < NP; i++) begin addr[i] = '0; wdata[i] = '0; end
    for (int i = 0; i < 3; i++) tcmd[i] = '0;
    for (int i = 0; i < 2**SHARED_AW; i++) ref_main[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_main();
      run_fe();
      run_tmr();
    join
    repeat (2) @(posedge clk);
    check(perr == '0, "GRANT active in every T3");
    $display("mechanisms: wait_behind=%0d scan_stop=%0d wrap=%0d m1_release=%0d read=%0d write=%0d mailbox=%0d",
             n_wait_behind, n_scan_stop, n_wrap, n_m1_release, n_read, n_write, n_mailbox);
    $display("            tmr_switch=%0d degraded=%0d detect=%0d reinstate=%0d",
             n_switch, n_degraded, n_detect, n_reinstate);
    check(n_wait_behind > 0, "mechanism: WAIT behind another grant");
    check(n_scan_stop > 0,   "mechanism: scanner stopped by a grant");
    check(n_wrap > 0,        "mechanism: scanner wraps round");
    check(n_m1_release > 0,  "mechanism: M1 ends the grant");
    check(n_read > 0,        "mechanism: shared read");
    check(n_write > 0,       "mechanism: shared write");
    check(n_mailbox > 0,     "mechanism: mailbox transfer");
    check(n_switch > 0,      "mechanism: TMR switch-over");
    check(n_degraded > 0,    "mechanism: two-board state");
    check(n_detect > 0,      "mechanism: two-board fault detection");
    check(n_reinstate > 0,   "mechanism: board reinstated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
