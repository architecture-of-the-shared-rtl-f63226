// tb_arbiter: the four-processor round-robin arbiter driven by four processor
// bus-cycle models.
//   Phase 1 - one processor at a time: the number of wait states must equal
//             2 + the distance the scanner still has to travel to reach it, worked
//             out from the scanning signal seen when the request was made.
//   Phase 2 - saturation, every processor requesting back to back: the grants must
//             go strictly round the ring, every processor must get the same share,
//             and a new grant must start every 6 clocks (grant held 4 clocks, one
//             clock to release and step the scanner, one to take the next grant).
//   Phase 3 - random traffic: every access must finish, wait states stay within the
//             round-robin bound, GRANT is always active in T3.
// Throughout: never more than one GRANT active.
module tb_arbiter
  import smmp_pkg::*;
;
  localparam int N = 4;
  localparam int PERIOD = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [N-1:0] req, m1_n, wait_n, grant_n, scan;
  logic [N-1:0] start, busy, done, perr;
  lbus_t        lbus [N];
  logic [7:0]   rd_out [N];
  int           wcyc [N];

  arbiter #(.N(N)) dut (.clk, .rst_n, .req, .m1_n, .wait_n, .grant_n, .scan);

  for (genvar i = 0; i < N; i++) begin : g_cpu
    cpu_model u_cpu (
      .clk, .rst_n, .start(start[i]), .is_write(1'b0), .addr('0), .wdata('0),
      .wait_n(wait_n[i]), .grant_n(grant_n[i]), .rdata(8'h00),
      .req(req[i]), .m1_n(m1_n[i]), .lbus(lbus[i]), .busy(busy[i]), .done(done[i]),
      .rdata_out(rd_out[i]), .wait_cycles(wcyc[i]), .protocol_err(perr[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mutual exclusion, every clock
  int cycle = 0;
  always @(posedge clk) if (rst_n) begin
    cycle++;
    checks++;
    if ($countones(~grant_n) > 1) begin
      failures++;
      $display("FAIL t=%0t two grants %b", $time, grant_n);
    end
  end

  // grant log
  int last_grant = -1, grant_count [N], grant_start_cycle = -1;
  logic order_ok = 1'b1, period_ok = 1'b1, in_saturation = 1'b0;
  logic [N-1:0] grant_prev = '1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (grant_prev[i] && !grant_n[i]) begin
      if (in_saturation) begin
        if (last_grant >= 0 && i != (last_grant + 1) % N) order_ok = 1'b0;
        if (grant_start_cycle >= 0 && cycle - grant_start_cycle != PERIOD) period_ok = 1'b0;
        grant_count[i]++;
      end
      last_grant = i;
      grant_start_cycle = cycle;
    end
    grant_prev <= grant_n;
  end

  function automatic int pos(logic [N-1:0] s);
    for (int i = 0; i < N; i++) if (s[i]) return i;
    return -1;
  endfunction

  int max_wait = 0;
  initial begin
    start = '0;
    for (int i = 0; i < N; i++) grant_count[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase 1: single requests, exact wait states
    for (int k = 0; k < 40; k++) begin
      int i, p0, expw;
      i = $urandom_range(0, N - 1);
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1 start[i] = 1'b1;
      @(posedge clk); #1 start[i] = 1'b0;
      p0 = pos(scan);                      // scanner during T1
      expw = 2 + ((i - p0 - 1 + 2 * N) % N);
      wait (done[i]);
      @(posedge clk); #1;
      check(wcyc[i] == expw, $sformatf("single request cpu%0d waits %0d expected %0d", i, wcyc[i], expw));
    end

    // Phase 2: saturation
    in_saturation = 1'b1;
    last_grant = -1; grant_start_cycle = -1;
    for (int c = 0; c < 600; c++) begin
      #1 start = ~busy;
      @(posedge clk);
    end
    #1 start = '0;
    in_saturation = 1'b0;
    wait (busy == '0);
    check(order_ok, "saturation: grants go round the ring");
    check(period_ok, $sformatf("saturation: one grant every %0d clocks", PERIOD));
    for (int i = 0; i < N; i++)
      check(grant_count[i] >= grant_count[0] - 1 && grant_count[i] <= grant_count[0] + 1,
            $sformatf("saturation: equal share cpu%0d %0d vs %0d", i, grant_count[i], grant_count[0]));
    check(grant_count[0] >= 600 / PERIOD / N - 2, "saturation: throughput");

    // Phase 3: random traffic
    for (int c = 0; c < 5000; c++) begin
      #1 for (int i = 0; i < N; i++) start[i] = !busy[i] && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      for (int i = 0; i < N; i++) if (done[i]) begin
        if (wcyc[i] > max_wait) max_wait = wcyc[i];
        check(wcyc[i] <= 2 + (N - 1) + (N - 1) * PERIOD, $sformatf("wait bound cpu%0d %0d", i, wcyc[i]));
      end
    end
    #1 start = '0;
    wait (busy == '0);
    check(perr == '0, "GRANT active in every T3");
    $display("max wait states under random traffic: %0d", max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
