// tb_frontend_system: one full polling round of the front-end communication
// subsystem at its default size.
//   RLU-1 stores 64 one-byte samples of each of terminals 1-16 and RLU-2 those of
//   terminals 17-32, both at once, into the raw area of the shared memory
//   (terminal t, sensor s at (t-1)*64 + s). Meanwhile the HIU keeps polling raw
//   bytes; each must read either zero (not yet written) or the expected sample.
//   Then the HIU groups the data: it reads every raw sample and writes it into the
//   block area at 0x800 + s*32 + (t-1) (sensor-major), and finally reads the whole
//   block back as it would send it to the host. Every byte is compared with the
//   sample formula, sample(t, s) = (t*37 + s*11 + 5) mod 256.
// Also checked: one grant at a time, and the HIU saw wait states caused by the RLUs.
module tb_frontend_system
  import smmp_pkg::*;
;
  localparam int TERMS = 32, SENSORS = 64, PER_RLU = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // index 0 = HIU, 1 = RLU-1, 2 = RLU-2
  logic [2:0]  req, m1_n, wait_n, grant_n;
  logic [2:0]  start = '0, is_write = '0, busy, done, perr;
  logic [15:0] addr [3];
  logic [7:0]  wdata [3];
  lbus_t       lbus [3];
  logic [7:0]  lrdata [3], rd_out [3];
  int          wcyc [3];
  sbus_t       sbus_mon;

  frontend_system dut (
    .clk, .rst_n,
    .hiu_req(req[0]),  .hiu_m1_n(m1_n[0]),  .hiu_wait_n(wait_n[0]),  .hiu_grant_n(grant_n[0]),
    .hiu_lbus(lbus[0]),  .hiu_rdata(lrdata[0]),
    .rlu1_req(req[1]), .rlu1_m1_n(m1_n[1]), .rlu1_wait_n(wait_n[1]), .rlu1_grant_n(grant_n[1]),
    .rlu1_lbus(lbus[1]), .rlu1_rdata(lrdata[1]),
    .rlu2_req(req[2]), .rlu2_m1_n(m1_n[2]), .rlu2_wait_n(wait_n[2]), .rlu2_grant_n(grant_n[2]),
    .rlu2_lbus(lbus[2]), .rlu2_rdata(lrdata[2]),
    .sbus_mon
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

  function automatic logic [7:0] sample(int t, int s);
    return 8'((t * 37 + s * 11 + 5) % 256);
  endfunction

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
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) check($countones(~grant_n) <= 1, "one grant at a time");

  logic rlus_done = 1'b0;
  int   hiu_waits = 0, cycles = 0;
  always @(posedge clk) cycles++;

  task automatic rlu(input int i, input int first_t);
    for (int t = first_t; t < first_t + PER_RLU; t++)
      for (int s = 0; s < SENSORS; s++)
        access(i, 1'b1, 16'((t - 1) * SENSORS + s), sample(t, s));
  endtask

  initial begin
    int c0;
    for (int i = 0; i < 3; i++) begin addr[i] = '0; wdata[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    c0 = cycles;
    fork
      rlu(1, 1);
      rlu(2, 17);
      begin
        while (!rlus_done) begin
          int t, s;
          t = $urandom_range(1, TERMS); s = $urandom_range(0, SENSORS - 1);
          access(0, 1'b0, 16'((t - 1) * SENSORS + s), 8'h00);
          hiu_waits += wcyc[0];
          check(rd_out[0] == 8'h00 || rd_out[0] == sample(t, s),
                $sformatf("poll t%0d s%0d got %h", t, s, rd_out[0]));
        end
      end
      begin
        wait (busy[1]); wait (busy[2]);
        wait (!busy[1] && !busy[2]);
        #1 rlus_done = 1'b1;
      end
    join_any
    wait (rlus_done);
    wait (!busy[0]);
    $display("RLU phase: %0d clocks, HIU wait states while polling: %0d", cycles - c0, hiu_waits);
    check(hiu_waits > 3 * 100, "HIU held in WAIT by the RLUs' traffic");

    // HIU groups the data into the block area
    c0 = cycles;
    for (int t = 1; t <= TERMS; t++)
      for (int s = 0; s < SENSORS; s++) begin
        access(0, 1'b0, 16'((t - 1) * SENSORS + s), 8'h00);
        check(rd_out[0] == sample(t, s), $sformatf("raw t%0d s%0d got %h", t, s, rd_out[0]));
        access(0, 1'b1, 16'(32'h800 + s * TERMS + (t - 1)), rd_out[0]);
      end
    // HIU reads the block out for the host
    for (int s = 0; s < SENSORS; s++)
      for (int t = 1; t <= TERMS; t++) begin
        access(0, 1'b0, 16'(32'h800 + s * TERMS + (t - 1)), 8'h00);
        check(rd_out[0] == sample(t, s), $sformatf("block t%0d s%0d got %h", t, s, rd_out[0]));
      end
    $display("HIU grouping and read-out: %0d clocks", cycles - c0);
    check(perr == '0, "GRANT active in every T3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
