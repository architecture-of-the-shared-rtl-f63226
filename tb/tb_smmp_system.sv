// tb_smmp_system: the four-processor shared-memory system with four processor
// bus-cycle models doing reads and writes of the shared memory.
//   Phase 1 - mailbox: processor 0 writes a block of bytes, then processor 3 reads
//             them back through its own bus interface.
//   Phase 2 - random reads and writes from all four processors to a small address
//             range (so they collide); every read must return the last byte written
//             to that address by any processor, kept in a reference array that is
//             updated in completion order (the arbiter serialises the accesses).
// Throughout: the shared bus is idle whenever no GRANT is active, only the granted
// processor's address is on it, and read data reaches only the granted processor.
module tb_smmp_system
  import smmp_pkg::*;
;
  localparam int N = 4;
  localparam int AW = SHARED_AW;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [N-1:0] req, m1_n, wait_n, grant_n, scan;
  logic [N-1:0] start = '0, is_write = '0, busy, done, perr;
  logic [15:0]  addr [N];
  logic [7:0]   wdata [N];
  lbus_t        lbus [N];
  logic [7:0]   lrdata [N], rd_out [N];
  int           wcyc [N];
  sbus_t        sbus_mon;

  smmp_system dut (.clk, .rst_n, .req, .m1_n, .wait_n, .grant_n, .scan, .lbus, .lrdata, .sbus_mon);

  for (genvar i = 0; i < N; i++) begin : g_cpu
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
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus isolation, sampled mid-cycle
  always @(negedge clk) if (rst_n) begin
    if (grant_n == '1) check(sbus_mon == '0, "shared bus idle without a grant");
    for (int i = 0; i < N; i++) begin
      if (grant_n[i] && lrdata[i] != '0) check(1'b0, $sformatf("read data leaks to cpu%0d", i));
      if (!grant_n[i]) check(sbus_mon.addr == lbus[i].addr, $sformatf("granted cpu%0d address on bus", i));
    end
  end

  logic [7:0] ref_mem [2**AW];
  int reads = 0, writes = 0;

  // reference update and read check, in completion order
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (done[i]) begin
      if (is_write[i]) begin
        ref_mem[addr[i][AW-1:0]] = wdata[i];
        writes++;
      end else begin
        reads++;
        check(rd_out[i] == ref_mem[addr[i][AW-1:0]],
              $sformatf("cpu%0d read %h got %h expected %h", i, addr[i], rd_out[i], ref_mem[addr[i][AW-1:0]]));
      end
    end
  end

  task automatic access(input int i, input logic w, input logic [15:0] a, input logic [7:0] d);
    #1;
    is_write[i] = w; addr[i] = a; wdata[i] = d; start[i] = 1'b1;
    @(posedge clk); #1 start[i] = 1'b0;
    wait (done[i]);
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    for (int i = 0; i < N; i++) begin addr[i] = '0; wdata[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: mailbox from processor 0 to processor 3
    for (int k = 0; k < 16; k++) access(0, 1'b1, 16'h0100 + 16'(k), 8'hA0 + 8'(k));
    for (int k = 0; k < 16; k++) begin
      access(3, 1'b0, 16'h0100 + 16'(k), 8'h00);
      check(rd_out[3] == 8'hA0 + 8'(k), $sformatf("mailbox byte %0d", k));
    end

    // Phase 2: random colliding traffic
    for (int c = 0; c < 20000; c++) begin
      #1;
      for (int i = 0; i < N; i++)
        if (!busy[i] && !done[i] && !start[i] && $urandom_range(0, 3) == 0) begin
          is_write[i] = 1'($urandom);
          addr[i]     = 16'($urandom_range(0, 31)) | (16'($urandom) & 16'hF000);
          wdata[i]    = 8'($urandom);
          start[i]    = 1'b1;
        end else start[i] = 1'b0;
      @(posedge clk);
    end
    #1 start = '0;
    wait (busy == '0);
    repeat (2) @(posedge clk);
    check(perr == '0, "GRANT active in every T3");
    check(reads > 1000 && writes > 1000, $sformatf("enough traffic: %0d reads %0d writes", reads, writes));
    $display("reads=%0d writes=%0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
