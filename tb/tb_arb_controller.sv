// tb_arb_controller: directed test of one arbiter controller.
// Checks, cycle by cycle: a REQUEST edge sets WAIT on the next clock; no grant
// while the scanning signal is off; the grant follows the scanning signal by one
// clock; WAIT is lifted exactly one clock after the grant; the grant holds until M1
// and is then released; a held REQUEST level does not re-arm the Request
// flip-flop; the grant cannot be taken while M1 is low; reset clears everything.
module tb_arb_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, m1_n = 1'b1, scan = 1'b0;
  logic wait_n, grant_n, grant_next;
  int checks = 0, failures = 0;

  arb_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s (wait_n=%b grant_n=%b)", $time, what, wait_n, grant_n);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2);
    rst_n = 1'b1;
    tick();
    check(wait_n && grant_n && !grant_next, "idle after reset");

    // request while not scanned
    req = 1'b1; tick(); req = 1'b0;
    check(!wait_n, "WAIT low one clock after REQUEST");
    check(grant_n, "no grant without scan");
    tick(3);
    check(!wait_n && grant_n, "still waiting, not scanned");

    // scan arrives
    scan = 1'b1; #1;
    check(grant_next, "grant being taken when scanned with request");
    tick();
    check(!grant_n, "GRANT one clock after scan");
    check(!wait_n, "WAIT still low in the grant clock");
    tick();
    check(wait_n, "WAIT lifted one clock after GRANT");
    check(!grant_n, "GRANT held after WAIT lifted");
    tick(3);
    check(!grant_n, "GRANT held until M1");
    m1_n = 1'b0; tick(); m1_n = 1'b1;
    check(grant_n, "M1 clears GRANT");
    tick(2);
    check(grant_n && wait_n, "no second grant from the same request");
    scan = 1'b0;

    // a REQUEST held high for several clocks arms once only
    req = 1'b1; tick();
    check(!wait_n, "WAIT on long request");
    scan = 1'b1; tick(); scan = 1'b0;
    check(!grant_n, "grant on long request");
    tick(3);
    check(wait_n, "WAIT lifted although REQUEST still high");
    m1_n = 1'b0; tick(); m1_n = 1'b1;
    tick(2);
    check(wait_n && grant_n, "held REQUEST level does not re-arm");
    req = 1'b0; tick();

    // grant cannot be taken while M1 is low
    req = 1'b1; tick(); req = 1'b0;
    m1_n = 1'b0; scan = 1'b1; #1;
    check(!grant_next, "no grant_next while M1 low");
    tick();
    check(grant_n, "no grant while M1 low");
    m1_n = 1'b1; tick();
    check(!grant_n, "grant once M1 high again");
    scan = 1'b0;

    // reset in the middle
    rst_n = 1'b0; tick(); rst_n = 1'b1; tick();
    check(wait_n && grant_n, "reset clears both flip-flops");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
