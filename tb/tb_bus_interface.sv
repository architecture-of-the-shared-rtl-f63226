// tb_bus_interface: random test of the grant-enabled bus interface.
// When granted, the local address and data must appear on the shared bus and the
// active-low local strobes must become active-high shared strobes, and shared read
// data must reach the local side; when not granted every output must be zero.
module tb_bus_interface
  import smmp_pkg::*;
;
  logic        grant_n;
  lbus_t       lbus;
  sbus_t       sbus;
  logic [7:0]  srdata, lrdata;
  int checks = 0, failures = 0;

  bus_interface dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [15:0] a; logic [7:0] d, r; logic rdn, wrn, g;
      a = 16'($urandom); d = 8'($urandom); r = 8'($urandom);
      rdn = 1'($urandom); wrn = 1'($urandom); g = 1'($urandom);
      grant_n = g;
      lbus = '{addr: a, wdata: d, rd_n: rdn, wr_n: wrn};
      srdata = r;
      #1;
      checks++;
      if (!g) begin
        if (sbus.addr !== a || sbus.wdata !== d || sbus.rd !== !rdn || sbus.wr !== !wrn || lrdata !== r) begin
          failures++;
          $display("FAIL granted: a=%h d=%h rdn=%b wrn=%b -> %p lrdata=%h", a, d, rdn, wrn, sbus, lrdata);
        end
      end else begin
        if (sbus !== '0 || lrdata !== '0) begin
          failures++;
          $display("FAIL not granted but drives %p lrdata=%h", sbus, lrdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
