// tb_shared_memory: random reads and writes against a reference array.
// Every location starts at zero; a write is seen by a read of the same address one
// clock later; read data is registered (valid one clock after the address); read
// strobes or idle bus cycles do not change the contents; only the low AW address
// bits select the byte. Run at the default size.
module tb_shared_memory
  import smmp_pkg::*;
;
  localparam int AW = SHARED_AW;
  logic clk = 1'b0;
  sbus_t sbus = '0;
  logic [7:0] rdata;
  logic [7:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  shared_memory dut (.clk, .sbus, .rdata);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(input logic [15:0] a);
    sbus = '{addr: a, wdata: 8'($urandom), rd: 1'b1, wr: 1'b0};
    @(posedge clk); #1;
    checks++;
    if (rdata !== ref_mem[a[AW-1:0]]) begin
      failures++;
      $display("FAIL read %h got %h expected %h", a, rdata, ref_mem[a[AW-1:0]]);
    end
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    // start-up contents
    for (int k = 0; k < 64; k++) rd_check(16'($urandom));
    for (int k = 0; k < 20000; k++) begin
      logic [15:0] a; logic [7:0] d;
      a = 16'($urandom);
      if (k % 3 == 0) a[AW-1:0] = 12'($urandom_range(0, 15));   // some address reuse
      d = 8'($urandom);
      case ($urandom_range(0, 2))
        0: begin
          sbus = '{addr: a, wdata: d, rd: 1'b0, wr: 1'b1};
          @(posedge clk); #1;
          ref_mem[a[AW-1:0]] = d;
        end
        1: rd_check(a);
        default: begin
          sbus = '{addr: a, wdata: d, rd: 1'b0, wr: 1'b0};
          @(posedge clk); #1;
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
