// tb_scanner: test of the ring counter and its enable gate.
// With no grant the one-hot scanning signal must step one position per clock and
// wrap round; a grant being taken or held must freeze it; it must resume on the
// clock after the grant ends. The expected position is kept by an independent
// counter in the testbench. Runs for N = 4 and N = 6.
module tb_scanner;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [3:0] g4_n = '1, gn4 = '0, s4;
  logic [5:0] g6_n = '1, gn6 = '0, s6;

  scanner #(.N(4)) dut4 (.clk, .rst_n, .grant_n(g4_n), .grant_next(gn4), .scan(s4));
  scanner #(.N(6)) dut6 (.clk, .rst_n, .grant_n(g6_n), .grant_next(gn6), .scan(s6));

  int pos4 = 0, pos6 = 0;  // reference positions

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s s4=%b pos4=%0d s6=%b pos6=%0d", $time, what, s4, pos4, s6, pos6);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(s4 == 4'b0001 && s6 == 6'b000001, "reset to S1");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      logic hold4, hold6;
      // random stimulus applied after the edge
      g4_n = '1; gn4 = '0; g6_n = '1; gn6 = '0;
      case ($urandom_range(0, 3))
        0: begin end
        1: begin gn4[$urandom_range(0, 3)] = 1'b1; gn6[$urandom_range(0, 5)] = 1'b1; end
        2: begin g4_n[$urandom_range(0, 3)] = 1'b0; g6_n[$urandom_range(0, 5)] = 1'b0; end
        default: begin end
      endcase
      hold4 = (g4_n != '1) || (gn4 != '0);
      hold6 = (g6_n != '1) || (gn6 != '0);
      @(posedge clk);
      if (!hold4) pos4 = (pos4 + 1) % 4;
      if (!hold6) pos6 = (pos6 + 1) % 6;
      #1;
      check(s4 == 4'(1 << pos4), "N=4 position");
      check(s6 == 6'(1 << pos6), "N=6 position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
