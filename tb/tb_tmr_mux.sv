// tb_tmr_mux: random test of the 3:1 command multiplexer over every valid one-hot
// select and the empty select (output must be zero).
module tb_tmr_mux;
  logic [2:0] sel;
  logic [7:0] cmd_a, cmd_b, cmd_c, cmd_out;
  int checks = 0, failures = 0;

  tmr_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      logic [7:0] exp;
      int s;
      cmd_a = 8'($urandom); cmd_b = 8'($urandom); cmd_c = 8'($urandom);
      s = $urandom_range(0, 3);
      sel = (s == 3) ? 3'b000 : 3'(1 << s);
      exp = (s == 0) ? cmd_a : (s == 1) ? cmd_b : (s == 2) ? cmd_c : 8'h00;
      #1;
      checks++;
      if (cmd_out !== exp) begin
        failures++;
        $display("FAIL sel=%b out=%h exp=%h", sel, cmd_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
