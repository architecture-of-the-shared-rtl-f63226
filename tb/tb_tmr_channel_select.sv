// tb_tmr_channel_select: exhaustive test over all 64 combinations of the six fault
// flags. The expected choice is computed a second way: a board's votes against it
// are counted over the two links it takes part in (a link counts when either of its
// boards flags it), a board with two votes against it is faulty, and the first
// board in the order A, B, C that is not faulty is chosen.
module tb_tmr_channel_select;
  logic [1:0] af, bf, cf;
  logic [2:0] sel, faulty, link_bad;
  logic none_healthy;
  int checks = 0, failures = 0;

  tmr_channel_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      // flags: AF1, AF2, BF1, BF2, CF1, CF2
      bit f [6];
      int votes [3];
      bit lnk [3];   // A-B, A-C, B-C
      logic [2:0] exp_sel, exp_faulty;
      for (int b = 0; b < 6; b++) f[b] = v[b];
      af = {f[1], f[0]}; bf = {f[3], f[2]}; cf = {f[5], f[4]};
      lnk[0] = f[1] | f[2];   // AF2 | BF1
      lnk[1] = f[0] | f[5];   // AF1 | CF2
      lnk[2] = f[3] | f[4];   // BF2 | CF1
      votes[0] = int'(lnk[0]) + int'(lnk[1]);
      votes[1] = int'(lnk[0]) + int'(lnk[2]);
      votes[2] = int'(lnk[1]) + int'(lnk[2]);
      exp_faulty = '0;
      for (int b = 0; b < 3; b++) exp_faulty[b] = (votes[b] == 2);
      exp_sel = '0;
      for (int b = 2; b >= 0; b--) if (!exp_faulty[b]) exp_sel = 3'(1 << b);
      #1;
      checks++;
      if (sel !== exp_sel || faulty !== exp_faulty || link_bad !== {lnk[2], lnk[1], lnk[0]}
          || none_healthy !== (exp_sel == '0)) begin
        failures++;
        $display("FAIL flags=%b sel=%b exp=%b faulty=%b exp=%b", v[5:0], sel, exp_sel, faulty, exp_faulty);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
