// tb_pre_5b6b: exhaustive check of the 5B/6B pre-encoder.
//
// For every ABCDE and K value the pre-encoded code group must be the primary
// code of the standard table: the negative-disparity form for D.0, 1, 2, 4, 8,
// 15 and 24, the positive form for D.16, 23, 27, 29, 30, 31 and K.28, and the
// unique form for the neutral codes. cur_rd6 must be the sign of that code's
// disparity and d7 must flag D.7 only.
module tb_pre_5b6b;
  import enc8b10b_pkg::*;
  import ref8b10b_pkg::*;

  logic [4:0] abcde;
  logic       kin;
  logic [5:0] abcdei;
  rd_e        cur_rd6;
  logic       d7;
  int checks = 0, failures = 0;

  pre_5b6b dut (.abcde(abcde), .kin(kin), .abcdei(abcdei), .cur_rd6(cur_rd6), .d7(d7));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcde=%b k=%0d abcdei=%b rd=%s d7=%0d", what, abcde, kin, abcdei,
               cur_rd6.name(), d7);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp6;
    int         x, n;
    rd_e        exp_rd;
    for (int k = 0; k < 2; k++)
      for (int v = 0; v < 32; v++) begin
        abcde = 5'(v);
        kin   = 1'(k);
        #1;
        x    = int'({abcde[0], abcde[1], abcde[2], abcde[3], abcde[4]});
        exp6 = (k == 1 && x == 28) ? 6'b001111 : rdm6(x);
        if (!(k == 1 && x == 28) && (x inside {0, 1, 2, 4, 8, 15, 24})) exp6 = ~exp6;
        n = ones({4'b0, exp6});
        exp_rd = (n == 3) ? RD_ZERO : (n > 3) ? RD_POS : RD_NEG;
        check(abcdei == exp6, "code");
        check(cur_rd6 == exp_rd, "disparity");
        check(d7 == (x == 7), "d7 flag");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
