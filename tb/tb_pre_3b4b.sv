// tb_pre_3b4b: exhaustive check of the 3B/4B pre-encoder.
//
// For every FGH and alt7 value the code group must be the primary code of the
// standard table (0100 for x.0 and 0010 for x.4, the negative forms; 1110 for
// x.7, or 0111 when the alternate is requested), cur_rd4 must be its disparity
// sign and x3 must flag FGH = 110 only.
module tb_pre_3b4b;
  import enc8b10b_pkg::*;
  import ref8b10b_pkg::*;

  logic [2:0] fgh;
  logic       alt7;
  logic [3:0] fghj;
  rd_e        cur_rd4;
  logic       x3;
  int checks = 0, failures = 0;

  pre_3b4b dut (.fgh(fgh), .alt7(alt7), .fghj(fghj), .cur_rd4(cur_rd4), .x3(x3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: fgh=%b alt7=%0d fghj=%b rd=%s x3=%0d", what, fgh, alt7, fghj,
               cur_rd4.name(), x3);
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
    logic [3:0] exp4;
    int         y, n;
    rd_e        exp_rd;
    for (int a = 0; a < 2; a++)
      for (int v = 0; v < 8; v++) begin
        fgh  = 3'(v);
        alt7 = 1'(a);
        #1;
        y = int'({fgh[0], fgh[1], fgh[2]});
        if (y == 7 && a == 1)      exp4 = 4'b0111;
        else if (y == 0 || y == 4) exp4 = ~rdm4(y);
        else                       exp4 = rdm4(y);
        n = ones({6'b0, exp4});
        exp_rd = (n == 2) ? RD_ZERO : (n > 2) ? RD_POS : RD_NEG;
        check(fghj == exp4, "code");
        check(cur_rd4 == exp_rd, "disparity");
        check(x3 == (y == 3), "x3 flag");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
