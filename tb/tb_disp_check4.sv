// tb_disp_check4: exhaustive check of the 4B disparity check.
//
// All disparity pairs with every K and x3 flag combination. Expected values
// come from the complement table written out row by row, with x.3 forced to
// complement after a positive and the neutral K28 4-bit codes after a
// negative disparity.
module tb_disp_check4;
  import enc8b10b_pkg::*;
  import ref8b10b_pkg::*;

  rd_e  rd6, cur_rd4, next_rd;
  logic kin, x3, compls4;
  int checks = 0, failures = 0;

  disp_check4 dut (.rd6(rd6), .cur_rd4(cur_rd4), .kin(kin), .x3(x3),
                   .compls4(compls4), .next_rd(next_rd));

  function automatic rd_e to_rd(int v);
    return (v < 0) ? RD_NEG : (v > 0) ? RD_POS : RD_ZERO;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rd6=%s cur=%s k=%0d x3=%0d -> c4=%0d next=%s", what,
               rd6.name(), cur_rd4.name(), kin, x3, compls4, next_rd.name());
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
    bit c;
    int nxt;
    for (int p = -1; p <= 1; p++)
      for (int q = -1; q <= 1; q++)
        for (int k = 0; k < 2; k++)
          for (int f = 0; f < 2; f++) begin
            rd6     = to_rd(p);
            cur_rd4 = to_rd(q);
            kin     = 1'(k);
            x3      = 1'(f);
            #1;
            table4(p, q, c, nxt);
            if (f == 1 && p == 1)                    begin c = 1; nxt = p; end
            else if (k == 1 && f == 0 && q == 0 && p == -1) begin c = 1; nxt = p; end
            check(compls4 == c, "compls4");
            check(next_rd == to_rd(nxt), "next_rd");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
