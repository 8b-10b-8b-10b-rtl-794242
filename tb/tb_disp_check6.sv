// tb_disp_check6: exhaustive check of the 6B disparity check.
//
// All previous/current disparity pairs, with and without the D.7 flag and
// for all four e,i values. Expected compls6 and rd6 come from the
// complement table written out row by row, with D.7 forced to complement
// after a positive disparity; expected s_alt from the alternate-7 rule on
// the e,i bits as sent.
module tb_disp_check6;
  import enc8b10b_pkg::*;
  import ref8b10b_pkg::*;

  rd_e        pre_rd, cur_rd6, rd6;
  logic       d7, compls6, s_alt;
  logic [1:0] ei;
  int checks = 0, failures = 0;

  disp_check6 dut (.pre_rd(pre_rd), .cur_rd6(cur_rd6), .d7(d7), .ei(ei),
                   .compls6(compls6), .rd6(rd6), .s_alt(s_alt));

  function automatic rd_e to_rd(int v);
    return (v < 0) ? RD_NEG : (v > 0) ? RD_POS : RD_ZERO;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pre=%s cur=%s d7=%0d ei=%b -> c6=%0d rd6=%s s=%0d", what,
               pre_rd.name(), cur_rd6.name(), d7, ei, compls6, rd6.name(), s_alt);
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
    bit         c;
    int         nxt;
    logic [1:0] sent;
    bit         s;
    for (int p = -1; p <= 1; p++)
      for (int q = -1; q <= 1; q++)
        for (int f = 0; f < 2; f++)
          for (int e = 0; e < 4; e++) begin
            pre_rd  = to_rd(p);
            cur_rd6 = to_rd(q);
            d7      = 1'(f);
            ei      = 2'(e);
            #1;
            table4(p, q, c, nxt);
            if (f == 1 && p == 1) begin c = 1; nxt = p; end
            sent = 2'(e) ^ {c, c};
            s = (nxt == -1 && sent == 2'b11) || (nxt == 1 && sent == 2'b00);
            check(compls6 == c, "compls6");
            check(rd6 == to_rd(nxt), "rd6");
            check(s_alt == s, "s_alt");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
