// tb_disp_ctrl: random-stimulus check of the disparity control.
//
// Drives random pre-encoder outputs (code disparities, D.7/x.3 flags, e,i
// bits, K) for 4000 clocks and follows the running disparity with a model
// built from the complement table written out row by row. Before each clock
// it compares compls6, compls4 and alt7; after each clock it compares the
// registered running disparity, which must be the model's one clock later.
// It also checks the negative disparity after reset.
module tb_disp_ctrl;
  import enc8b10b_pkg::*;
  import ref8b10b_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       kin = 1'b0, d7 = 1'b0, x3 = 1'b0;
  rd_e        cur_rd6 = RD_ZERO, cur_rd4 = RD_ZERO, rd_q;
  logic [1:0] ei = 2'b00;
  logic       compls6, compls4, alt7;
  int checks = 0, failures = 0;
  int n_c6 = 0, n_c4 = 0, n_alt = 0;

  disp_ctrl dut (.clk(clk), .rst(rst), .kin(kin), .cur_rd6(cur_rd6), .d7(d7), .ei(ei),
                 .cur_rd4(cur_rd4), .x3(x3), .compls6(compls6), .compls4(compls4),
                 .alt7(alt7), .rd_q(rd_q));

  always #5 clk = ~clk;

  function automatic rd_e to_rd(int v);
    return (v < 0) ? RD_NEG : (v > 0) ? RD_POS : RD_ZERO;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int         rd, q6, q4, r6, nxt;
    bit         c6, c4, s;
    logic [1:0] sent;
    rd = -1;
    repeat (2) @(posedge clk);
    #1;
    check(rd_q == RD_NEG, "reset disparity");
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      q6      = int'($urandom_range(2)) - 1;
      q4      = int'($urandom_range(2)) - 1;
      cur_rd6 = to_rd(q6);
      cur_rd4 = to_rd(q4);
      d7      = ($urandom_range(7) == 0) && q6 == 0;
      x3      = ($urandom_range(5) == 0) && q4 == 0;
      kin     = ($urandom_range(7) == 0);
      ei      = 2'($urandom);
      #1;
      table4(rd, q6, c6, r6);
      if (d7 && rd == 1) begin c6 = 1; r6 = rd; end
      sent = ei ^ {c6, c6};
      s = (r6 == -1 && sent == 2'b11) || (r6 == 1 && sent == 2'b00);
      table4(r6, q4, c4, nxt);
      if (x3 && r6 == 1) begin c4 = 1; nxt = r6; end
      else if (kin && !x3 && q4 == 0 && r6 == -1) begin c4 = 1; nxt = r6; end
      check(compls6 == c6, "compls6");
      check(compls4 == c4, "compls4");
      check(alt7 == (s || kin), "alt7");
      n_c6 += int'(c6);
      n_c4 += int'(c4);
      n_alt += int'(s);
      @(posedge clk);
      #1;
      rd = nxt;
      check(rd_q == to_rd(rd), "running disparity");
    end
    check(n_c6 > 0 && n_c4 > 0 && n_alt > 0, "coverage");
    $display("complements: 6b %0d 4b %0d, alternate-7 conditions %0d", n_c6, n_c4, n_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
