// tb_out_stage: check of the register-and-complement output stage.
//
// Checks the cleared output during reset, then for 2000 random clocks that
// output_10b equals, right after a rising clock, the sub-blocks present before
// that clock with a..i inverted by compls6 and f..j by compls4, and that it
// holds until the next clock.
module tb_out_stage;
  logic       clk = 1'b0, rst = 1'b1;
  logic [5:0] abcdei = '0;
  logic [3:0] fghj = '0;
  logic       compls6 = 1'b0, compls4 = 1'b0;
  logic [9:0] output_10b;
  int checks = 0, failures = 0;

  out_stage dut (.clk(clk), .rst(rst), .abcdei(abcdei), .fghj(fghj), .compls6(compls6),
                 .compls4(compls4), .output_10b(output_10b));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: out=%b", what, $time, output_10b);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] exp10;
    abcdei = 6'b111111;
    fghj   = 4'b1111;
    repeat (2) @(posedge clk);
    #1;
    check(output_10b == 10'b0, "reset value");
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      abcdei  = 6'($urandom);
      fghj    = 4'($urandom);
      compls6 = 1'($urandom);
      compls4 = 1'($urandom);
      exp10 = {compls6 ? ~abcdei : abcdei, compls4 ? ~fghj : fghj};
      @(posedge clk);
      #1;
      check(output_10b == exp10, "registered code");
      abcdei = ~abcdei;
      #3;
      check(output_10b == exp10, "held until next clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
