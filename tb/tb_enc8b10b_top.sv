// tb_enc8b10b_top: end-to-end test of the 8B/10B encoder at its default
// configuration.
//
// 1. Reset: output_10b cleared, running disparity negative.
// 2. Known code groups: D0.0, D31.5, D0.0, K28.5 from a negative start give
//    1001110100 1010111010 0110001011 1100000101; D6.4 (input 01100001) after
//    a positive disparity gives 0110010010, then D23.6 (11101011) gives
//    1110100110.
// 3. A pseudo-random stream of NCHAR characters (about one in eight a valid K
//    character) from a 31-bit LFSR. Every code group is compared with an
//    independent table model, decoded back with a behavioural decoder and
//    checked for line rules: 4 to 6 ones per group, cumulative disparity
//    within one step of zero, no run of more than five equal bits. rd_pos is
//    compared with the model's running disparity.
// Latency is checked too: each code group must appear right after the clock
// that captured its byte. Every (character, running disparity) pair must be
// seen, and each encoder mechanism must occur at least once: 6-bit and
// 4-bit complement, forced complement of D.7, x.3 and K28 neutral codes,
// alternate 7 through S and through K, and the D.24 and K.28 patches.
module tb_enc8b10b_top;
  import ref8b10b_pkg::*;
  import enc8b10b_pkg::*;

  localparam int NCHAR = 500000;

  logic       clk = 1'b0, rst = 1'b1, kin = 1'b0;
  logic [7:0] input_8b = '0;
  logic [9:0] output_10b;
  logic       rd_pos;
  int checks = 0, failures = 0;

  enc8b10b_top dut (.clk(clk), .rst(rst), .kin(kin), .input_8b(input_8b),
                    .output_10b(output_10b), .rd_pos(rd_pos));

  always #5 clk = ~clk;

  // Mechanism counters, worked out from the character and the model's
  // running disparity before it.
  int n_c6, n_c4, n_d7, n_x3, n_k28n, n_alt_s, n_alt_k, n_d24, n_k28;

  task automatic count_mechanisms(int x, int y, bit k, bit rd_before, logic [9:0] cw);
    bit k28   = k && x == 28;
    bit pos6  = k28 || (x inside {16, 23, 27, 29, 30, 31});
    bit neg6  = !k28 && (x inside {0, 1, 2, 4, 8, 15, 24});
    bit d7f   = !k && x == 7 && rd_before;
    int n6    = ones({4'b0, cw[9:4]});
    bit rd6   = (n6 == 3) ? rd_before : (n6 > 3);
    bit x3f   = y == 3 && rd6;
    bit k28f  = k28 && (y inside {1, 2, 5, 6}) && !rd6;
    bit c4    = x3f || k28f || ((y == 0 || y == 4) && !rd6) || (y == 7 && rd6);
    n_c6    += int'((neg6 && !rd_before) || (pos6 && rd_before) || d7f);
    n_c4    += int'(c4);
    n_d7    += int'(d7f);
    n_x3    += int'(x3f);
    n_k28n  += int'(k28f);
    n_alt_s += int'(!k && y == 7 && (cw[3:0] == 4'b0111 || cw[3:0] == 4'b1000));
    n_alt_k += int'(k && y == 7);
    n_d24   += int'(!k && x == 24);
    n_k28   += int'(k28);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: in=%b k=%0d out=%b", what, $time,
                                  input_8b, kin, output_10b);
    end
  endtask

  function automatic logic [7:0] pack(int x, int y);
    logic [4:0] xv = 5'(x);
    logic [2:0] yv = 3'(y);
    return {xv[0], xv[1], xv[2], xv[3], xv[4], yv[0], yv[1], yv[2]};
  endfunction

  initial begin
    repeat (NCHAR + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one character; returns the code group seen right after the clock.
  // The previous code group must still be on the output until that clock.
  task automatic send(logic [7:0] b, bit k, output logic [9:0] cw);
    logic [9:0] held;
    @(negedge clk);
    held     = output_10b;
    input_8b = b;
    kin      = k;
    #2;
    check(output_10b == held, "no change before the clock");
    @(posedge clk);
    #1;
    cw = output_10b;
  endtask

  bit   seen[2][32][8][2];
  int   run_len, run_bit, cum;

  task automatic line_rules(logic [9:0] cw, bit rd);
    int n = ones(cw);
    check(n >= 4 && n <= 6, "ones per code group");
    cum += 2 * n - 10;
    check(cum == (rd ? 2 : 0), "cumulative disparity");
    for (int b = 9; b >= 0; b--) begin
      if (int'(cw[b]) == run_bit) run_len++;
      else begin run_bit = int'(cw[b]); run_len = 1; end
      check(run_len <= 5, "run length");
    end
  endtask

  initial begin
    logic [9:0] cw, exp_cw;
    bit         rd, rd_before, k, dk;
    int         x, y, dx, dy, missing;
    logic [30:0] lfsr;
    rd = 1'b0; cum = 0; run_len = 0; run_bit = -1;

    repeat (2) @(posedge clk);
    #1;
    check(output_10b == '0 && !rd_pos, "reset state");
    rst = 1'b0;

    // Known code groups.
    send(pack(0, 0), 1'b0, cw);  check(cw == 10'b1001110100, "D0.0 RD-");
    send(pack(31, 5), 1'b0, cw); check(cw == 10'b1010111010, "D31.5 RD-");
    send(pack(0, 0), 1'b0, cw);  check(cw == 10'b0110001011, "D0.0 RD+");
    send(pack(28, 5), 1'b1, cw); check(cw == 10'b1100000101, "K28.5 RD+");
    check(!rd_pos, "RD- after K28.5");
    send(pack(31, 5), 1'b0, cw); check(rd_pos, "RD+ after D31.5");
    send(8'b01100001, 1'b0, cw); check(cw == 10'b0110010010, "D6.4 RD+");
    send(8'b11101011, 1'b0, cw); check(cw == 10'b1110100110, "D23.6 RD-");
    check(rd_pos, "RD+ after D23.6");

    // Re-synchronise the model with the hardware.
    rst = 1'b1;
    #1;
    rst = 1'b0;
    rd = 1'b0;

    lfsr = 31'h2545F491;
    for (int n = 0; n < NCHAR; n++) begin
      for (int s = 0; s < 12; s++) lfsr = {lfsr[29:0], lfsr[30] ^ lfsr[27]};
      x = int'(lfsr[4:0]);
      y = int'(lfsr[7:5]);
      k = (lfsr[10:8] == 3'b000);
      if (k) begin
        case (lfsr[14:11] % 12)
          8:  begin x = 23; y = 7; end
          9:  begin x = 27; y = 7; end
          10: begin x = 29; y = 7; end
          11: begin x = 30; y = 7; end
          default: begin x = 28; y = int'(lfsr[13:11]); end
        endcase
      end
      rd_before = rd;
      exp_cw = encode(x, y, k, rd);
      send(pack(x, y), k, cw);
      check(cw == exp_cw, "code group");
      check(rd_pos == rd, "running disparity");
      line_rules(cw, rd);
      check(decode(cw, rd_before, dx, dy, dk) && dx == x && dy == y && dk == k, "round trip");
      seen[k][x][y][rd_before] = 1'b1;
      count_mechanisms(x, y, k, rd_before, exp_cw);
    end

    missing = 0;
    for (int kk = 0; kk < 2; kk++)
      for (int xx = 0; xx < 32; xx++)
        for (int yy = 0; yy < 8; yy++)
          for (int r = 0; r < 2; r++)
            if ((kk == 0 || valid_k(xx, yy)) && !seen[kk][xx][yy][r]) missing++;
    check(missing == 0, "character coverage");
    $display("characters %0d, uncovered (character, disparity) pairs %0d", NCHAR, missing);
    $display("6b complement %0d, 4b complement %0d, D.7 forced %0d, x.3 forced %0d, K28 forced %0d",
             n_c6, n_c4, n_d7, n_x3, n_k28n);
    $display("alternate 7 by S %0d, by K %0d, D.24 %0d, K.28 %0d",
             n_alt_s, n_alt_k, n_d24, n_k28);
    check(n_c6 > 0, "6b complement seen");
    check(n_c4 > 0, "4b complement seen");
    check(n_d7 > 0, "D.7 forced complement seen");
    check(n_x3 > 0, "x.3 forced complement seen");
    check(n_k28n > 0, "K28 forced complement seen");
    check(n_alt_s > 0, "alternate 7 by S seen");
    check(n_alt_k > 0, "alternate 7 by K seen");
    check(n_d24 > 0, "D.24 seen");
    check(n_k28 > 0, "K.28 seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
