// ref8b10b_pkg: independent reference model of standard 8B/10B coding, used
// by the testbenches to check the encoder.
//
// The model is written from the usual code tables (the code group sent when
// the running disparity is negative, per 5-bit and per 3-bit value) and the
// textbook rules: a sub-block of unequal ones and zeros is complemented when
// the running disparity is positive, as are the neutral D.7 and x.3; D.x.7
// takes the alternate form 0111/1000 for x = 17, 18, 20 after a negative and
// x = 11, 13, 14 after a positive disparity, and K.x.7 always does; K28.y
// takes its 4-bit code from a table of its own. decode() inverts encode() by
// search, as a behavioural 10b to 8b decoder.
//
// Byte convention here: x = EDCBA value (0..31), y = HGF value (0..7).
package ref8b10b_pkg;

  // abcdei sent with a negative running disparity, indexed by x.
  function automatic logic [5:0] rdm6(int x);
    case (x)
      0: return 6'b100111;  1: return 6'b011101;  2: return 6'b101101;  3: return 6'b110001;
      4: return 6'b110101;  5: return 6'b101001;  6: return 6'b011001;  7: return 6'b111000;
      8: return 6'b111001;  9: return 6'b100101; 10: return 6'b010101; 11: return 6'b110100;
     12: return 6'b001101; 13: return 6'b101100; 14: return 6'b011100; 15: return 6'b010111;
     16: return 6'b011011; 17: return 6'b100011; 18: return 6'b010011; 19: return 6'b110010;
     20: return 6'b001011; 21: return 6'b101010; 22: return 6'b011010; 23: return 6'b111010;
     24: return 6'b110011; 25: return 6'b100110; 26: return 6'b010110; 27: return 6'b110110;
     28: return 6'b001110; 29: return 6'b101110; 30: return 6'b011110; default: return 6'b101011;
    endcase
  endfunction

  // fghj sent when the disparity after the 6-bit part is negative.
  function automatic logic [3:0] rdm4(int y);
    case (y)
      0: return 4'b1011; 1: return 4'b1001; 2: return 4'b0101; 3: return 4'b1100;
      4: return 4'b1101; 5: return 4'b1010; 6: return 4'b0110; default: return 4'b1110;
    endcase
  endfunction

  // fghj of K28.y when the disparity after 001111 is positive.
  function automatic logic [3:0] k28_4(int y);
    case (y)
      0: return 4'b0100; 1: return 4'b1001; 2: return 4'b0101; 3: return 4'b0011;
      4: return 4'b0010; 5: return 4'b1010; 6: return 4'b0110; default: return 4'b1000;
    endcase
  endfunction

  function automatic int ones(logic [9:0] v);
    int n = 0;
    for (int b = 0; b < 10; b++) n += int'(v[b]);
    return n;
  endfunction

  function automatic bit valid_k(int x, int y);
    return (x == 28) || (y == 7 && (x == 23 || x == 27 || x == 29 || x == 30));
  endfunction

  // Encode one character. rd: 0 = negative, 1 = positive running disparity.
  // Returns {abcdei, fghj}; rd is updated.
  function automatic logic [9:0] encode(int x, int y, bit k, ref bit rd);
    logic [5:0] c6;
    logic [3:0] c4;
    bit         rd6;
    int         n6, n4;
    if (k && x == 28) c6 = 6'b001111;
    else              c6 = rdm6(x);
    n6 = ones({4'b0, c6});
    if (rd && (n6 != 3 || x == 7)) c6 = ~c6;
    n6  = ones({4'b0, c6});
    rd6 = (n6 == 3) ? rd : (n6 > 3);
    if (k && x == 28) begin
      c4 = k28_4(y);
      if (!rd6) c4 = ~c4;
    end else begin
      if (y == 7 && (k || (!rd6 && (x == 17 || x == 18 || x == 20)) ||
                          (rd6 && (x == 11 || x == 13 || x == 14))))
        c4 = 4'b0111;
      else
        c4 = rdm4(y);
      n4 = ones({6'b0, c4});
      if (rd6 && (n4 != 2 || y == 3)) c4 = ~c4;
    end
    n4 = ones({6'b0, c4});
    rd = (n4 == 2) ? rd6 : (n4 > 2);
    return {c6, c4};
  endfunction

  // Behavioural decoder: finds the character whose code group, at running
  // disparity rd, is cw. Returns 1 and x, y, k if found.
  function automatic bit decode(logic [9:0] cw, bit rd, output int x, output int y, output bit k);
    bit r;
    for (int kk = 0; kk < 2; kk++)
      for (int xx = 0; xx < 32; xx++)
        for (int yy = 0; yy < 8; yy++) begin
          if (kk == 1 && !valid_k(xx, yy)) continue;
          r = rd;
          if (encode(xx, yy, bit'(kk), r) == cw) begin
            x = xx; y = yy; k = bit'(kk);
            return 1'b1;
          end
        end
    x = 0; y = 0; k = 1'b0;
    return 1'b0;
  endfunction

  // Complement/next-disparity table, row by row, with disparities as
  // -1, 0, +1.
  function automatic void table4(int pre, int cur, output bit compls, output int nxt);
    case ((pre + 1) * 3 + (cur + 1))
      0: begin compls = 1; nxt = +1; end  // pre -, cur -
      1: begin compls = 0; nxt = -1; end  // pre -, cur 0
      2: begin compls = 0; nxt = +1; end  // pre -, cur +
      3: begin compls = 0; nxt = -1; end  // pre 0, cur -
      4: begin compls = 0; nxt =  0; end  // pre 0, cur 0
      5: begin compls = 0; nxt = +1; end  // pre 0, cur +
      6: begin compls = 0; nxt = -1; end  // pre +, cur -
      7: begin compls = 0; nxt = +1; end  // pre +, cur 0
      default: begin compls = 1; nxt = -1; end  // pre +, cur +
    endcase
  endfunction

endpackage
