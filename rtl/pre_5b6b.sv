// pre_5b6b: modified 5B/6B pre-encoder of the reduced-table 8B/10B encoder.
//
// Instead of a 32-row lookup, the four bits A..D are summed by a small adder
// and the 3-bit sum together with E selects one of ten classes. In every class
// a and usually b, c, d are copied from A..D; only some of b, c, d and the two
// extra bits e, i are set by the class. The output is always the
// non-complemented (primary) code group; whether it is sent complemented is
// decided later by the disparity control, using cur_rd6, the sign of this
// code's own disparity. Two inputs fall outside the classes and are patched:
// D.24 (ABCDE = 00011) becomes 001100 and K.28 (ABCDE = 00111 with K) sets
// i to give 001111. d7 flags D.7 (ABCDE = 11100), the neutral code 111000 that
// the disparity control must still complement after a positive disparity.
//
// Interface: abcde[4] = A ... abcde[0] = E; abcdei[5] = a ... abcdei[0] = i.
// Bit a is always A, so abcdei[5] is a wire from abcde[4].
// Purely combinational. The class table, the D.24 and K.28 patches and the
// output disparities follow the reduced 5B/6B table of the design; the d7 flag
// output is this implementation's way of passing the D.7 case on.
module pre_5b6b
  import enc8b10b_pkg::*;
(
  input  logic [4:0] abcde,
  input  logic       kin,
  output logic [5:0] abcdei,
  output rd_e        cur_rd6,
  output logic       d7
);

  logic       a_in, b_in, c_in, d_in, e_in;
  logic [2:0] sum4;
  logic       b_o, c_o, d_o, e_o, i_o;

  assign {a_in, b_in, c_in, d_in, e_in} = abcde;
  assign sum4 = 3'(a_in) + 3'(b_in) + 3'(c_in) + 3'(d_in);

  always_comb begin
    b_o     = b_in;
    c_o     = c_in;
    d_o     = d_in;
    e_o     = 1'b0;
    i_o     = 1'b0;
    cur_rd6 = RD_ZERO;
    case ({e_in, sum4})
      4'b0_000: begin b_o = 1'b1; c_o = 1'b1;                         cur_rd6 = RD_NEG;  end
      4'b0_001: begin e_o = 1'b1;                                     cur_rd6 = RD_NEG;  end
      4'b0_010: begin i_o = 1'b1;                                     cur_rd6 = RD_ZERO; end
      4'b0_011: begin                                                 cur_rd6 = RD_ZERO; end
      4'b0_100: begin b_o = 1'b0; d_o = 1'b0;                         cur_rd6 = RD_NEG;  end
      4'b1_000: begin b_o = 1'b1; c_o = 1'b1; e_o = 1'b1; i_o = 1'b1; cur_rd6 = RD_POS;  end
      4'b1_001: begin e_o = 1'b1; i_o = 1'b1;                         cur_rd6 = RD_ZERO; end
      4'b1_010: begin e_o = 1'b1;                                     cur_rd6 = RD_ZERO; end
      4'b1_011: begin e_o = 1'b1;                                     cur_rd6 = RD_POS;  end
      4'b1_100: begin b_o = 1'b0; d_o = 1'b0; e_o = 1'b1; i_o = 1'b1; cur_rd6 = RD_POS;  end
      default: ;
    endcase
    // D.24: the sum says "one bit set", but 000111 would be unbalanced.
    if (abcde == 5'b00011) begin
      c_o     = 1'b1;
      e_o     = 1'b0;
      i_o     = 1'b0;
      cur_rd6 = RD_NEG;
    end
    // K.28: as D.28 (001110) but with i set, giving the comma-bearing 001111.
    if (kin && abcde == 5'b00111) begin
      i_o     = 1'b1;
      cur_rd6 = RD_POS;
    end
  end

  assign abcdei = {a_in, b_o, c_o, d_o, e_o, i_o};
  assign d7     = (abcde == 5'b11100);

endmodule
