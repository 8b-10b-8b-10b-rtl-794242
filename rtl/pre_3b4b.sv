// pre_3b4b: modified 3B/4B pre-encoder of the reduced-table 8B/10B encoder.
//
// F and G are summed by a 2-bit adder; the sum and H select one of six
// classes, in which f, g, h are mostly copied and only g and the extra bit j
// are set. The output is the non-complemented code group and cur_rd4 is the
// sign of its disparity. For FGH = 111 two codes exist: the primary 1110 and
// the alternate 0111 (f cleared, j set), chosen by alt7, which is the "S + K"
// condition worked out by the disparity control from the 6-bit sub-block and
// the K input. x3 flags FGH = 110, the neutral 1100 that must still be
// complemented after a positive disparity.
//
// Interface: fgh[2] = F ... fgh[0] = H; fghj[3] = f ... fghj[0] = j.
// Bit h is always H, so fghj[1] is a wire from fgh[0].
// Purely combinational. Classes, the alternate-7 rule and disparities follow
// the reduced 3B/4B table of the design; the x3 flag output is this
// implementation's way of passing the x.3 case on.
module pre_3b4b
  import enc8b10b_pkg::*;
(
  input  logic [2:0] fgh,
  input  logic       alt7,
  output logic [3:0] fghj,
  output rd_e        cur_rd4,
  output logic       x3
);

  logic       f_in, g_in, h_in;
  logic [1:0] sum2;
  logic       f_o, g_o, j_o;

  assign {f_in, g_in, h_in} = fgh;
  assign sum2 = 2'(f_in) + 2'(g_in);

  always_comb begin
    f_o     = f_in;
    g_o     = g_in;
    j_o     = 1'b0;
    cur_rd4 = RD_ZERO;
    case ({h_in, sum2})
      3'b0_00: begin g_o = 1'b1; cur_rd4 = RD_NEG;  end
      3'b0_01: begin j_o = 1'b1; cur_rd4 = RD_ZERO; end
      3'b0_10: begin             cur_rd4 = RD_ZERO; end
      3'b1_00: begin             cur_rd4 = RD_NEG;  end
      3'b1_01: begin             cur_rd4 = RD_ZERO; end
      3'b1_10: begin
        cur_rd4 = RD_POS;
        if (alt7) begin
          f_o = 1'b0;
          j_o = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign fghj = {f_o, g_o, h_in, j_o};
  assign x3   = (fgh == 3'b110);

endmodule
