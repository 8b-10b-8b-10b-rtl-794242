// disp_check6: 6B disparity check of the disparity control.
//
// Takes the running disparity left by the previous character (pre_rd) and
// the disparity of the pre-encoded 6-bit code (cur_rd6) and applies the
// complement table: compls6 = 1 when both have the same sign. D.7 (d7) is
// neutral but is still sent as 000111 after a positive disparity, so compls6 is
// forced there. rd6 is the running disparity between the 6-bit and the 4-bit
// sub-block and goes on to the 4B check.
//
// s_alt is the "S" term of the alternate-7 rule: after the 6-bit sub-block as
// sent (ei = pre-encoded e,i XOR compls6), a 4-bit 1110/0001 would extend a run
// of equal bits, so 0111/1000 is used when rd6 is negative and e,i = 11, or
// rd6 is positive and e,i = 00. Purely combinational.
module disp_check6
  import enc8b10b_pkg::*;
(
  input  rd_e        pre_rd,
  input  rd_e        cur_rd6,
  input  logic       d7,
  input  logic [1:0] ei,
  output logic       compls6,
  output rd_e        rd6,
  output logic       s_alt
);

  disp_dec_t  dec;
  logic [1:0] ei_sent;

  always_comb begin
    dec = disp_decide(pre_rd, cur_rd6);
    if (d7 && pre_rd == RD_POS) begin
      dec.compls  = 1'b1;
      dec.next_rd = pre_rd;
    end
  end

  assign compls6 = dec.compls;
  assign rd6     = dec.next_rd;
  assign ei_sent = ei ^ {2{dec.compls}};
  assign s_alt   = (rd6 == RD_NEG && ei_sent == 2'b11) ||
                   (rd6 == RD_POS && ei_sent == 2'b00);

endmodule
