// disp_check4: 4B disparity check of the disparity control.
//
// Applies the complement table to the running disparity after the 6-bit
// sub-block (rd6) and the disparity of the pre-encoded 4-bit code (cur_rd4),
// giving compls4 and the running disparity at the end of the character
// (next_rd). Two neutral cases are forced: x.3 (1100, flagged by x3) is sent as
// 0011 after a positive rd6, and the neutral 4-bit codes of K28 (K28.1, .2,
// .5, .6) are sent complemented after a negative rd6, which is what keeps the
// comma of K28.1/5/7 and the run length of K28.x within the rules. Neutral
// forced codes leave the disparity unchanged. Purely combinational.
module disp_check4
  import enc8b10b_pkg::*;
(
  input  rd_e  rd6,
  input  rd_e  cur_rd4,
  input  logic kin,
  input  logic x3,
  output logic compls4,
  output rd_e  next_rd
);

  disp_dec_t dec;

  always_comb begin
    dec = disp_decide(rd6, cur_rd4);
    if (x3 && rd6 == RD_POS) begin
      dec.compls  = 1'b1;
      dec.next_rd = rd6;
    end else if (kin && !x3 && cur_rd4 == RD_ZERO && rd6 == RD_NEG) begin
      dec.compls  = 1'b1;
      dec.next_rd = rd6;
    end
  end

  assign compls4 = dec.compls;
  assign next_rd = dec.next_rd;

endmodule
