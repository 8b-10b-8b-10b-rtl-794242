// enc8b10b_pkg: types and the disparity decision shared by the encoder blocks.
//
// A disparity is kept as a three-valued enum: the sign of (ones - zeros) of a
// sub-block code, or the running disparity of the line. The running disparity
// of a real stream is never zero; the zero value exists because the decision
// table is written for three values on both sides.
//
// disp_decide() is the complement/next-disparity table of the encoder: a
// sub-block code whose own disparity has the same sign as the running
// disparity before it is sent complemented, which flips the running
// disparity; a neutral code leaves it unchanged. A zero running disparity
// never complements. The special cases (D.7, D/K.x.3, K28 neutral 4-bit
// codes) are not in this function: the disparity check blocks force them.
package enc8b10b_pkg;

  typedef enum logic [1:0] {
    RD_NEG  = 2'd0,
    RD_ZERO = 2'd1,
    RD_POS  = 2'd2
  } rd_e;

  typedef struct packed {
    logic compls;  // 1: send the pre-encoded sub-block complemented
    rd_e  next_rd; // running disparity after the sub-block
  } disp_dec_t;

  function automatic rd_e rd_flip(rd_e r);
    case (r)
      RD_NEG:  return RD_POS;
      RD_POS:  return RD_NEG;
      default: return RD_ZERO;
    endcase
  endfunction

  // Table: previous running disparity x current code disparity.
  function automatic disp_dec_t disp_decide(rd_e pre_rd, rd_e cur_rd);
    disp_dec_t d;
    d.compls  = (pre_rd != RD_ZERO) && (cur_rd == pre_rd);
    if (cur_rd == RD_ZERO)
      d.next_rd = pre_rd;
    else if (d.compls)
      d.next_rd = rd_flip(pre_rd);
    else
      d.next_rd = cur_rd;
    return d;
  endfunction

endpackage
