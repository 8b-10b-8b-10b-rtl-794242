// disp_ctrl: modified disparity control of the reduced-table 8B/10B encoder.
//
// The pre-encoders produce codes without looking at the running disparity;
// this block alone decides, per character, whether the 6-bit and the 4-bit
// sub-block are sent complemented. It chains the 6B check (previous running
// disparity and CurRD6) into the 4B check (Kin and CurRD4) and keeps the
// running disparity at the end of the character in a register, which is the
// previous disparity of the next character one clock later.
//
// It also returns alt7 = S + K to the 3B/4B pre-encoder: the alternate-7 code
// is used for every K character and where S says a primary 7 would lengthen a
// run. compls6, compls4 and alt7 are combinational from the inputs and rd_q.
//
// Timing: rd_q updates on the rising clock that also captures the character
// in the output stage. Reset (asynchronous, active high) sets the running
// disparity negative, the usual start of an 8B/10B stream.
//
// The complement table and the two checks follow the design; passing S back to
// the pre-encoder and registering only the disparity here are this
// implementation's choices. The assertion is disabled during reset, so lint
// notes rst as used both asynchronously (by the register) and synchronously
// (by the assertion); that is intended.
module disp_ctrl
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       kin,
  input  rd_e        cur_rd6,
  input  logic       d7,
  input  logic [1:0] ei,
  input  rd_e        cur_rd4,
  input  logic       x3,
  output logic       compls6,
  output logic       compls4,
  output logic       alt7,
  output rd_e        rd_q
);

  rd_e  rd6, next_rd;
  logic s_alt;

  disp_check6 u_check6 (
    .pre_rd  (rd_q),
    .cur_rd6 (cur_rd6),
    .d7      (d7),
    .ei      (ei),
    .compls6 (compls6),
    .rd6     (rd6),
    .s_alt   (s_alt)
  );

  disp_check4 u_check4 (
    .rd6     (rd6),
    .cur_rd4 (cur_rd4),
    .kin     (kin),
    .x3      (x3),
    .compls4 (compls4),
    .next_rd (next_rd)
  );

  assign alt7 = s_alt | kin;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) rd_q <= RD_NEG;
    else     rd_q <= next_rd;
  end

  // A running disparity that starts negative can never become zero.
  a_rd_nonzero: assert property (@(posedge clk) disable iff (rst) rd_q != RD_ZERO);

endmodule
