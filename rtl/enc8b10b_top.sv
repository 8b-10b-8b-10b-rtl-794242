// enc8b10b_top: 8B/10B encoder built on a reduced coding table.
//
// Each clock one byte (input_8b) and a K flag (kin) are encoded into a 10-bit
// code group. The 5-bit part ABCDE and the 3-bit part FGH are first
// pre-encoded by adder-classified tables that ignore the running disparity;
// the disparity control then decides from the running disparity whether each
// sub-block goes out complemented, and the output stage registers the result
// after the XOR. Running disparity, complement and alternate-7 selection are
// thus taken out of the code tables.
//
// Interface: input_8b[7] = A ... input_8b[3] = E, input_8b[2] = F ... [0] = H
// (the bit order the byte is written in, A first); output_10b[9] = a ... [0] = j
// (abcdeifghj, the order sent on the line). rd_pos is the running disparity
// after the code group now on output_10b (1 = positive). Timing: the code
// group for the byte present at a rising clock appears on output_10b right
// after that clock (one clock of latency, one byte per clock). rst is
// asynchronous and active high; after it the running disparity is negative and
// output_10b is zero. kin with a byte that is not a valid K code gives an
// undefined code group.
//
// The block split, the port names and the A-first byte order follow the
// architecture and its published simulation; the reset behaviour, the rd_pos
// port and the flags passed between blocks (D.7, x.3, alternate 7) are this
// implementation's choices.
module enc8b10b_top
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       kin,
  input  logic [7:0] input_8b,
  output logic [9:0] output_10b,
  output logic       rd_pos
);

  logic [5:0] abcdei;
  logic [3:0] fghj;
  rd_e        cur_rd6, cur_rd4, rd_q;
  logic       d7, x3, alt7, compls6, compls4;

  pre_5b6b u_pre6 (
    .abcde   (input_8b[7:3]),
    .kin     (kin),
    .abcdei  (abcdei),
    .cur_rd6 (cur_rd6),
    .d7      (d7)
  );

  pre_3b4b u_pre4 (
    .fgh     (input_8b[2:0]),
    .alt7    (alt7),
    .fghj    (fghj),
    .cur_rd4 (cur_rd4),
    .x3      (x3)
  );

  disp_ctrl u_disp (
    .clk     (clk),
    .rst     (rst),
    .kin     (kin),
    .cur_rd6 (cur_rd6),
    .d7      (d7),
    .ei      (abcdei[1:0]),
    .cur_rd4 (cur_rd4),
    .x3      (x3),
    .compls6 (compls6),
    .compls4 (compls4),
    .alt7    (alt7),
    .rd_q    (rd_q)
  );

  out_stage u_out (
    .clk        (clk),
    .rst        (rst),
    .abcdei     (abcdei),
    .fghj       (fghj),
    .compls6    (compls6),
    .compls4    (compls4),
    .output_10b (output_10b)
  );

  assign rd_pos = (rd_q == RD_POS);

endmodule
