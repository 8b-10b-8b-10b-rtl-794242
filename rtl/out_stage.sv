// out_stage: "DFF & XOR" stage that replaces the encoding switches.
//
// The pre-encoded 6-bit and 4-bit sub-blocks are XORed with their complement
// decisions (compls6 for a..i, compls4 for f..j) and the 10-bit result is
// captured in a register on the rising clock, so output_10b comes from
// flip-flops and is stable for the whole following cycle. Order of the output:
// output_10b[9] = a ... output_10b[4] = i, output_10b[3] = f ... [0] = j, the
// order the bits are sent on the line. Asynchronous active-high reset clears
// the register. Latency is one clock.
//
// Replacing the encoding switches by flip-flops and XOR gates is the
// architecture's; putting the XOR ahead of the register and the reset value
// are this implementation's choices.
module out_stage (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] abcdei,
  input  logic [3:0] fghj,
  input  logic       compls6,
  input  logic       compls4,
  output logic [9:0] output_10b
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) output_10b <= '0;
    else     output_10b <= {abcdei ^ {6{compls6}}, fghj ^ {4{compls4}}};
  end

endmodule
