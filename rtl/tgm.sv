// tgm -- test generation module: one node of the test-pattern tree for a
// W-bit word (block-sequential data format).
//
// The node is W test generation units side by side, one per bit line. It
// copies its input word to out_pass and applies the labelling function
// f_k(x) = x XOR ctrl to produce out_mod, where ctrl is the control word shared
// by every TGM of the same tree level. With W = 1 it is the bit-serial node.
// Timing: both outputs registered, one clock after the input.
module tgm #(
  parameter int W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_word,
  input  logic [W-1:0] ctrl,
  output logic [W-1:0] out_pass,
  output logic [W-1:0] out_mod
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    tgu u_tgu (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_bit  (in_word[i]),
      .ctrl    (ctrl[i]),
      .out_pass(out_pass[i]),
      .out_mod (out_mod[i])
    );
  end
endmodule
