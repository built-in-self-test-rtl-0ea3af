// tgu -- test generation unit: the one-bit node of the test-pattern tree.
//
// One input bit fans out to two buffered outputs. The "pass" output is the
// input itself; the "mod" output is the input XORed with the control bit that
// all TGUs of the same tree level share, so a set control bit flips the bit
// on the modified branch. The XOR gate and the two output buffers follow the
// document's TGU; reset of the buffers is this design's addition.
// Timing: both outputs are registered, one clock after the input.
module tgu (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,    // bit from the parent node
  input  logic ctrl,      // level control bit (labelling function f_k)
  output logic out_pass,  // copy of the input, one clock later
  output logic out_mod    // input XOR control, one clock later
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_pass <= 1'b0;
      out_mod  <= 1'b0;
    end else begin
      out_pass <= in_bit;
      out_mod  <= in_bit ^ ctrl;
    end
endmodule
