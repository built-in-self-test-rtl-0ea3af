// resp_cmp -- compares the N network outputs with the fault-free outputs
// produced by the response tree.
//
// While `en` is high, every output link is checked each clock: the valid bits
// must agree, and where a word is expected its data must agree too. Each
// disagreeing link adds one to err_count and sets the sticky `fail` flag;
// n_cmp counts the link comparisons made. `clear` resets all three. The
// document only says the outputs are compared; counting and the sticky flag
// are this design's choices.
// Timing: results registered, one clock after the compared words.
module resp_cmp #(
  parameter int N  = 8,
  parameter int B  = 8,
  parameter int CW = 16   // counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          act_valid [N],
  input  logic [B-1:0]  act_data  [N],
  input  logic [B:0]    exp_word  [N],  // {valid, data}
  output logic          fail,
  output logic [CW-1:0] err_count,
  output logic [CW-1:0] n_cmp
);
  logic [N-1:0] mism;

  always_comb
    for (int i = 0; i < N; i++)
      mism[i] = (act_valid[i] != exp_word[i][B]) ||
                (exp_word[i][B] && (act_data[i] != exp_word[i][B-1:0]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fail      <= 1'b0;
      err_count <= '0;
      n_cmp     <= '0;
    end else if (clear) begin
      fail      <= 1'b0;
      err_count <= '0;
      n_cmp     <= '0;
    end else if (en) begin
      fail      <= fail | (|mism);
      err_count <= err_count + CW'($countones(mism));
      n_cmp     <= n_cmp + CW'(N);
    end
endmodule
