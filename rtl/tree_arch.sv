// tree_arch -- tree architecture that expands one initial label into the N
// labels of all network inputs (the dependence graph of the labelling
// algorithm on the binary n-cube, built in hardware).
//
// Level L (0 = root) holds 2**L TGMs and realises the labelling function of
// cube dimension k = n-1-L: the pass branch keeps bit k of the link index at
// 0, the modified branch sets it to 1. Leaf v therefore carries
//   lab(v) = init XOR (XOR over all k with v[k] = 1 of ctrl[k]),
// i.e. the label every node v of the n-cube receives. The tree has N-1 TGMs;
// one control word per level drives all of that level's TGMs, as in the
// document. The skew registers that delay the control word of level L by L
// clocks, so that one memory row describes one test word, are this design's
// choice.
// Interface: init and ctrl[k] (indexed by cube dimension k) are presented
// together; lab[v] appears n clocks later.
module tree_arch #(
  parameter int N = 8,
  parameter int W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] init,
  input  logic [W-1:0] ctrl [$clog2(N)],
  output logic [W-1:0] lab  [N]
);
  localparam int LOGN = $clog2(N);

  // node[L][j]: input of TGM j of level L; node[LOGN][v]: leaf v
  logic [W-1:0] node  [LOGN+1][N];
  assign node[0][0] = init;
  for (genvar j = 1; j < N; j++) begin : g_root_unused
    assign node[0][j] = '0;
  end

  for (genvar L = 0; L < LOGN; L++) begin : g_level
    localparam int K = LOGN - 1 - L;
    // ctrl_d[i]: control word of this level delayed by i clocks
    logic [W-1:0] ctrl_d [L+1];
    assign ctrl_d[0] = ctrl[K];
    for (genvar i = 1; i <= L; i++) begin : g_skew
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) ctrl_d[i] <= '0;
        else        ctrl_d[i] <= ctrl_d[i-1];
    end
    for (genvar j = (2 << L); j < N; j++) begin : g_unused
      assign node[L+1][j] = '0;
    end
    for (genvar j = 0; j < (1 << L); j++) begin : g_node
      tgm #(.W(W)) u_tgm (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_word (node[L][j]),
        .ctrl    (ctrl_d[L]),
        .out_pass(node[L+1][2*j]),
        .out_mod (node[L+1][2*j+1])
      );
    end
  end

  for (genvar v = 0; v < N; v++) begin : g_out
    assign lab[v] = node[LOGN][v];
  end
endmodule
