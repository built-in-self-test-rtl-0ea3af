// reduced_ta -- reduced tree architecture for the block-sequential data
// format: the same N-leaf tree as tree_arch, but with XOR units only on the
// bit lines the test procedure actually changes.
//
// Every word the self test sends is of one of two kinds.
// * Header-type words (routing header, complemented header, the repeated
//   headers of phase 2): at the level of cube dimension k only bit line k can
//   differ between the two children, so each TGM has one header TGU on line k
//   with a one-bit control hc[k]; the other data lines are plain buffers.
// * Payload words (payload = 1): the all-0/all-1 parity word and the bridging
//   words. Their value depends on the parity of the link index and, within a
//   word, on the bit-line index. Until the last LB = clog2(B) levels the
//   parity is carried on bit line 0 only, flipped on every modified branch
//   (type-1 TGU). Level r of the last LB levels copies every populated line j
//   to line j + 2**(LB-1-r), inverting the copy when the word is bridging word
//   brsel = LB-1-r (type-2 TGU with its overwrite switch), so after the last
//   level line j carries bit brsel of j (bridging word) or 0 (parity word),
//   XOR the parity of the leaf index. On all populated lines the modified
//   branch flips the value (type-1 TGUs).
// The valid line has one TGU per TGM with control vc[k].
// The document describes the header TGU, the two TGU kinds and their
// placement in the last clog2(B) levels; the exact gating above is this
// design's own reading of that description. Requires log2 N >= clog2(B).
// Timing: controls are skewed per level as in tree_arch; leaves appear
// log2 N clocks after init.
module reduced_ta #(
  parameter int N = 8,
  parameter int B = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [B:0]           init,     // {valid, data} of leaf 0
  input  logic [$clog2(N)-1:0] hc,       // header-line control per dimension k
  input  logic [$clog2(N)-1:0] vc,       // valid-line control per dimension k
  input  logic                 payload,  // word is a parity or bridging word
  input  logic                 bridge,   // payload word is a bridging word
  input  logic [$clog2(B)-1:0] brsel,    // bit of the line index it shows
  output logic [B:0]           lab [N]
);
  localparam int LOGN = $clog2(N);
  localparam int LB   = $clog2(B);
  localparam int W    = B + 1;

  typedef struct packed {
    logic                 hc;
    logic                 vc;
    logic                 payload;
    logic                 bridge;
    logic [$clog2(B)-1:0] brsel;
  } lctrl_t;

  logic [W-1:0] node [LOGN+1][N];

  assign node[0][0] = init;
  for (genvar j = 1; j < N; j++) begin : g_root_unused
    assign node[0][j] = '0;
  end

  for (genvar L = 0; L < LOGN; L++) begin : g_level
    localparam int K = LOGN - 1 - L;
    localparam int R = L - (LOGN - LB);        // index among the last LB levels
    localparam int P = (R >= 0) ? (1 << (LB - 1 - R)) : 0;  // copy distance
    localparam int S = (R >= 0) ? 2 * P : B;   // spacing of populated lines
    lctrl_t c [L+1];
    assign c[0] = '{hc: hc[K], vc: vc[K], payload: payload, bridge: bridge, brsel: brsel};
    for (genvar i = 1; i <= L; i++) begin : g_skew
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) c[i] <= '0;
        else        c[i] <= c[i-1];
    end
    for (genvar j = (2 << L); j < N; j++) begin : g_unused
      assign node[L+1][j] = '0;
    end
    for (genvar t = 0; t < (1 << L); t++) begin : g_node
      logic [W-1:0] in_w, o_pass, o_mod;
      assign in_w = node[L][t];
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) begin
          o_pass <= '0;
          o_mod  <= '0;
        end else begin
          o_pass[B] <= in_w[B];
          o_mod[B]  <= in_w[B] ^ c[L].vc;
          for (int j = 0; j < B; j++) begin
            if (!c[L].payload) begin
              o_pass[j] <= in_w[j];
              o_mod[j]  <= in_w[j] ^ ((j == K) && c[L].hc);
            end else if (R >= 0 && (j % S) == P) begin
              // type-2 TGU: overwrite line j with a copy of line j - P
              o_pass[j] <= in_w[j-P] ^ (c[L].bridge && (int'(c[L].brsel) == LB - 1 - R));
              o_mod[j]  <= in_w[j-P] ^ (c[L].bridge && (int'(c[L].brsel) == LB - 1 - R)) ^ 1'b1;
            end else if ((j % S) == 0) begin
              // type-1 TGU on a populated line: parity flip on the modified branch
              o_pass[j] <= in_w[j];
              o_mod[j]  <= ~in_w[j];
            end else begin
              o_pass[j] <= in_w[j];
              o_mod[j]  <= in_w[j];
            end
          end
        end
      assign node[L+1][2*t]   = o_pass;
      assign node[L+1][2*t+1] = o_mod;
    end
  end

  for (genvar v = 0; v < N; v++) begin : g_out
    assign lab[v] = node[LOGN][v];
  end

  initial assert (LOGN >= LB) else $error("reduced_ta needs log2 N >= clog2(B)");
endmodule
