// reduced_ta_tb -- checks the reduced tree.
// 1. Random vectors into an 8-leaf and a 16-leaf tree (8-bit words): for
//    header-type words, leaf v must be init XOR the header/valid controls of
//    the set bits of v (bit k only); for payload words, data line j of leaf v
//    must be init[0] XOR parity(v) XOR (bridging ? bit brsel of j : 0).
// 2. The complete self-test programme (stimulus and response memories) is
//    run through both the reduced tree and the general tree; the leaves must
//    agree on every valid word and on every valid bit.
module reduced_ta_tb;
  localparam int B = 8, LB = 3;
  localparam int N1 = 8, L1 = 3, N2 = 16, L2 = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  typedef struct {
    logic [B:0]    init;
    logic [L2-1:0] hc, vc;
    logic          payload, bridge;
    logic [LB-1:0] brsel;
  } vec_t;

  vec_t         cur;
  logic [B:0]   lab1 [N1];
  logic [B:0]   lab2 [N2];

  reduced_ta #(.N(N1), .B(B)) dut1 (.clk, .rst_n, .init(cur.init), .hc(cur.hc[L1-1:0]), .vc(cur.vc[L1-1:0]),
    .payload(cur.payload), .bridge(cur.bridge), .brsel(cur.brsel), .lab(lab1));
  reduced_ta #(.N(N2), .B(B)) dut2 (.clk, .rst_n, .init(cur.init), .hc(cur.hc), .vc(cur.vc),
    .payload(cur.payload), .bridge(cur.bridge), .brsel(cur.brsel), .lab(lab2));

  // programme path: memories feeding the general and the reduced tree
  logic start, sb, rb;
  logic [B:0] s_init, r_init, s_ctrl [L1], r_ctrl [L1];
  logic s_pl, s_br, r_pl, r_br;
  logic [LB-1:0] s_bs, r_bs;
  logic [B:0] gs [N1], gr [N1], rs [N1], rr [N1];
  logic [L1-1:0] s_hc, s_vc, r_hc, r_vc;

  test_mem #(.N(N1), .B(B), .RESP(1'b0)) m_s (.clk, .rst_n, .start, .step(1'b1), .busy(sb), .init(s_init), .ctrl(s_ctrl),
    .payload(s_pl), .bridge(s_br), .brsel(s_bs));
  test_mem #(.N(N1), .B(B), .RESP(1'b1)) m_r (.clk, .rst_n, .start, .step(1'b1), .busy(rb), .init(r_init), .ctrl(r_ctrl),
    .payload(r_pl), .bridge(r_br), .brsel(r_bs));
  always_comb
    for (int k = 0; k < L1; k++) begin
      s_hc[k] = s_ctrl[k][k]; s_vc[k] = s_ctrl[k][B];
      r_hc[k] = r_ctrl[k][k]; r_vc[k] = r_ctrl[k][B];
    end
  tree_arch  #(.N(N1), .W(B+1)) g_s (.clk, .rst_n, .init(s_init), .ctrl(s_ctrl), .lab(gs));
  tree_arch  #(.N(N1), .W(B+1)) g_r (.clk, .rst_n, .init(r_init), .ctrl(r_ctrl), .lab(gr));
  reduced_ta #(.N(N1), .B(B)) t_s (.clk, .rst_n, .init(s_init), .hc(s_hc), .vc(s_vc),
    .payload(s_pl), .bridge(s_br), .brsel(s_bs), .lab(rs));
  reduced_ta #(.N(N1), .B(B)) t_r (.clk, .rst_n, .init(r_init), .hc(r_hc), .vc(r_vc),
    .payload(r_pl), .bridge(r_br), .brsel(r_bs), .lab(rr));

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [B:0] expect_word(vec_t x, int v, int logn);
    logic [B:0] w;
    bit par;
    par = 0;
    for (int k = 0; k < logn; k++) par ^= v[k];
    w[B] = x.init[B];
    for (int k = 0; k < logn; k++) if (v[k]) w[B] ^= x.vc[k];
    if (!x.payload) begin
      w[B-1:0] = x.init[B-1:0];
      for (int k = 0; k < logn; k++) if (v[k] && x.hc[k]) w[k] ^= 1'b1;
    end else begin
      for (int j = 0; j < B; j++)
        w[j] = x.init[0] ^ par ^ (x.bridge ? j[x.brsel] : 1'b0);
    end
    return w;
  endfunction

  vec_t hist [$];
  int   npay = 0, nhdr = 0, nprog = 0;

  initial begin
    start = 1'b0;
    cur = '{init: '0, hc: '0, vc: '0, payload: 0, bridge: 0, brsel: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      if (t >= L2) begin
        vec_t x2;
        x2 = hist[t - L2];
        for (int v = 0; v < N2; v++) begin
          checks++;
          if (lab2[v] !== expect_word(x2, v, L2)) begin
            failures++;
            $display("FAIL t%0d N=16 leaf %0d = %h exp %h (payload %b)", t, v, lab2[v], expect_word(x2, v, L2), x2.payload);
          end
        end
      end
      if (t >= L1) begin
        vec_t x1;
        x1 = hist[t - L1];
        x1.hc[L2-1] = 1'b0; x1.vc[L2-1] = 1'b0;
        for (int v = 0; v < N1; v++) begin
          checks++;
          if (lab1[v] !== expect_word(x1, v, L1)) begin
            failures++;
            $display("FAIL t%0d N=8 leaf %0d = %h exp %h", t, v, lab1[v], expect_word(x1, v, L1));
          end
        end
      end
      cur.init    = (B+1)'($urandom);
      cur.hc      = L2'($urandom);
      cur.vc      = L2'($urandom);
      cur.payload = 1'($urandom);
      cur.bridge  = 1'($urandom);
      cur.brsel   = LB'($urandom_range(0, LB - 1));
      if (cur.payload) npay++; else nhdr++;
      hist.push_back(cur);
      @(negedge clk);
    end
    checks++;
    if (npay == 0 || nhdr == 0) failures++;

    // programme comparison
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (L1) @(negedge clk);
    for (int r = 0; r < 131; r++) begin
      for (int v = 0; v < N1; v++) begin
        checks += 2;
        if (rs[v][B] !== gs[v][B] || (gs[v][B] && rs[v] !== gs[v])) begin
          failures++; $display("FAIL stim row %0d leaf %0d reduced %h general %h", r, v, rs[v], gs[v]);
        end
        if (rr[v][B] !== gr[v][B] || (gr[v][B] && rr[v] !== gr[v])) begin
          failures++; $display("FAIL resp row %0d leaf %0d reduced %h general %h", r, v, rr[v], gr[v]);
        end
        if (gs[v][B]) nprog++;
      end
      @(negedge clk);
    end
    checks++;
    if (nprog == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
