// test_mem -- read-only label memory and control memories that drive one
// test-pattern tree, with the test programme of both test phases built in.
//
// Each row holds one initial label (label memory) and n control words, one
// per tree level / cube dimension k (control memories), all W = B+1 bits
// wide: bit B is the packet-valid line, bits B-1:0 the data word. Rows are
// selected by a one-hot shift-register chain, as the document suggests for
// its ROMs: `start` loads the first row, each clock with `step` high moves
// on by one, and after the last row the outputs are zero.
//
// Each row also carries the word kind (payload = parity or bridging word,
// bridge, brsel = bridging-word number), which the reduced tree needs.
//
// RESP = 0 gives the stimulus memory (the labels for the N network inputs),
// RESP = 1 the response memory (the fault-free labels for the N network
// outputs). A row describes per-link words w(v) that are affine in the link
// index v, so it is stored as init = w(0) and ctrl[k] = w(2**k) XOR w(0);
// the tree then rebuilds w(v) for every link.
// Programme (rows):
//   phase 1: a packet of Q = clog2(B)+3 words with headers equal to the input
//     index (all SEs straight, A6), an idle row, the same with complemented
//     headers (all SEs crossed, A5), an idle row. Words: header, complemented
//     header, all-0/all-1 word by index parity, clog2(B) bridging words
//     (bit j of bridging word m is bit m of j, inverted for odd parity).
//   phase 2: for each stage s, the 38 states of bist_pkg::P2_SEQ followed by
//     an idle row. Inputs with bit k = n-1-s equal 0 act as the upper inputs
//     of the stage-s SEs, the others as the lower inputs; every header routes
//     straight except at stage s, and every word of a packet repeats its
//     header. The fault-free outputs are found with bist_pkg::se_step().
// The test content follows the document's procedure; the word order in a
// packet, the repeated-header payload of phase 2 and the valid line carried
// as an extra bit line are this design's choices.
// Timing: with step held high, row r is on the outputs r+1 clocks after the
// start pulse.
module test_mem
  import bist_pkg::*;
#(
  parameter int N    = 8,
  parameter int B    = 8,
  parameter bit RESP = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           step,     // advance to the next row (tie high for one row per clock)
  output logic           busy,
  output logic [B:0]     init,
  output logic [B:0]     ctrl [$clog2(N)],
  // word kind, for the reduced tree (reduced_ta)
  output logic           payload,  // parity or bridging word
  output logic           bridge,   // bridging word
  output logic [$clog2(B)-1:0] brsel  // which bit of the line index it shows
);
  localparam int LOGN = $clog2(N);
  localparam int W    = B + 1;
  localparam int Q    = words_per_packet(B);
  localparam int P1   = 2 * (Q + 1);
  localparam int SEG  = P2_LEN + 1;
  localparam int ROWS = P1 + LOGN * SEG;
  localparam int LB   = $clog2(B);
  localparam int TREEW = (LOGN + 1) * W;
  localparam int ROWW = TREEW + 2 + LB;

  typedef logic [ROWW-1:0] rom_t [ROWS];

  function automatic logic [B-1:0] parity_word(int v);
    return {B{^v[LOGN-1:0]}};
  endfunction

  // Word m of a phase-1 packet sent by input v; cross = complemented headers.
  function automatic logic [W-1:0] p1_word(bit crossed, int m, int v);
    logic [B-1:0] h, d;
    h = B'(v);
    if (crossed) h = ~h;
    if (m == 0)      d = h;
    else if (m == 1) d = ~h;
    else if (m == 2) d = parity_word(v);
    else begin
      for (int j = 0; j < B; j++) d[j] = j[m-3];
      d = d ^ parity_word(v);
    end
    return {1'b1, d};
  endfunction

  // Phase-2 input word of link v, stage under test s, target state st.
  function automatic logic [W-1:0] p2_word(int s, se_state_t st, int v);
    se_req_t      q;
    int           k;
    logic         act, want;
    logic [B-1:0] h;
    q    = state_req(st);
    k    = LOGN - 1 - s;
    act  = v[k] ? q.l_act  : q.u_act;
    want = v[k] ? q.l_want : q.u_want;
    h    = B'(v);
    h[k] = want;
    return {act, h};
  endfunction

  function automatic rom_t build();
    rom_t         rom;
    logic [W-1:0] w [N];
    logic [ROWW-1:0] rw;
    se_regs_t     g;
    se_step_t     st;
    int           r, k;
    logic [1:0]   vv, hb;
    se_req_t      q;
    g = '0;
    for (int row = 0; row < ROWS; row++) begin
      for (int v = 0; v < N; v++) w[v] = '0;
      if (row < P1) begin
        int pk, m;
        pk = row / (Q + 1);
        m  = row % (Q + 1);
        if (m < Q)
          for (int v = 0; v < N; v++)
            // output d receives the packet of input d (straight) or ~d (crossed)
            w[v] = p1_word(pk[0], m, (RESP && pk == 1) ? (v ^ (N - 1)) : v);
      end else begin
        int s, e;
        r = row - P1;
        s = r / SEG;
        e = r % SEG;
        k = LOGN - 1 - s;
        if (e < P2_LEN) begin
          if (!RESP) begin
            for (int v = 0; v < N; v++) w[v] = p2_word(s, P2_SEQ[e], v);
          end else begin
            q  = state_req(P2_SEQ[e]);
            vv = {q.l_act, q.u_act};
            hb = {q.l_want, q.u_want};
            st = se_step(g, vv, hb);
            g  = st.regs;
            for (int v = 0; v < N; v++)
              w[v] = {st.ovalid[v[k]], B'(v)};
          end
        end else if (RESP) begin
          st = se_step(g, 2'b00, 2'b00);
          g  = st.regs;
        end
      end
      rw = '0;
      rw[W-1:0] = w[0];
      for (int kk = 0; kk < LOGN; kk++)
        rw[(kk+1)*W +: W] = w[1 << kk] ^ w[0];
      if (row < P1 && (row % (Q + 1)) >= 2 && (row % (Q + 1)) < Q) begin
        rw[TREEW] = 1'b1;
        if ((row % (Q + 1)) >= 3) begin
          rw[TREEW+1] = 1'b1;
          rw[TREEW+2 +: LB] = LB'((row % (Q + 1)) - 3);
        end
      end
      rom[row] = rw;
    end
    return rom;
  endfunction

  localparam rom_t ROM = build();

  logic [ROWS-1:0] sel;   // one-hot row select chain
  logic [ROWW-1:0] row_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sel <= '0;
    else if (start) sel <= ROWS'(1);
    else if (step)  sel <= sel << 1;

  always_comb begin
    row_q = '0;
    for (int i = 0; i < ROWS; i++)
      if (sel[i]) row_q = row_q | ROM[i];
  end

  assign busy = |sel;
  assign init    = row_q[W-1:0];
  assign payload = row_q[TREEW];
  assign bridge  = row_q[TREEW+1];
  assign brsel   = row_q[TREEW+2 +: LB];
  for (genvar kk = 0; kk < LOGN; kk++) begin : g_ctrl
    assign ctrl[kk] = row_q[(kk+1)*W +: W];
  end
endmodule
