// min_bist_top -- N x N multistage interconnection network with its built-in
// self test.
//
// A stimulus tree fed by a test_mem produces, every clock, one word for each
// of the N network inputs from a single memory row of n+1 words. With
// REDUCED = 1 (default) the trees are reduced_ta, which carries XOR units only
// on the bit lines the test procedure changes and builds the parity and
// bridging words from word-kind flags; with REDUCED = 0 they are the general
// tree_arch, one XOR unit per bit line. An identical response tree with its own memory produces the words
// the fault-free network must deliver on its N outputs, and resp_cmp checks
// the real outputs against them. bist_ctrl starts both memories and opens
// the comparison window. Outside a test run the network carries the
// external traffic on in_valid/in_data; during a run (bist_busy high) it is
// fed by the stimulus tree and the external inputs are ignored.
// Interface: pulse bist_start for one clock; bist_done rises when the run
// ends, with bist_pass = 1 if no word differed and bist_errors the number of
// differing output words. Network latency is n clocks; a full run takes
// ROWS + 3n + 2 clocks (ROWS = 2(Q+1) + 39n, Q = clog2(B)+3).
// serial_tpg, the bit-serial form of the stimulus generator, stands beside
// the network with its own ports (ser_*): it sends the same programme one bit
// per clock per input, for networks with bit-serial links.
// The structure follows the document; the sequencing and the memory content
// layout are this design's choices.
module min_bist_top
  import bist_pkg::*;
#(
  parameter int N       = 8,
  parameter int B       = 8,
  parameter bit REDUCED = 1'b1   // 1: reduced trees (reduced_ta), 0: general trees (tree_arch)
) (
  input  logic         clk,
  input  logic         rst_n,
  // network traffic
  input  logic         in_valid  [N],
  input  logic [B-1:0] in_data   [N],
  output logic         out_valid [N],
  output logic [B-1:0] out_data  [N],
  output se_state_t    stage_state [$clog2(N)][N/2],
  // self test
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_done,
  output logic         bist_pass,
  output logic [15:0]  bist_errors,
  // bit-serial test pattern generator (the same programme, one bit per clock)
  input  logic         ser_start,
  output logic         ser_busy,
  output logic         ser_first,
  output logic         ser_out [N]
);
  localparam int LOGN = $clog2(N);
  localparam int W    = B + 1;
  localparam int Q    = words_per_packet(B);
  localparam int ROWS = 2 * (Q + 1) + LOGN * (P2_LEN + 1);

  logic stim_start, resp_start, test_mode, cmp_clear, cmp_en;
  logic stim_busy, resp_busy;
  logic fail;
  logic [15:0] n_cmp;

  logic [W-1:0] stim_init, resp_init;
  logic         stim_pl, stim_br, resp_pl, resp_br;
  logic [$clog2(B)-1:0] stim_bs, resp_bs;
  logic [W-1:0] stim_ctrl [LOGN];
  logic [W-1:0] resp_ctrl [LOGN];
  logic [W-1:0] stim_lab  [N];
  logic [W-1:0] resp_lab  [N];

  logic         net_valid [N];
  logic [B-1:0] net_data  [N];

  bist_ctrl #(.ROWS(ROWS), .LAT_TREE(LOGN), .LAT_NET(LOGN)) u_ctrl (
    .clk, .rst_n, .start(bist_start), .stim_start, .resp_start,
    .test_mode, .cmp_clear, .cmp_en, .done(bist_done)
  );

  test_mem #(.N(N), .B(B), .RESP(1'b0)) u_stim_mem (
    .clk, .rst_n, .start(stim_start), .step(1'b1), .busy(stim_busy),
    .init(stim_init), .ctrl(stim_ctrl),
    .payload(stim_pl), .bridge(stim_br), .brsel(stim_bs)
  );

  test_mem #(.N(N), .B(B), .RESP(1'b1)) u_resp_mem (
    .clk, .rst_n, .start(resp_start), .step(1'b1), .busy(resp_busy),
    .init(resp_init), .ctrl(resp_ctrl),
    .payload(resp_pl), .bridge(resp_br), .brsel(resp_bs)
  );

  if (REDUCED) begin : g_reduced
    // only the header line and the valid line of each level's control word
    // are needed; payload words are built from the word-kind flags
    logic [LOGN-1:0] s_hc, s_vc, r_hc, r_vc;
    for (genvar k = 0; k < LOGN; k++) begin : g_c
      assign s_hc[k] = stim_ctrl[k][k];
      assign s_vc[k] = stim_ctrl[k][B];
      assign r_hc[k] = resp_ctrl[k][k];
      assign r_vc[k] = resp_ctrl[k][B];
    end
    reduced_ta #(.N(N), .B(B)) u_stim_tree (
      .clk, .rst_n, .init(stim_init), .hc(s_hc), .vc(s_vc),
      .payload(stim_pl), .bridge(stim_br), .brsel(stim_bs), .lab(stim_lab)
    );
    reduced_ta #(.N(N), .B(B)) u_resp_tree (
      .clk, .rst_n, .init(resp_init), .hc(r_hc), .vc(r_vc),
      .payload(resp_pl), .bridge(resp_br), .brsel(resp_bs), .lab(resp_lab)
    );
  end else begin : g_general
    tree_arch #(.N(N), .W(W)) u_stim_tree (
      .clk, .rst_n, .init(stim_init), .ctrl(stim_ctrl), .lab(stim_lab)
    );
    tree_arch #(.N(N), .W(W)) u_resp_tree (
      .clk, .rst_n, .init(resp_init), .ctrl(resp_ctrl), .lab(resp_lab)
    );
  end

  always_comb
    for (int i = 0; i < N; i++) begin
      net_valid[i] = test_mode ? stim_lab[i][B]     : in_valid[i];
      net_data[i]  = test_mode ? stim_lab[i][B-1:0] : in_data[i];
    end

  min_net #(.N(N), .B(B)) u_net (
    .clk, .rst_n, .in_valid(net_valid), .in_data(net_data),
    .out_valid, .out_data, .stage_state
  );

  resp_cmp #(.N(N), .B(B), .CW(16)) u_cmp (
    .clk, .rst_n, .clear(cmp_clear), .en(cmp_en),
    .act_valid(out_valid), .act_data(out_data), .exp_word(resp_lab),
    .fail, .err_count(bist_errors), .n_cmp
  );

  serial_tpg #(.N(N), .B(B)) u_serial (
    .clk, .rst_n, .start(ser_start), .busy(ser_busy), .first(ser_first), .ser(ser_out)
  );

  assign bist_busy = test_mode | stim_busy | resp_busy;
  assign bist_pass = bist_done & ~fail & (n_cmp != '0);
endmodule
