// min_net -- N x N cube-type multistage interconnection network of
// n = log2 N stages with N/2 switching elements each.
//
// Links are numbered by their index i at every stage. The SE p of stage s
// joins the two links whose indices differ only in bit k = n-1-s (upper link
// has that bit 0) and drives the output links with the same two indices, so
// the shuffle wiring of the drawing reduces to this index rule. With
// destination-tag routing, stage s reads header bit k; a packet whose header
// equals d leaves on output d. The header-bit assignment follows from the
// index rule; the registered stages are this design's choice.
// Timing: n clocks from input to output; stage_state shows every SE state.
module min_net
  import bist_pkg::*;
#(
  parameter int N = 8,
  parameter int B = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid  [N],
  input  logic [B-1:0] in_data   [N],
  output logic         out_valid [N],
  output logic [B-1:0] out_data  [N],
  output se_state_t    stage_state [$clog2(N)][N/2]
);
  localparam int LOGN = $clog2(N);

  logic         lv [LOGN+1][N];
  logic [B-1:0] ld [LOGN+1][N];

  for (genvar i = 0; i < N; i++) begin : g_io
    assign lv[0][i]   = in_valid[i];
    assign ld[0][i]   = in_data[i];
    assign out_valid[i] = lv[LOGN][i];
    assign out_data[i]  = ld[LOGN][i];
  end

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int K = LOGN - 1 - s;
    for (genvar p = 0; p < N/2; p++) begin : g_se
      localparam int I0 = ((p >> K) << (K + 1)) | (p & ((1 << K) - 1));
      localparam int I1 = I0 | (1 << K);
      logic         iv [2], ov [2];
      logic [B-1:0] id [2], od [2];
      assign iv[0] = lv[s][I0];
      assign iv[1] = lv[s][I1];
      assign id[0] = ld[s][I0];
      assign id[1] = ld[s][I1];
      se #(.B(B), .HBIT(K)) u_se (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (iv),
        .in_data  (id),
        .out_valid(ov),
        .out_data (od),
        .state    (stage_state[s][p])
      );
      assign lv[s+1][I0] = ov[0];
      assign lv[s+1][I1] = ov[1];
      assign ld[s+1][I0] = od[0];
      assign ld[s+1][I1] = od[1];
    end
  end
endmodule
