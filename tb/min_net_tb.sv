// min_net_tb -- checks the 8 x 8 network.
//
// 1. For every constant c, each input v sends a 6-word packet to output
//    v ^ c (such permutations pass a cube network without conflict). Every
//    output must receive the full packet, its header n = 3 clocks after it
//    entered. For c = 0 all SEs must be straight (A6), for c = 7 all crossed
//    (A5).
// 2. Inputs 0 and 4 meet in SE 0 of stage 0 and both ask for output 0. The
//    upper input wins; after its packet, output 0 must carry a new packet
//    with header 0 whose remaining words come from input 4.
module min_net_tb;
  import bist_pkg::*;
  localparam int N = 8, B = 8, LOGN = 3, Q = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid [N];
  logic [B-1:0] in_data  [N];
  logic         out_valid[N];
  logic [B-1:0] out_data [N];
  se_state_t    stage_state [LOGN][N/2];
  int checks = 0, failures = 0;
  int cyc = 0;

  min_net #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // words seen on each output, with the clock of arrival
  logic [B-1:0] got   [N][$];
  int           first [N];
  always @(posedge clk) begin
    #1;
    for (int d = 0; d < N; d++)
      if (out_valid[d]) begin
        if (got[d].size() == 0) first[d] = cyc;
        got[d].push_back(out_data[d]);
      end
  end

  task automatic clear_got();
    for (int d = 0; d < N; d++) got[d].delete();
  endtask

  initial begin
    int t0;
    bit all6, all5;
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_data[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      clear_got();
      all6 = 1; all5 = 1;
      for (int w = 0; w < Q; w++) begin
        if (w == 0) t0 = cyc;
        for (int v = 0; v < N; v++) begin
          in_valid[v] = 1'b1;
          in_data[v]  = (w == 0) ? B'(v ^ c) : B'((w << 4) | v);
        end
        @(negedge clk);
        if (w == 4) begin
          for (int s = 0; s < LOGN; s++)
            for (int p = 0; p < N/2; p++) begin
              if (stage_state[s][p] != A6) all6 = 0;
              if (stage_state[s][p] != A5) all5 = 0;
            end
        end
      end
      for (int v = 0; v < N; v++) in_valid[v] = 1'b0;
      repeat (LOGN + 2) @(negedge clk);
      if (c == 0) check(all6, "identity: all SEs in A6");
      if (c == N - 1) check(all5, "complement: all SEs in A5");
      for (int d = 0; d < N; d++) begin
        check(got[d].size() == Q, $sformatf("c=%0d out %0d got %0d words", c, d, got[d].size()));
        if (got[d].size() == Q) begin
          check(first[d] == t0 + LOGN, $sformatf("c=%0d out %0d latency %0d", c, d, first[d] - t0));
          check(got[d][0] == B'(d), $sformatf("c=%0d out %0d header %h", c, d, got[d][0]));
          for (int w = 1; w < Q; w++)
            check(got[d][w] == B'((w << 4) | (d ^ c)), $sformatf("c=%0d out %0d word %0d", c, d, w));
        end
      end
    end

    // contention: inputs 0 and 4 both to output 0
    clear_got();
    for (int w = 0; w < Q; w++) begin
      in_valid[0] = 1'b1; in_valid[4] = 1'b1;
      in_data[0] = (w == 0) ? 8'h00 : B'((w << 4) | 0);
      in_data[4] = (w == 0) ? 8'h00 : B'((w << 4) | 4);
      @(negedge clk);
    end
    in_valid[0] = 1'b0;
    for (int w = Q; w < Q + 4; w++) begin
      in_data[4] = B'((w << 4) | 4);
      @(negedge clk);
    end
    in_valid[4] = 1'b0;
    repeat (LOGN + 3) @(negedge clk);
    // expected on output 0: input 0's packet, then header 0 and input 4's words
    check(got[0].size() >= Q + 2, $sformatf("contention: output 0 got %0d words", got[0].size()));
    if (got[0].size() >= Q + 2) begin
      check(got[0][0] == 8'h00, "contention: winner header");
      check(got[0][Q-1] == B'(((Q - 1) << 4) | 0), "contention: winner last word");
      check(got[0][Q] == 8'h00, "contention: header of the blocked packet");
      check(got[0][Q+1][3:0] == 4'h4, "contention: payload from input 4");
    end
    for (int d = 1; d < N; d++)
      check(got[d].size() == 0, $sformatf("contention: output %0d not idle", d));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
