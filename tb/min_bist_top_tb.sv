// min_bist_top_tb -- end-to-end test of the network with its self test, at
// the default size (N = 8 links, 8-bit words).
//
// 1. Normal mode: packets routed by XOR-with-constant permutations (which a
//    cube network passes without conflict) must arrive complete on output
//    v ^ c after n clocks.
// 2. Self test on the fault-free network: must pass, with zero differing
//    words, in the expected number of clocks. Meanwhile the SE states are
//    sampled: every stage must go through all eleven states, all SEs must be
//    straight (A6) and crossed (A5) together once each, and blocked states
//    (A7..A10) must occur.
// 3. Self test with a stuck-at-1 data bit forced on an inner link, then with
//    the valid line of an inner link stuck at 0: must fail.
// 4. Self test again after release: must pass, and normal traffic must flow.
// 5. The bit-serial generator beside the network must send its 131 words.
module min_bist_top_tb;
  import bist_pkg::*;
  localparam int N    = 8;
  localparam int B    = 8;
  localparam int LOGN = 3;
  localparam int Q    = 6;                        // clog2(8)+3
  localparam int ROWS = 2 * (Q + 1) + LOGN * 39;  // 131
  localparam int RUN_CLOCKS = ROWS + 3 * LOGN + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid [N];
  logic [B-1:0] in_data  [N];
  logic         out_valid[N];
  logic [B-1:0] out_data [N];
  se_state_t    stage_state [LOGN][N/2];
  logic bist_start, bist_busy, bist_done, bist_pass;
  logic [15:0] bist_errors;
  logic ser_start, ser_busy, ser_first;
  logic ser_out [N];
  int   ser_words = 0, ser_ones = 0;
  always @(posedge clk) begin
    if (ser_first) ser_words++;
    for (int v = 0; v < N; v++) if (ser_out[v]) ser_ones++;
  end

  int checks = 0, failures = 0;
  int cyc = 0;

  min_bist_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- state coverage monitor ----
  bit seen [LOGN][11];
  int all_a6 = 0, all_a5 = 0, blocked = 0, mode_switch = 0;
  bit monitor_on = 0;
  always @(posedge clk) if (monitor_on) begin
    bit a6, a5;
    a6 = 1; a5 = 1;
    for (int s = 0; s < LOGN; s++)
      for (int p = 0; p < N/2; p++) begin
        seen[s][stage_state[s][p]] = 1;
        if (stage_state[s][p] != A6) a6 = 0;
        if (stage_state[s][p] != A5) a5 = 0;
        if (stage_state[s][p] inside {A7, A8, A9, A10}) blocked++;
      end
    if (a6) all_a6++;
    if (a5) all_a5++;
  end

  // ---- normal-mode traffic ----
  task automatic send_perm(int c);
    logic [B-1:0] got [N][Q];
    int           cnt [N];
    for (int i = 0; i < N; i++) cnt[i] = 0;
    fork
      begin
        for (int w = 0; w < Q; w++) begin
          @(negedge clk);
          for (int v = 0; v < N; v++) begin
            in_valid[v] = 1'b1;
            in_data[v]  = (w == 0) ? B'(v ^ c) : B'(16 * w + v);
          end
        end
        @(negedge clk);
        for (int v = 0; v < N; v++) in_valid[v] = 1'b0;
      end
      begin
        repeat (Q + LOGN + 4) begin
          @(posedge clk);
          #1;
          for (int d = 0; d < N; d++)
            if (out_valid[d] && cnt[d] < Q) begin
              got[d][cnt[d]] = out_data[d];
              cnt[d]++;
            end
        end
      end
    join
    for (int d = 0; d < N; d++) begin
      int v;
      v = d ^ c;
      check(cnt[d] == Q, $sformatf("perm %0d: output %0d got %0d words", c, d, cnt[d]));
      check(got[d][0] == B'(d), $sformatf("perm %0d: output %0d header %h", c, d, got[d][0]));
      for (int w = 1; w < Q; w++)
        check(got[d][w] == B'(16 * w + v),
              $sformatf("perm %0d: output %0d word %0d = %h", c, d, w, got[d][w]));
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic run_bist(output bit pass, output int errors, output int clocks);
    int t0;
    @(negedge clk);
    bist_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    bist_start = 1'b0;
    check(bist_busy == 1'b1, "busy during the run");
    if (bist_busy) mode_switch++;
    wait (bist_done == 1'b1);
    clocks = cyc - t0;
    @(negedge clk);
    pass   = bist_pass;
    errors = bist_errors;
  endtask

  initial begin
    bit pass;
    int errors, clocks;
    bist_start = 1'b0;
    ser_start  = 1'b0;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      in_data[i]  = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. normal mode
    send_perm(0);
    send_perm(7);
    send_perm(5);

    // 2. fault-free self test with state monitor
    monitor_on = 1;
    run_bist(pass, errors, clocks);
    monitor_on = 0;
    check(pass == 1'b1, "fault-free self test passes");
    check(errors == 0, $sformatf("fault-free errors = %0d", errors));
    check(clocks == RUN_CLOCKS, $sformatf("run took %0d clocks, expected %0d", clocks, RUN_CLOCKS));
    for (int s = 0; s < LOGN; s++)
      for (int a = 0; a < 11; a++)
        check(seen[s][a], $sformatf("stage %0d never in state A%0d", s, a));
    check(all_a6 > 0, "all SEs straight (A6) together");
    check(all_a5 > 0, "all SEs crossed (A5) together");
    check(blocked > 0, "blocking occurred");
    $display("mechanisms: all_A6=%0d all_A5=%0d blocked_SE_clocks=%0d mode_switch=%0d",
             all_a6, all_a5, blocked, mode_switch);

    // 3. faulty network: stuck-at-1 data bit on a link between stage 0 and 1
    force dut.u_net.ld[1][3][5] = 1'b1;
    run_bist(pass, errors, clocks);
    release dut.u_net.ld[1][3][5];
    check(pass == 1'b0, "stuck-at-1 data bit detected");
    check(errors > 0, $sformatf("stuck-at errors = %0d", errors));
    $display("stuck-at-1 data: %0d differing words", errors);

    // valid line of a link between stage 1 and 2 stuck at 0
    force dut.u_net.lv[2][6] = 1'b0;
    run_bist(pass, errors, clocks);
    release dut.u_net.lv[2][6];
    check(pass == 1'b0, "stuck-at-0 valid line detected");
    $display("stuck-at-0 valid: %0d differing words", errors);

    // bit-serial generator beside the network: 131 words of 9 bits
    @(negedge clk);
    ser_start = 1'b1;
    @(negedge clk);
    ser_start = 1'b0;
    check(ser_busy == 1'b1, "bit-serial generator running");
    wait (ser_busy == 1'b0);
    repeat (6) @(negedge clk);
    check(ser_words == 131, $sformatf("bit-serial words %0d, expected 131", ser_words));
    check(ser_ones > 0, "bit-serial streams carry data");
    $display("bit-serial: %0d words, %0d one-bits", ser_words, ser_ones);

    // 4. after repair
    run_bist(pass, errors, clocks);
    check(pass == 1'b1, "self test passes again after release");
    send_perm(3);
    check(mode_switch == 4, "mode switched to test and back four times");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
