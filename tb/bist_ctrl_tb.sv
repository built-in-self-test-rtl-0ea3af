// bist_ctrl_tb -- checks the self-test sequencer with ROWS = 20 and
// latencies 3/3. After a start pulse: stim_start and cmp_clear in the first
// clock of the run, resp_start 3 clocks later, cmp_en from clock 7 for
// 20 + 3 clocks, test_mode for the whole run, done afterwards until the next
// start; a second run must repeat the same timing.
module bist_ctrl_tb;
  localparam int ROWS = 20, LT = 3, LN = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, stim_start, resp_start, test_mode, cmp_clear, cmp_en, done;
  int checks = 0, failures = 0;

  bist_ctrl #(.ROWS(ROWS), .LAT_TREE(LT), .LAT_NET(LN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_run();
    int last;
    last = 1 + LT + LN + ROWS + LN - 1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c <= last; c++) begin
      check(stim_start == (c == 0), $sformatf("stim_start at %0d", c));
      check(cmp_clear == (c == 0), $sformatf("cmp_clear at %0d", c));
      check(resp_start == (c == LN), $sformatf("resp_start at %0d", c));
      check(cmp_en == (c >= 1 + LT + LN), $sformatf("cmp_en at %0d", c));
      check(test_mode == 1'b1, $sformatf("test_mode at %0d", c));
      check(done == 1'b0, $sformatf("done at %0d", c));
      @(negedge clk);
    end
    repeat (3) begin
      check(done && !test_mode && !cmp_en, "done after the run");
      @(negedge clk);
    end
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!done && !test_mode, "idle after reset");
    one_run();
    one_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
