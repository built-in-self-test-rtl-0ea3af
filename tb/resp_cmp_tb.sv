// resp_cmp_tb -- checks the output comparator (8 links, 8-bit words).
// Random expected words are applied with the actual outputs either equal or
// disturbed on a random set of links (wrong valid, or wrong data on a valid
// word). Data differences on links where no word is expected must be ignored.
// err_count, n_cmp and the sticky fail flag are compared with counts kept
// here; `en` low must freeze them and `clear` must reset them.
module resp_cmp_tb;
  localparam int N = 8, B = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en;
  logic         act_valid [N];
  logic [B-1:0] act_data  [N];
  logic [B:0]   exp_word  [N];
  logic         fail;
  logic [15:0]  err_count, n_cmp;
  int checks = 0, failures = 0;

  resp_cmp #(.N(N), .B(B), .CW(16)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    int errs, cmps, mode;
    bit f;
    clear = 0; en = 0;
    for (int i = 0; i < N; i++) begin act_valid[i] = 0; act_data[i] = 0; exp_word[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    errs = 0; cmps = 0; f = 0;
    for (int t = 0; t < 300; t++) begin
      en = (t % 7) != 3;
      for (int i = 0; i < N; i++) begin
        exp_word[i]  = (B+1)'($urandom);
        act_valid[i] = exp_word[i][B];
        act_data[i]  = exp_word[i][B-1:0];
        mode = (t < 20) ? 0 : $urandom_range(0, 9);
        if (mode == 1) begin
          act_valid[i] = ~act_valid[i];
          if (en) errs++;
        end else if (mode == 2) begin
          act_data[i] = act_data[i] ^ B'(1 << $urandom_range(0, B - 1));
          if (en && exp_word[i][B]) errs++;
        end
      end
      if (en) cmps += N;
      if (errs > 0) f = 1;
      @(negedge clk);
      check(err_count == 16'(errs), $sformatf("t%0d err_count %0d exp %0d", t, err_count, errs));
      check(n_cmp == 16'(cmps), $sformatf("t%0d n_cmp %0d exp %0d", t, n_cmp, cmps));
      check(fail == f, $sformatf("t%0d fail %b exp %b", t, fail, f));
      if (t == 19) check(fail == 0 && err_count == 0, "no error while outputs match");
    end
    en = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    check(fail == 0 && err_count == 0 && n_cmp == 0, "clear resets the results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
