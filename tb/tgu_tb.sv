// tgu_tb -- checks the test generation unit: after each clock out_pass is the
// previous input and out_mod the previous input XOR control, for random
// stimulus, and both are 0 while reset is held.
module tgu_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_bit, ctrl, out_pass, out_mod;
  int checks = 0, failures = 0;

  tgu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pi, pc;
    in_bit = 1'b1; ctrl = 1'b1;
    @(negedge clk);
    checks++;
    if (out_pass !== 1'b0 || out_mod !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      pi = 1'($urandom); pc = 1'($urandom);
      in_bit = pi; ctrl = pc;
      @(negedge clk);
      checks += 2;
      if (out_pass !== pi)      begin failures++; $display("pass %b in %b", out_pass, pi); end
      if (out_mod !== (pi ^ pc)) begin failures++; $display("mod %b in %b c %b", out_mod, pi, pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
