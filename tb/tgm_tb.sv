// tgm_tb -- checks a 9-bit test generation module: each clock a random word
// and control word go in, and one clock later out_pass must equal the word
// and out_mod the word XOR the control word.
module tgm_tb;
  localparam int W = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_word, ctrl, out_pass, out_mod;
  logic [W-1:0] pw, pc;
  int checks = 0, failures = 0;

  tgm #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_word = '0; ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pw = '0; pc = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks += 2;
        if (out_pass !== pw)      begin failures++; $display("pass %h exp %h", out_pass, pw); end
        if (out_mod !== (pw ^ pc)) begin failures++; $display("mod %h exp %h", out_mod, pw ^ pc); end
      end
      pw = W'($urandom); pc = W'($urandom);
      in_word = pw; ctrl = pc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
