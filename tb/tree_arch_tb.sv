// tree_arch_tb -- checks the label tree. Each clock a random initial label and
// random control words are applied; n clocks later leaf v must carry
// init XOR (XOR of ctrl[k] over the set bits k of v). Two instances: the
// default 8-leaf, 9-bit tree and a 16-leaf, 1-bit (bit-serial) tree. The
// labelling example of the document (start label 0, ctrl[k] = 2**k, leaf v
// gets label v) is included as the first vector.
module tree_arch_tb;
  localparam int N1 = 8,  W1 = 9, L1 = 3;
  localparam int N2 = 16, W2 = 1, L2 = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [W1-1:0] init1, ctrl1 [L1], lab1 [N1];
  logic [W2-1:0] init2, ctrl2 [L2], lab2 [N2];

  tree_arch #(.N(N1), .W(W1)) dut1 (.clk, .rst_n, .init(init1), .ctrl(ctrl1), .lab(lab1));
  tree_arch #(.N(N2), .W(W2)) dut2 (.clk, .rst_n, .init(init2), .ctrl(ctrl2), .lab(lab2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of applied vectors
  logic [W1-1:0] h_init1 [$];
  logic [W1-1:0] h_ctrl1 [$][L1];
  logic [W2-1:0] h_init2 [$];
  logic [W2-1:0] h_ctrl2 [$][L2];

  initial begin
    init1 = '0; init2 = '0;
    for (int k = 0; k < L1; k++) ctrl1[k] = '0;
    for (int k = 0; k < L2; k++) ctrl2[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      // check vectors applied L clocks ago
      if (t >= L1) begin
        logic [W1-1:0] e;
        for (int v = 0; v < N1; v++) begin
          e = h_init1[t-L1];
          for (int k = 0; k < L1; k++) if (v[k]) e ^= h_ctrl1[t-L1][k];
          checks++;
          if (lab1[v] !== e) begin failures++; $display("t%0d tree1 leaf %0d = %h exp %h", t, v, lab1[v], e); end
        end
      end
      if (t >= L2) begin
        logic [W2-1:0] e;
        for (int v = 0; v < N2; v++) begin
          e = h_init2[t-L2];
          for (int k = 0; k < L2; k++) if (v[k]) e ^= h_ctrl2[t-L2][k];
          checks++;
          if (lab2[v] !== e) begin failures++; $display("t%0d tree2 leaf %0d = %h exp %h", t, v, lab2[v], e); end
        end
      end
      if (t == 0) begin
        init1 = '0;
        for (int k = 0; k < L1; k++) ctrl1[k] = W1'(1 << k);
      end else begin
        init1 = W1'($urandom);
        for (int k = 0; k < L1; k++) ctrl1[k] = W1'($urandom);
      end
      init2 = W2'($urandom);
      for (int k = 0; k < L2; k++) ctrl2[k] = W2'($urandom);
      h_init1.push_back(init1);
      h_ctrl1.push_back(ctrl1);
      h_init2.push_back(init2);
      h_ctrl2.push_back(ctrl2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
