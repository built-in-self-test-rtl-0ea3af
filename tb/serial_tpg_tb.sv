// serial_tpg_tb -- checks the bit-serial generator (8 inputs, 8-bit words).
// After a start pulse the serial streams are cut into 9-bit words at the
// `first` marks and every word of all 131 rows is compared with the test
// programme worked out here: phase-1 packets (header, complement, parity
// word, bridging words; straight then crossed headers) and the phase-2
// request patterns of every stage. The word rate must be one per 9 clocks.
module serial_tpg_tb;
  localparam int N = 8, B = 8, W = 9, ROWS = 131;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, first;
  logic ser [N];
  int checks = 0, failures = 0;

  serial_tpg #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq [38] = '{4, 2, 3, 1, 4, 5, 2, 0, 1, 6, 3, 0,
                   3, 6, 1, 0, 2, 5, 4, 1, 3, 2, 4, 0,
                   9, 2, 8, 3, 9, 2, 0,
                   10, 1, 7, 4, 10, 1, 0};
  int req [11] = '{4'b0000, 4'b0011, 4'b0010, 4'b1000, 4'b1100, 4'b1110,
                   4'b1011, 4'b1111, 4'b1010, 4'b1010, 4'b1111};

  function automatic logic [W-1:0] expected(int r, int v);
    logic [B-1:0] h, d;
    bit par;
    par = v[0] ^ v[1] ^ v[2];
    if (r < 14) begin
      int pk, m;
      pk = r / 7; m = r % 7;
      if (m == 6) return '0;
      h = pk ? ~B'(v) : B'(v);
      case (m)
        0: d = h;
        1: d = ~h;
        2: d = par ? 8'hff : 8'h00;
        default: for (int j = 0; j < B; j++) d[j] = ((j >> (m - 3)) & 1) ^ par;
      endcase
      return {1'b1, d};
    end else begin
      int s, e, k, q;
      s = (r - 14) / 39; e = (r - 14) % 39; k = 2 - s;
      if (e == 38) return '0;
      q = req[seq[e]];
      h = B'(v);
      h[k] = v[k] ? q[0] : q[2];
      return {1'(v[k] ? q[1] : q[3]), h};
    end
  endfunction

  initial begin
    logic [W-1:0] word [N];
    int nwords, bitpos, t_first, t_prev;
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    nwords = 0; bitpos = -1; t_prev = -1; t_first = 0;
    for (int t = 0; t < ROWS * W + 20; t++) begin
      if (first) begin
        if (t_prev >= 0) begin
          checks++;
          if (t - t_prev != W) begin failures++; $display("FAIL word spacing %0d", t - t_prev); end
        end
        t_prev = t;
        bitpos = 0;
      end
      if (bitpos >= 0 && bitpos < W) begin
        for (int v = 0; v < N; v++) word[v][bitpos] = ser[v];
        bitpos++;
        if (bitpos == W) begin
          for (int v = 0; v < N; v++) begin
            logic [W-1:0] e;
            e = expected(nwords, v);
            checks++;
            if (word[v][B] !== e[B] || (e[B] && word[v] !== e)) begin
              failures++;
              $display("FAIL row %0d input %0d: %h expected %h", nwords, v, word[v], e);
            end
          end
          nwords++;
          bitpos = -1;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nwords != ROWS) begin failures++; $display("FAIL %0d words", nwords); end
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
