// test_mem_tb -- checks the test programme held by the stimulus memory and
// the response memory (8 links, 8-bit words).
//
// After a start pulse both memories are read row by row; each row is expanded
// to the 8 per-link words exactly as the tree does (init XOR the control words
// of the set index bits) and compared with the programme worked out here:
//   phase 1 (rows 0..13): straight packet (headers = index), idle row, crossed
//     packet (headers = complemented index), idle row; 6 words each: header,
//     complemented header, parity word, 3 bridging words. The response side
//     expects the packet of input d (straight) or of input d^7 (crossed) on
//     output d.
//   phase 2 (3 x 39 rows): per stage, the 38 target states of the four
//     test cycles and an idle row; the response side must show header d on
//     output d whenever the output is connected, and nothing otherwise, except
//     for the single idle clock after a blocked packet is connected.
// busy must be high for exactly the 131 rows.
module test_mem_tb;
  localparam int N = 8, B = 8, LOGN = 3, Q = 6, ROWS = 131;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic s_busy, r_busy;
  logic [B:0] s_init, r_init, s_ctrl [LOGN], r_ctrl [LOGN];
  int checks = 0, failures = 0;

  test_mem #(.N(N), .B(B), .RESP(1'b0)) dut_s (.clk, .rst_n, .start, .step(1'b1), .busy(s_busy), .init(s_init), .ctrl(s_ctrl));
  test_mem #(.N(N), .B(B), .RESP(1'b1)) dut_r (.clk, .rst_n, .start, .step(1'b1), .busy(r_busy), .init(r_init), .ctrl(r_ctrl));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq [38] = '{4, 2, 3, 1, 4, 5, 2, 0, 1, 6, 3, 0,
                   3, 6, 1, 0, 2, 5, 4, 1, 3, 2, 4, 0,
                   9, 2, 8, 3, 9, 2, 0,
                   10, 1, 7, 4, 10, 1, 0};
  // {upper active, upper wants lower, lower active, lower wants lower}
  int req [11] = '{4'b0000, 4'b0011, 4'b0010, 4'b1000, 4'b1100, 4'b1110,
                   4'b1011, 4'b1111, 4'b1010, 4'b1010, 4'b1111};
  // outputs in use per state: {lower output, upper output}
  int used [11] = '{2'b00, 2'b10, 2'b01, 2'b01, 2'b10, 2'b11,
                    2'b11, 2'b10, 2'b01, 2'b01, 2'b10};

  function automatic logic [B:0] expand(logic [B:0] i, logic [B:0] c [LOGN], int v);
    logic [B:0] w;
    w = i;
    for (int k = 0; k < LOGN; k++) if (v[k]) w ^= c[k];
    return w;
  endfunction

  function automatic logic [B-1:0] p1_word(bit crossed, int m, int v);
    logic [B-1:0] h, d;
    bit par;
    par = v[0] ^ v[1] ^ v[2];
    h = crossed ? ~B'(v) : B'(v);
    case (m)
      0: d = h;
      1: d = ~h;
      2: d = par ? 8'hff : 8'h00;
      default: for (int j = 0; j < B; j++) d[j] = ((j >> (m - 3)) & 1) ^ par;
    endcase
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!s_busy && !r_busy, "idle before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      check(s_busy && r_busy, $sformatf("busy at row %0d", r));
      for (int v = 0; v < N; v++) begin
        logic [B:0] ws, wr;
        ws = expand(s_init, s_ctrl, v);
        wr = expand(r_init, r_ctrl, v);
        if (r < 14) begin
          int pk, m;
          pk = r / 7; m = r % 7;
          if (m == 6) begin
            check(!ws[B] && !wr[B], $sformatf("row %0d link %0d idle", r, v));
          end else begin
            check(ws == {1'b1, p1_word(pk[0], m, v)}, $sformatf("stim row %0d link %0d = %h", r, v, ws));
            check(wr == {1'b1, p1_word(pk[0], m, pk ? (v ^ 7) : v)}, $sformatf("resp row %0d link %0d = %h", r, v, wr));
          end
        end else begin
          int s, e, k, q, uv, pe;
          logic [B-1:0] h;
          s = (r - 14) / 39; e = (r - 14) % 39; k = 2 - s;
          if (e == 38) begin
            check(!ws[B] && !wr[B], $sformatf("row %0d link %0d idle", r, v));
          end else begin
            q = req[seq[e]];
            h = B'(v);
            h[k] = v[k] ? q[0] : q[2];
            check(ws[B] == (v[k] ? q[1] : q[3]), $sformatf("stim valid row %0d link %0d", r, v));
            if (ws[B]) check(ws[B-1:0] == h, $sformatf("stim header row %0d link %0d = %h exp %h", r, v, ws[B-1:0], h));
            pe = (e == 0) ? 0 : seq[e-1];
            uv = used[seq[e]];
            if ((pe == 9 && seq[e] == 2) || (pe == 8 && seq[e] == 3)) uv &= 2'b10;
            if ((pe == 10 && seq[e] == 1) || (pe == 7 && seq[e] == 4)) uv &= 2'b01;
            check(wr[B] == uv[v[k]], $sformatf("resp valid row %0d link %0d (A%0d->A%0d)", r, v, pe, seq[e]));
            if (wr[B]) check(wr[B-1:0] == B'(v), $sformatf("resp data row %0d link %0d", r, v));
          end
        end
      end
      @(negedge clk);
    end
    check(!s_busy && !r_busy, "idle after the last row");
    check(s_init == '0 && r_init == '0, "outputs cleared after the last row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
