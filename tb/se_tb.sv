// se_tb -- checks one switching element (header bit 1, 8-bit words).
//
// Part 1 drives the request patterns of the first test phase
// (A0-A6-A0-A5-A0) and of the four cycles of the second phase, and after
// every clock compares the SE state with the state the procedure expects.
// The expected states and the request pattern of each state are tabulated
// here by hand from the state drawings, independently of the design.
// Part 2 checks the data path: words of a connected packet pass with one
// clock of delay; a blocked packet, once its output frees, gets one idle
// clock, then its stored header, then its current words.
module se_tb;
  import bist_pkg::*;
  localparam int B = 8;
  localparam int HB = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid [2];
  logic [B-1:0] in_data  [2];
  logic         out_valid[2];
  logic [B-1:0] out_data [2];
  se_state_t    state;
  int checks = 0, failures = 0;

  se #(.B(B), .HBIT(HB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected state sequence (state numbers)
  int seq [] = '{6, 0, 5, 0,
                 4, 2, 3, 1, 4, 5, 2, 0, 1, 6, 3, 0,
                 3, 6, 1, 0, 2, 5, 4, 1, 3, 2, 4, 0,
                 9, 2, 8, 3, 9, 2, 0,
                 10, 1, 7, 4, 10, 1, 0};
  // request pattern per state: {upper active, upper wants lower output,
  //                             lower active, lower wants lower output}
  int req [11] = '{4'b0000, 4'b0011, 4'b0010, 4'b1000, 4'b1100, 4'b1110,
                   4'b1011, 4'b1111, 4'b1010, 4'b1010, 4'b1111};

  function automatic logic [B-1:0] hdr(bit want, int tag);
    logic [B-1:0] h;
    h = B'(tag << 4);
    h[HB] = want;
    return h;
  endfunction

  task automatic expect_out(int y, bit v, logic [B-1:0] d, string what);
    checks++;
    if (out_valid[y] !== v || (v && out_data[y] !== d)) begin
      failures++;
      $display("FAIL %s: out%0d valid %b data %h, expected %b %h", what, y,
               out_valid[y], out_data[y], v, d);
    end
  endtask

  initial begin
    int r, prev;
    in_valid = '{1'b0, 1'b0};
    in_data  = '{8'h00, 8'h00};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (state != A0) failures++;
    prev = 0;
    foreach (seq[i]) begin
      r = req[seq[i]];
      // a request bit whose input was idle starts a packet with its header
      in_valid[0] = r[3];
      in_valid[1] = r[1];
      in_data[0]  = hdr(r[2], i);
      in_data[1]  = hdr(r[0], i + 8);
      @(negedge clk);
      checks++;
      if (state != se_state_t'(seq[i])) begin
        failures++;
        $display("FAIL step %0d: A%0d -> A%0d expected, got A%0d", i, prev, seq[i], state);
      end
      prev = seq[i];
    end
    in_valid = '{1'b0, 1'b0};
    repeat (2) @(negedge clk);

    // ---- part 2: data path ----
    // straight connection, words pass one clock later
    in_valid = '{1'b1, 1'b1};
    in_data  = '{hdr(0, 1), hdr(1, 2)};
    @(negedge clk);
    expect_out(0, 1, hdr(0, 1), "straight header u");
    expect_out(1, 1, hdr(1, 2), "straight header l");
    in_data  = '{8'h5a, 8'ha5};
    @(negedge clk);
    expect_out(0, 1, 8'h5a, "straight payload u");
    expect_out(1, 1, 8'ha5, "straight payload l");
    in_valid = '{1'b0, 1'b0};
    @(negedge clk);
    expect_out(0, 0, '0, "idle u");
    expect_out(1, 0, '0, "idle l");
    @(negedge clk);
    // contention for the upper output: lower input blocked (A9)
    in_valid = '{1'b1, 1'b1};
    in_data  = '{hdr(0, 3), hdr(0, 4)};
    @(negedge clk);
    expect_out(0, 1, hdr(0, 3), "winner header");
    expect_out(1, 0, '0, "lower output idle");
    checks++; if (state != A9) failures++;
    in_data  = '{8'h11, 8'h22};
    @(negedge clk);
    expect_out(0, 1, 8'h11, "winner payload");
    in_valid = '{1'b0, 1'b1};
    in_data  = '{8'h00, 8'h33};
    @(negedge clk);
    checks++; if (state != A2) failures++;
    expect_out(0, 0, '0, "gap after winner ends");
    in_data  = '{8'h00, 8'h44};
    @(negedge clk);
    expect_out(0, 1, hdr(0, 4), "stored header of unblocked packet");
    in_data  = '{8'h00, 8'h55};
    @(negedge clk);
    expect_out(0, 1, 8'h55, "unblocked packet payload");
    in_valid = '{1'b0, 1'b0};
    @(negedge clk);
    @(negedge clk);
    checks++; if (state != A0) failures++;
    expect_out(0, 0, '0, "idle at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
