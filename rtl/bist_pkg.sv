// bist_pkg -- types and functions shared by the switching element, the
// test memories and the testbenches of the multistage-network self test.
//
// A 2x2 switching element (SE) with destination-tag routing is always in one
// of eleven states A0..A10: which input is connected to which output, and
// which input is blocked because the other one already holds the output it
// asks for. The state follows from three pairs of registers (index 0 = upper
// input, 1 = lower input):
//   act  : a packet is in progress on the input (valid was high last cycle)
//   want : the output its header asked for (0 = upper, 1 = lower)
//   conn : the input is connected; act & ~conn means blocked
//   pend : the input has just been unblocked; its stored header goes out
//          one cycle later, after a one-cycle gap on the output
// se_step() is the next-state and output-select function of one SE. The SE
// module uses it for its control, and the response memory uses it to work
// out the fault-free network outputs of the second test phase.
//
// P2_SEQ is the state sequence of the second test phase (four cycles that
// together traverse every transition of the SE state diagram). Each entry is
// the state the SEs of the stage under test must reach after one clock;
// state_req() gives the request pattern at the SE inputs that produces it.
// The arbitration order (a connection in progress keeps its output, a
// waiting blocked input goes before a new request, the upper input before
// the lower one when both request the same free output in the same clock)
// and the gap/header rule for an unblocked packet are this design's choices.
package bist_pkg;

  typedef enum logic [3:0] {
    A0 = 4'd0, A1 = 4'd1, A2 = 4'd2, A3 = 4'd3, A4 = 4'd4, A5 = 4'd5,
    A6 = 4'd6, A7 = 4'd7, A8 = 4'd8, A9 = 4'd9, A10 = 4'd10
  } se_state_t;

  typedef struct packed {
    logic [1:0] act;
    logic [1:0] want;
    logic [1:0] conn;
    logic [1:0] pend;
  } se_regs_t;

  typedef struct packed {
    se_regs_t   regs;   // next register values
    logic [1:0] ovalid; // per output: a word goes out next cycle
    logic [1:0] osrc;   // per output: input it comes from
    logic [1:0] ohdr;   // per output: send the stored header of that input
  } se_step_t;

  // Request pattern at the two inputs of an SE.
  typedef struct packed {
    logic u_act;
    logic u_want;
    logic l_act;
    logic l_want;
  } se_req_t;

  localparam int P2_LEN = 38;

  localparam se_state_t P2_SEQ [P2_LEN] = '{
    // cycle 1
    A4, A2, A3, A1, A4, A5, A2, A0, A1, A6, A3, A0,
    // cycle 2
    A3, A6, A1, A0, A2, A5, A4, A1, A3, A2, A4, A0,
    // cycle 3 (upper output contention)
    A9, A2, A8, A3, A9, A2, A0,
    // cycle 4 (lower output contention)
    A10, A1, A7, A4, A10, A1, A0
  };

  function automatic se_step_t se_step(se_regs_t r, logic [1:0] valid, logic [1:0] hbit);
    se_step_t   s;
    logic [1:0] start, want, conn, taken, pend;
    logic       cand;
    start = valid & ~r.act;
    for (int x = 0; x < 2; x++)
      want[x] = start[x] ? hbit[x] : r.want[x];
    conn  = valid & r.act & r.conn;
    taken = '0;
    for (int x = 0; x < 2; x++)
      if (conn[x]) taken[want[x]] = 1'b1;
    // pass 0: blocked packets still waiting, pass 1: new requests
    for (int p = 0; p < 2; p++)
      for (int x = 0; x < 2; x++) begin
        cand = valid[x] && !conn[x] &&
               ((p == 0) ? (r.act[x] && !r.conn[x]) : start[x]);
        if (cand && !taken[want[x]]) begin
          conn[x]        = 1'b1;
          taken[want[x]] = 1'b1;
        end
      end
    pend     = '0;
    s.ovalid = '0;
    s.osrc   = '0;
    s.ohdr   = '0;
    for (int x = 0; x < 2; x++)
      if (conn[x]) begin
        s.osrc[want[x]] = x[0];
        if (r.act[x] && !r.conn[x]) begin
          pend[x] = 1'b1;              // just unblocked: gap cycle
        end else if (r.pend[x]) begin
          s.ovalid[want[x]] = 1'b1;    // re-send stored header
          s.ohdr[want[x]]   = 1'b1;
        end else begin
          s.ovalid[want[x]] = 1'b1;
        end
      end
    s.regs.act  = valid;
    s.regs.want = want;
    s.regs.conn = conn;
    s.regs.pend = pend;
    return s;
  endfunction

  function automatic se_state_t se_state(se_regs_t r);
    se_state_t st;
    unique case (r.act)
      2'b00: st = A0;
      2'b01: st = r.want[0] ? A4 : A3;
      2'b10: st = r.want[1] ? A1 : A2;
      default: begin
        if (r.conn == 2'b11)      st = r.want[0] ? A5 : A6;
        else if (r.conn == 2'b01) st = r.want[0] ? A10 : A9;
        else                      st = r.want[1] ? A7 : A8;
      end
    endcase
    return st;
  endfunction

  function automatic se_req_t state_req(se_state_t st);
    se_req_t q;
    unique case (st)
      A0:      q = '{u_act: 1'b0, u_want: 1'b0, l_act: 1'b0, l_want: 1'b0};
      A1:      q = '{u_act: 1'b0, u_want: 1'b0, l_act: 1'b1, l_want: 1'b1};
      A2:      q = '{u_act: 1'b0, u_want: 1'b0, l_act: 1'b1, l_want: 1'b0};
      A3:      q = '{u_act: 1'b1, u_want: 1'b0, l_act: 1'b0, l_want: 1'b0};
      A4:      q = '{u_act: 1'b1, u_want: 1'b1, l_act: 1'b0, l_want: 1'b0};
      A5:      q = '{u_act: 1'b1, u_want: 1'b1, l_act: 1'b1, l_want: 1'b0};
      A6:      q = '{u_act: 1'b1, u_want: 1'b0, l_act: 1'b1, l_want: 1'b1};
      A7, A10: q = '{u_act: 1'b1, u_want: 1'b1, l_act: 1'b1, l_want: 1'b1};
      default: q = '{u_act: 1'b1, u_want: 1'b0, l_act: 1'b1, l_want: 1'b0}; // A8, A9
    endcase
    return q;
  endfunction

  // Number of payload words per first-phase packet: header, complemented
  // header, all-0/all-1 parity word and ceil(log2 b) bridging words.
  function automatic int words_per_packet(int b);
    return $clog2(b) + 3;
  endfunction

endpackage
