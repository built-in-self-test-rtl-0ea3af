// se -- 2x2 switching element of the multistage network, destination-tag
// routing with input blocking.
//
// A packet is a run of consecutive clocks with in_valid high; its first word
// is the routing header, and bit HBIT of the header selects the upper (0) or
// lower (1) output. Two packets on one input must be separated by at least one
// idle clock. If both inputs want the same output, one of them is blocked;
// it is connected as soon as that output becomes free. The SE then sits in
// one of the eleven states A0..A10 of the document, reported on `state`.
// Control is bist_pkg::se_step(); see there for the arbitration order.
// Words of a blocked packet are dropped while it waits; when it is connected
// the output stays idle for one clock and then re-sends the stored header
// followed by the rest of the packet, so the next stage sees a proper packet
// start. Which header bit is used, the one-idle-clock framing and this
// blocked-packet behaviour are this design's choices; the document gives only
// the states and their transitions.
// Timing: one register stage; a word entering in clock t leaves in t+1.
module se
  import bist_pkg::*;
#(
  parameter int B    = 8,   // bits per data word
  parameter int HBIT = 0    // header bit inspected by this stage
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid [2],  // [0] upper input, [1] lower input
  input  logic [B-1:0] in_data  [2],
  output logic         out_valid[2],  // [0] upper output, [1] lower output
  output logic [B-1:0] out_data [2],
  output se_state_t    state
);
  se_regs_t     regs;
  logic [B-1:0] hdr [2];
  se_step_t     nxt;
  logic [1:0]   vin, hb;

  always_comb begin
    vin = {in_valid[1], in_valid[0]};
    hb  = {in_data[1][HBIT], in_data[0][HBIT]};
    nxt = se_step(regs, vin, hb);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      regs      <= '0;
      hdr       <= '{default: '0};
      out_valid <= '{default: 1'b0};
      out_data  <= '{default: '0};
    end else begin
      regs <= nxt.regs;
      for (int x = 0; x < 2; x++)
        if (in_valid[x] && !regs.act[x]) hdr[x] <= in_data[x];
      for (int y = 0; y < 2; y++) begin
        out_valid[y] <= nxt.ovalid[y];
        out_data[y]  <= nxt.ohdr[y] ? hdr[nxt.osrc[y]] : in_data[nxt.osrc[y]];
      end
    end

  assign state = se_state(regs);

  // A connected input always owns a distinct output.
  assert property (@(posedge clk) disable iff (!rst_n)
    (regs.conn == 2'b11) |-> (regs.want[0] != regs.want[1]));
endmodule
