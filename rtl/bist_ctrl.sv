// bist_ctrl -- sequencer of the self test.
//
// A `start` pulse in idle begins a run: in the first clock the stimulus
// memory is started, LAT_NET clocks later the response memory, so that the
// fault-free words leave the response tree in the same clock as the network
// delivers the real ones. The comparison window opens 1 + LAT_TREE + LAT_NET
// clocks after the run starts and lasts ROWS + LAT_NET clocks (the programme
// plus the drain of the network). test_mode is high for the whole run and
// selects the generated stimulus at the network inputs. When the run ends,
// `done` is raised and stays high until the next start. The document names
// the parts but not their sequencing; this timing is this design's choice.
module bist_ctrl #(
  parameter int ROWS     = 131,
  parameter int LAT_TREE = 3,
  parameter int LAT_NET  = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic stim_start,
  output logic resp_start,
  output logic test_mode,
  output logic cmp_clear,
  output logic cmp_en,
  output logic done
);
  localparam int CMP_FIRST = 1 + LAT_TREE + LAT_NET;
  localparam int CMP_LAST  = CMP_FIRST + ROWS + LAT_NET - 1;
  localparam int CW        = $clog2(CMP_LAST + 2);

  typedef enum logic [1:0] {IDLE, RUN, DONE} ctrl_state_t;
  ctrl_state_t   st;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st  <= IDLE;
      cnt <= '0;
    end else begin
      unique case (st)
        IDLE, DONE:
          if (start) begin
            st  <= RUN;
            cnt <= '0;
          end
        RUN:
          if (cnt == CW'(CMP_LAST)) st <= DONE;
          else                      cnt <= cnt + 1'b1;
        default: st <= IDLE;
      endcase
    end

  assign stim_start = (st == RUN) && (cnt == '0);
  assign resp_start = (st == RUN) && (cnt == CW'(LAT_NET));
  assign cmp_clear  = (st == RUN) && (cnt == '0);
  assign cmp_en     = (st == RUN) && (cnt >= CW'(CMP_FIRST));
  assign test_mode  = (st == RUN);
  assign done       = (st == DONE);
endmodule
