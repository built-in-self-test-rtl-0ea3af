// serial_tpg -- bit-serial test pattern generator: the test programme of
// test_mem sent to the N network inputs one bit per clock.
//
// In the bit-serial data format every word travels on a single wire, so the
// tree needs one test generation unit per node (tree_arch with W = 1) and the
// memories are read bit by bit. A one-hot column-select chain of W = B+1
// stages picks one bit of the current row's initial label and of each
// control word; the same chain advances the row-select chain of the memory
// every W clocks. Leaf v of the tree then carries, bit after bit, the same
// word sequence the block-sequential tree delivers in parallel: data bits 0
// to B-1 first, the packet-valid bit last.
// The one-bit tree and the row and column selection by shift-register chains
// follow the document; the bit order is this design's choice.
// Interface: pulse `start`; ser[v] is the bit for input v and `first` marks
// bit 0 of each word; both appear log2 N clocks after the column-select
// position they come from. `busy` is high while the memory is being read.
module serial_tpg #(
  parameter int N = 8,
  parameter int B = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic first,
  output logic ser [N]
);
  localparam int LOGN = $clog2(N);
  localparam int W    = B + 1;
  localparam int LB   = $clog2(B);

  logic [W-1:0] col;                 // one-hot column select
  logic [B:0]   init;
  logic [B:0]   ctrl [LOGN];
  logic         init_bit;
  logic         ctrl_bit [LOGN];
  logic         lab [N];
  logic [LOGN-1:0] first_d;
  logic         pl, br;
  logic [LB-1:0] bs;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        col <= '0;
    else if (start)    col <= W'(1);
    else if (busy)     col <= {col[W-2:0], col[W-1]};
    else               col <= '0;

  test_mem #(.N(N), .B(B), .RESP(1'b0)) u_mem (
    .clk, .rst_n, .start, .step(col[W-1]), .busy,
    .init, .ctrl, .payload(pl), .bridge(br), .brsel(bs)
  );

  always_comb begin
    init_bit = |(init & col);
    for (int k = 0; k < LOGN; k++) ctrl_bit[k] = |(ctrl[k] & col);
  end

  tree_arch #(.N(N), .W(1)) u_tree (
    .clk, .rst_n, .init(init_bit), .ctrl(ctrl_bit), .lab
  );

  // word-start marker, delayed like the tree
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) first_d <= '0;
    else        first_d <= {first_d[LOGN-2:0], busy & col[0]};

  assign first = first_d[LOGN-1];
  for (genvar v = 0; v < N; v++) begin : g_out
    assign ser[v] = lab[v];
  end
endmodule
