// mot_fanin_tree: binary fan-in tree of the MoT network, rooted at one memory
// module.
//
// N-1 arbitration primitives (mot_arb_node) form a complete binary tree of
// log2(N) levels. Leaf i takes the packets that processing cluster i sends to
// this module; every node merges its two children fairly, and the root hands
// the packets to the memory module. No routing decision is made: every packet
// moves toward the root. With uniform traffic each leaf carries 1/N packet per
// cycle and the root up to one packet per cycle.
//
// Nodes are numbered as in a heap: node k (1 <= k < N) merges nodes 2k (in0)
// and 2k+1 (in1); leaf i is position N+i. Interface: N leaf links (leaf_*,
// leaf_ks) and the root link (out_*, ks_in), kill-and-switch protocol as in
// mot_obuf. conflict[k] is high in a cycle in which node k had to choose
// between two requests; bit 0 has no node and is always 0. Timing: log2(N) cycles from a leaf to the root at no
// load.
//
// The tree shape follows the published MoT design; the heap
// numbering and the conflict observation output are this design's choices.
module mot_fanin_tree #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         leaf_req  [N],
  input  logic [W-1:0] leaf_data [N],
  output logic         leaf_ks   [N],
  output logic         out_req,
  output logic [W-1:0] out_data,
  input  logic         ks_in,
  output logic [N-1:0] conflict
);

  localparam int unsigned LOG2N = $clog2(N);

  // link k leaves node k (k < N) or is leaf k-N (k >= N)
  logic         req  [2*N];
  logic [W-1:0] data [2*N];
  logic         ks   [2*N];

  assign req[0]      = 1'b0;
  assign data[0]     = '0;
  assign ks[0]       = 1'b0;
  assign conflict[0] = 1'b0;

  assign out_req  = req[1];
  assign out_data = data[1];
  assign ks[1]    = ks_in;

  for (genvar k = 1; k < N; k++) begin : g_node
    mot_arb_node #(.W(W)) u_node (
      .clk, .rst_n,
      .in0_req(req[2*k]),   .in0_data(data[2*k]),   .ks0(ks[2*k]),
      .in1_req(req[2*k+1]), .in1_data(data[2*k+1]), .ks1(ks[2*k+1]),
      .out_req(req[k]), .out_data(data[k]), .ks_in(ks[k]),
      .conflict(conflict[k])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign req[N+i]   = leaf_req[i];
    assign data[N+i]  = leaf_data[i];
    assign leaf_ks[i] = ks[N+i];
  end

  initial begin
    assert (N >= 2 && (1 << LOG2N) == N) else $error("N must be a power of two, at least 2");
  end

endmodule
