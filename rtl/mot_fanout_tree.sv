// mot_fanout_tree: binary fan-out tree of the MoT network, rooted at one
// processing cluster.
//
// N-1 fan-out primitives (mot_fanout_node) form a complete binary tree of
// log2(N) levels. The root takes packets from the cluster; each node forwards
// a packet to its up child (destination bit 0) or down child (bit 1), reading
// the destination address most significant bit first, so leaf j receives
// exactly the packets addressed to memory module j. There is one path per
// destination and no routing decision beyond reading a bit, so packets for
// different destinations never compete for a buffer here; they only stall when
// the network behind a leaf stops taking packets.
//
// Nodes are numbered as in a heap: node k (1 <= k < N) sits on level
// floor(log2 k), feeds nodes 2k and 2k+1, and leaf j is position N+j.
// Interface: the root link (in_*, ks_out) and N leaf links (leaf_*, leaf_ks),
// all with the kill-and-switch protocol of mot_obuf.
// Timing: log2(N) cycles from the root input to a leaf output at no load.
//
// The tree shape and routing by destination bits follow the network's
// design; the heap numbering, MSB-first bit order and
// the address position (low bits of the packet) are this design's choices.
module mot_fanout_tree #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_req,
  input  logic [W-1:0] in_data,
  output logic         ks_out,
  output logic         leaf_req  [N],
  output logic [W-1:0] leaf_data [N],
  input  logic         leaf_ks   [N]
);

  localparam int unsigned LOG2N = $clog2(N);

  // link k enters node k (k < N) or is leaf k-N (k >= N)
  logic         req  [2*N];
  logic [W-1:0] data [2*N];
  logic         ks   [2*N];

  assign req[0]  = 1'b0;
  assign data[0] = '0;
  assign ks[0]   = 1'b0;

  assign req[1]  = in_req;
  assign data[1] = in_data;
  assign ks_out  = ks[1];

  for (genvar k = 1; k < N; k++) begin : g_node
    localparam int unsigned LVL = $clog2(k + 1) - 1;
    mot_fanout_node #(.W(W), .DBIT(LOG2N - 1 - LVL)) u_node (
      .clk, .rst_n,
      .in_req(req[k]), .in_data(data[k]), .ks_out(ks[k]),
      .out0_req(req[2*k]),   .out0_data(data[2*k]),   .ks0(ks[2*k]),
      .out1_req(req[2*k+1]), .out1_data(data[2*k+1]), .ks1(ks[2*k+1])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_leaf
    assign leaf_req[j]  = req[N+j];
    assign leaf_data[j] = data[N+j];
    assign ks[N+j]      = leaf_ks[j];
  end

  initial begin
    assert (N >= 2 && (1 << LOG2N) == N) else $error("N must be a power of two, at least 2");
    assert (W >= LOG2N) else $error("W must hold the destination address");
  end

endmodule
