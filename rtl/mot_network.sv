// mot_network: mesh-of-trees (MoT) interconnection network between N
// processing clusters (PCs, packet sources) and N memory modules (MMs,
// packet destinations) on one chip.
//
// Every PC is the root of its own binary fan-out tree (mot_fanout_tree) and
// every MM the root of its own binary fan-in tree (mot_fanin_tree). Leaf j of
// PC i's fan-out tree is wired, through one pipeline primitive
// (mot_pipe_node) that splits the long wire, to leaf i of MM j's fan-in tree.
// So there is exactly one path from each PC to each MM, of 2*log2(N)+1
// switch primitives: log2(N) fan-out nodes, the leaf pipeline stage and
// log2(N) arbitration nodes. Packets to different MMs never share a buffer;
// packets to the same MM meet only in that MM's fan-in tree, where fair
// arbitration merges them. A full fan-in tree stalls the fan-out leaves that
// feed it and, through them, the PCs.
//
// Interface, per PC i: pc_req[i]/pc_data[i] offer a packet whose low
// log2(N) bits are the destination MM; pc_ks[i] toggles each time the network
// has taken one. Per MM j: mm_req[j]/mm_data[j] present the head packet and
// the MM toggles mm_ks[j] after capturing it (the kill-and-switch protocol
// described in mot_obuf). arb_conflict[j][k] is high when node k of MM j's
// fan-in tree chose between two requests in that cycle (for observation).
//
// Timing: with no contention a packet taken at edge t is presented to its MM
// from cycle t + 2*log2(N) + 1; each port moves up to one packet per cycle.
//
// The topology, the three primitives and the hop count follow the network's
// design; N = 64 terminals and b = 80 bits per channel
// are its evaluated configuration. Placing exactly one pipeline stage per leaf
// wire is this design's choice.
module mot_network
  import mot_pkg::*;
#(
  parameter int unsigned N = MOT_N,
  parameter int unsigned W = MOT_B
) (
  input  logic         clk,
  input  logic         rst_n,
  // processing-cluster side
  input  logic         pc_req  [N],
  input  logic [W-1:0] pc_data [N],
  output logic         pc_ks   [N],
  // memory-module side
  output logic         mm_req  [N],
  output logic [W-1:0] mm_data [N],
  input  logic         mm_ks   [N],
  // observation
  output logic [N-1:0] arb_conflict [N]
);

  // [i][j]: from PC i to MM j
  logic         fo_req  [N][N];
  logic [W-1:0] fo_data [N][N];
  logic         fo_ks   [N][N];
  // [j][i]: into MM j's tree from PC i
  logic         fi_req  [N][N];
  logic [W-1:0] fi_data [N][N];
  logic         fi_ks   [N][N];

  for (genvar i = 0; i < N; i++) begin : g_pc
    mot_fanout_tree #(.N(N), .W(W)) u_fanout (
      .clk, .rst_n,
      .in_req(pc_req[i]), .in_data(pc_data[i]), .ks_out(pc_ks[i]),
      .leaf_req(fo_req[i]), .leaf_data(fo_data[i]), .leaf_ks(fo_ks[i])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      mot_pipe_node #(.W(W)) u_leaf (
        .clk, .rst_n,
        .in_req(fo_req[i][j]), .in_data(fo_data[i][j]), .ks_out(fo_ks[i][j]),
        .out_req(fi_req[j][i]), .out_data(fi_data[j][i]), .ks_in(fi_ks[j][i])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_mm
    mot_fanin_tree #(.N(N), .W(W)) u_fanin (
      .clk, .rst_n,
      .leaf_req(fi_req[j]), .leaf_data(fi_data[j]), .leaf_ks(fi_ks[j]),
      .out_req(mm_req[j]), .out_data(mm_data[j]), .ks_in(mm_ks[j]),
      .conflict(arb_conflict[j])
    );
  end

endmodule
