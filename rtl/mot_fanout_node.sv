// mot_fanout_node: fan-out switch primitive of the MoT network (one node of a
// fan-out tree).
//
// One input link and two output ports, the "up" child (out0) and the "down"
// child (out1), each a two-buffer port (mot_obuf: B00/B01 and B10/B11). The
// control steers an arriving packet by one bit of its destination address,
// bit DBIT: 0 selects out0, 1 selects out1. The packet is captured at the
// clock edge when the selected port has a free buffer; the node then toggles
// ks_out to tell the previous stage to show its next packet. If the selected
// port is full the packet waits on the input (a stall); a packet for the other
// port cannot pass it, which only matters when a fan-in tree has backed up.
//
// Timing: a packet captured at edge t is on the chosen output from cycle t+1;
// with the next stages draining, one packet per cycle passes.
//
// The structure (one input, two double-buffered outputs, routing by a
// destination bit) follows the published MoT fan-out primitive; the bit order and the ks toggle
// encoding are this design's choices.
module mot_fanout_node #(
  parameter int unsigned W    = 80,
  parameter int unsigned DBIT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  // input link
  input  logic         in_req,
  input  logic [W-1:0] in_data,
  output logic         ks_out,
  // up child
  output logic         out0_req,
  output logic [W-1:0] out0_data,
  input  logic         ks0,
  // down child
  output logic         out1_req,
  output logic [W-1:0] out1_data,
  input  logic         ks1
);

  logic       dest_bit;
  logic [1:0] can_write;
  logic [1:0] wr_en;
  logic       accept;
  logic       ks_q;

  assign dest_bit = in_data[DBIT];
  assign accept   = in_req && can_write[dest_bit];
  assign wr_en[0] = accept && !dest_bit;
  assign wr_en[1] = accept &&  dest_bit;

  mot_obuf #(.W(W)) u_port0 (
    .clk, .rst_n,
    .wr_en(wr_en[0]), .wr_data(in_data), .can_write(can_write[0]),
    .out_req(out0_req), .out_data(out0_data), .ks_in(ks0)
  );

  mot_obuf #(.W(W)) u_port1 (
    .clk, .rst_n,
    .wr_en(wr_en[1]), .wr_data(in_data), .can_write(can_write[1]),
    .out_req(out1_req), .out_data(out1_data), .ks_in(ks1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      ks_q <= 1'b0;
    else if (accept) ks_q <= !ks_q;
  end
  assign ks_out = ks_q;

endmodule
