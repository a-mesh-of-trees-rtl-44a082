// mot_pipe_node: pipeline primitive of the MoT network.
//
// Cuts a long wire into two shorter segments. It is a single two-buffer port
// (mot_obuf, buffers B0/B1): a packet on the input is captured at the clock
// edge whenever a buffer is free, and ks_out is toggled to acknowledge it to
// the previous stage. ks_in from the next stage releases the head packet.
//
// Timing: one cycle from input to output; one packet per cycle when the next
// stage drains. In this network one pipeline primitive sits at every leaf,
// on the wire from a fan-out tree leaf to a fan-in tree leaf.
//
// The structure follows the published MoT pipeline primitive; the ks toggle encoding is this design's
// choice (see mot_obuf).
module mot_pipe_node #(
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_req,
  input  logic [W-1:0] in_data,
  output logic         ks_out,
  output logic         out_req,
  output logic [W-1:0] out_data,
  input  logic         ks_in
);

  logic can_write;
  logic accept;
  logic ks_q;

  assign accept = in_req && can_write;

  mot_obuf #(.W(W)) u_port (
    .clk, .rst_n,
    .wr_en(accept), .wr_data(in_data), .can_write,
    .out_req, .out_data, .ks_in
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      ks_q <= 1'b0;
    else if (accept) ks_q <= !ks_q;
  end
  assign ks_out = ks_q;

endmodule
