// mot_tb_source: packet source for the network testbenches (a behavioural
// stand-in for a processing cluster's output).
//
// The testbench pushes packets into a DEPTH-entry queue (push/push_data, only
// while space is high). The head of the queue is moved into a two-buffer
// output port (mot_obuf), which drives the link with the kill-and-switch
// protocol, so the source can offer one packet per cycle.
module mot_tb_source #(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  output logic         space,
  output logic [31:0]  backlog,
  output logic         out_req,
  output logic [W-1:0] out_data,
  input  logic         ks_in
);

  logic [W-1:0] mem [DEPTH];
  int unsigned  head, tail, count;
  logic         can_write, move;

  assign move    = count != 0 && can_write;
  assign space   = count < DEPTH;
  assign backlog = count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= 0;
      tail  <= 0;
      count <= 0;
    end else begin
      if (push) begin
        mem[tail] <= push_data;
        tail      <= (tail + 1) % DEPTH;
      end
      if (move) head <= (head + 1) % DEPTH;
      count <= count + (push ? 1 : 0) - (move ? 1 : 0);
    end
  end

  mot_obuf #(.W(W)) u_port (
    .clk, .rst_n,
    .wr_en(move), .wr_data(mem[head]), .can_write,
    .out_req, .out_data, .ks_in
  );

endmodule
