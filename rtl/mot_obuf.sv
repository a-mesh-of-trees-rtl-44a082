// mot_obuf: two-buffer output port with kill-and-switch flow control.
//
// Every output port of a MoT switch primitive holds two packet buffers, B0
// and B1, in the manner of a relay station. A write pointer makes consecutive
// packets land in alternate buffers and a read pointer shows them on the
// output in the same order, so the pair behaves as a two-entry FIFO.
//
// Link protocol (one direction, used on every link of the network):
//   out_req/out_data  the packet at the head of the port, valid when out_req=1.
//   ks_in             kill-and-switch from the next stage. The next stage
//                     captures out_data at a clock edge when it has room and
//                     then toggles ks. Seeing ks differ from the value last
//                     seen, the port drops ("kills") the head and "switches"
//                     the read pointer to the other buffer in the same cycle,
//                     so the next packet appears at the output at once.
// Because a capture is acknowledged one cycle later and two buffers cover that
// round trip, a chain of ports moves one packet per cycle with no combinational
// path longer than one link: the outputs depend on this port's registers and on
// ks_in, which is itself a register of the next stage.
//
// Write side: wr_en/wr_data store a packet at the clock edge; the owner may
// only write when can_write is high. can_write already counts a head packet
// that is being killed in this cycle, so a full port that is drained and
// refilled in the same cycle keeps the one-packet-per-cycle rate.
//
// The two buffers, the pointers and the ks signal follow the published
// MoT switch primitives; the toggle encoding of ks, the reset state and the
// same-cycle reuse of a freed buffer are this design's choices.
module mot_obuf #(
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  // write side (from the primitive's control)
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         can_write,
  // output link
  output logic         out_req,
  output logic [W-1:0] out_data,
  input  logic         ks_in
);

  logic [W-1:0] buf_q [2];
  logic [1:0]   full_q;
  logic         rd_q, wr_q, ks_seen_q;

  logic         kill;
  logic [1:0]   full_eff;
  logic         rd_eff;

  // A toggle on ks means the head packet was captured at the last edge.
  assign kill = ks_in != ks_seen_q;

  always_comb begin
    full_eff = full_q;
    if (kill) full_eff[rd_q] = 1'b0;
  end

  assign rd_eff    = rd_q ^ kill;
  assign out_req   = full_eff[rd_eff];
  assign out_data  = buf_q[rd_eff];
  assign can_write = !full_eff[wr_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q    <= '0;
      rd_q      <= 1'b0;
      wr_q      <= 1'b0;
      ks_seen_q <= 1'b0;
    end else begin
      logic [1:0] full_n;
      full_n    = full_eff;
      if (wr_en) full_n[wr_q] = 1'b1;
      full_q    <= full_n;
      rd_q      <= rd_eff;
      ks_seen_q <= ks_in;
      if (wr_en) wr_q <= !wr_q;
    end
  end

  // Buffer storage has no reset: a buffer is only read while its full bit is set.
  always_ff @(posedge clk) begin
    if (wr_en) buf_q[wr_q] <= wr_data;
  end

  // The next stage may only acknowledge a packet that was on the output.
  a_kill_only_when_full : assert property (@(posedge clk) disable iff (!rst_n)
    kill |-> full_q[rd_q]);
  // The owner writes only into a free buffer.
  a_write_only_when_free : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> can_write);

endmodule
