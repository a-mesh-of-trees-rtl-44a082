// mot_tb_sink: packet sink for the testbenches (a behavioural stand-in for a
// memory module's input).
//
// In each cycle it is ready with probability ready_pct percent (drawn at the
// previous edge). When ready and in_req is high it captures the packet at the
// clock edge (take is high in that cycle) and toggles ks, the
// kill-and-switch acknowledgement, so the sender shows its next packet.
module mot_tb_sink (
  input  logic         clk,
  input  logic         rst_n,
  input  int unsigned  ready_pct,
  input  logic         in_req,
  output logic         ks,
  output logic         take,
  output logic         stalled
);

  logic ready_q;

  assign take    = rst_n && in_req && ready_q;
  assign stalled = rst_n && in_req && !ready_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ks      <= 1'b0;
      ready_q <= 1'b0;
    end else begin
      if (take) ks <= !ks;
      ready_q <= $urandom_range(99) < ready_pct;
    end
  end

endmodule
