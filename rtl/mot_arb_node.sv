// mot_arb_node: arbitration (fan-in) primitive of the MoT network.
//
// Two input links, in0 and in1, compete for one two-buffer output port
// (mot_obuf, buffers B0/B1). When the port has a free buffer the control
// grants one requesting input ("select"), captures its packet at the clock
// edge and toggles that input's kill-and-switch line (ks0 or ks1). The loser
// simply keeps its packet on its link.
//
// Fairness: a priority bit names the input that wins a tie. After every grant
// it points at the input that was not granted, so an input that loses a
// conflict wins the next arbitration; with the output draining, that is the
// next cycle. When only one input requests it is granted at once.
//
// Timing: a packet captured at edge t is on the output from cycle t+1; the
// node forwards up to one packet per cycle in total.
//
// The structure (two inputs, a select mux, one double-buffered output) and
// the fairness rule follow the published MoT design; the priority-bit implementation of that rule
// and the ks toggle encoding are this design's choices.
module mot_arb_node
  import mot_pkg::*;
#(
  parameter int unsigned W = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in0_req,
  input  logic [W-1:0] in0_data,
  output logic         ks0,
  input  logic         in1_req,
  input  logic [W-1:0] in1_data,
  output logic         ks1,
  output logic         out_req,
  output logic [W-1:0] out_data,
  input  logic         ks_in,
  // observation: both inputs requested in a cycle with a free buffer
  output logic         conflict
);

  arb_sel_e     prio_q;
  arb_sel_e     select;
  logic         can_write;
  logic         grant;
  logic [W-1:0] sel_data;
  logic         ks0_q, ks1_q;

  always_comb begin
    if (in0_req && in1_req) select = prio_q;
    else if (in1_req)       select = ARB_IN1;
    else                    select = ARB_IN0;
  end

  assign grant    = (in0_req || in1_req) && can_write;
  assign conflict = in0_req && in1_req && can_write;
  assign sel_data = (select == ARB_IN1) ? in1_data : in0_data;

  mot_obuf #(.W(W)) u_port (
    .clk, .rst_n,
    .wr_en(grant), .wr_data(sel_data), .can_write,
    .out_req, .out_data, .ks_in
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prio_q <= ARB_IN0;
      ks0_q  <= 1'b0;
      ks1_q  <= 1'b0;
    end else if (grant) begin
      prio_q <= (select == ARB_IN0) ? ARB_IN1 : ARB_IN0;
      if (select == ARB_IN0) ks0_q <= !ks0_q;
      else                   ks1_q <= !ks1_q;
    end
  end
  assign ks0 = ks0_q;
  assign ks1 = ks1_q;

  // A granted input must have been requesting.
  a_grant_requested : assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> ((select == ARB_IN0) ? in0_req : in1_req));
  // Fairness: the loser of a conflict wins the next arbitration.
  // After a conflict prio_q names the loser; if it still requests at the next
  // grant, it is the one granted.
  a_fair : assert property (@(posedge clk) disable iff (!rst_n)
    conflict |=> (!grant || !((prio_q == ARB_IN0) ? in0_req : in1_req)
                  || select == prio_q));

endmodule
