// tb_mot_arb_node: self-checking testbench of the arbitration primitive.
//
// Two queued sources feed in0 and in1 and a sink with random readiness takes
// the output. Checked: every packet arrives once, unchanged, in order per
// input; a lone packet takes one cycle; with both inputs busy and the sink
// ready the node forwards one packet per cycle and grants the two inputs in
// turn (50 each in 100 cycles); after a conflict the losing input wins the
// next grant it requests (fairness, checked at every conflict).
module tb_mot_arb_node;
  import mot_tb_pkg::*;
  localparam int unsigned W = PW;

  logic         clk = 0, rst_n = 0;
  logic         push [2], space [2], gen_go [2];
  logic [W-1:0] push_data [2];
  logic [31:0]  backlog [2];
  logic         s_req [2], s_ks [2];
  logic [W-1:0] s_data [2];
  logic         o_req, o_ks, take, stalled, conflict;
  logic [W-1:0] o_data;
  int unsigned  ready_pct = 100;
  int unsigned  gen_pct [2];
  int unsigned  checks = 0, failures = 0, cyc = 0, got = 0;
  int unsigned  seq [2], exp_seq [2], grants [2], conflicts = 0, in_cycle = 0;
  logic         loser_valid;
  int unsigned  loser;

  for (genvar p = 0; p < 2; p++) begin : g_src
    mot_tb_source #(.W(W)) u_src (.clk, .rst_n, .push(push[p]), .push_data(push_data[p]),
      .space(space[p]), .backlog(backlog[p]), .out_req(s_req[p]), .out_data(s_data[p]),
      .ks_in(s_ks[p]));
    assign push[p]      = rst_n && gen_go[p] && space[p];
    assign push_data[p] = pkt_make(0, p, seq[p], cyc);
  end
  mot_arb_node #(.W(W)) dut (
    .clk, .rst_n,
    .in0_req(s_req[0]), .in0_data(s_data[0]), .ks0(s_ks[0]),
    .in1_req(s_req[1]), .in1_data(s_data[1]), .ks1(s_ks[1]),
    .out_req(o_req), .out_data(o_data), .ks_in(o_ks), .conflict);
  mot_tb_sink u_snk (.clk, .rst_n, .ready_pct, .in_req(o_req), .ks(o_ks), .take, .stalled);

  always #5 clk = !clk;

  // which input the node took at the last edge: the one whose ks toggled
  logic ks_prev [2];
  logic took [2];
  always_comb for (int p = 0; p < 2; p++) took[p] = s_ks[p] != ks_prev[p];

  logic req_prev [2];
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < 2; p++) begin
      gen_go[p]   <= $urandom_range(99) < gen_pct[p];
      ks_prev[p]  <= s_ks[p];
      req_prev[p] <= s_req[p];
      if (push[p]) seq[p] <= seq[p] + 1;
      if (took[p]) grants[p] <= grants[p] + 1;
    end
    if (s_req[0] && !req_prev[0] && !s_req[1]) in_cycle <= cyc;
    // fairness: the loser of the last conflict wins its next grant
    if (rst_n && loser_valid && (took[0] || took[1])) begin
      if (req_prev[loser]) begin
        checks++;
        if (!took[loser]) begin
          failures++;
          $display("FAIL cycle %0d: input %0d lost twice in a row", cyc, loser);
        end
      end
      loser_valid <= 1'b0;
    end
    // a conflict at the last edge: the input not granted is the loser
    if (rst_n && conflict_d) begin
      conflicts   <= conflicts + 1;
      loser       <= took[0] ? 1 : 0;
      loser_valid <= 1'b1;
    end
    if (take) begin
      int unsigned s;
      s = pkt_src(o_data);
      checks++;
      got++;
      if (!pkt_ok(o_data) || s > 1 || pkt_seq(o_data) != exp_seq[s] % 65536) begin
        failures++;
        $display("FAIL cycle %0d: bad packet %h", cyc, o_data);
      end else exp_seq[s] <= exp_seq[s] + 1;
    end
  end
  logic conflict_d;
  always_ff @(posedge clk) conflict_d <= rst_n && conflict;

  task automatic expect_eq(input string what, input int unsigned a, input int unsigned b);
    checks++;
    if (a != b) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, a, b);
    end
  endtask

  initial begin
    int unsigned g0, a0, a1;
    for (int p = 0; p < 2; p++) begin
      seq[p] = 0; exp_seq[p] = 0; grants[p] = 0; gen_pct[p] = 0;
    end
    loser_valid = 0;
    loser = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // lone packet latency
    @(negedge clk) gen_pct[0] = 100;
    @(negedge clk) gen_pct[0] = 0;
    wait (o_req);
    @(negedge clk);
    expect_eq("arbitration latency", cyc - in_cycle, 1);
    repeat (5) @(posedge clk);
    // both inputs saturated: one per cycle, alternating grants
    gen_pct[0] = 100; gen_pct[1] = 100;
    repeat (30) @(posedge clk);
    @(negedge clk) begin g0 = got; a0 = grants[0]; a1 = grants[1]; end
    repeat (100) @(posedge clk);
    @(negedge clk) begin
      expect_eq("packets in 100 cycles", got - g0, 100);
      expect_eq("grants to in0 in 100 cycles", grants[0] - a0, 50);
      expect_eq("grants to in1 in 100 cycles", grants[1] - a1, 50);
    end
    // random mixes
    for (int p = 0; p < 6; p++) begin
      gen_pct[0] = 20 + 15 * p;
      gen_pct[1] = 95 - 15 * p;
      ready_pct  = (p == 3) ? 10 : 100 - 8 * p;
      repeat (400) @(posedge clk);
    end
    gen_pct[0] = 0; gen_pct[1] = 0; ready_pct = 100;
    repeat (3000) @(posedge clk);
    expect_eq("all packets delivered", got, seq[0] + seq[1]);
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("FAIL: no conflict happened");
    end
    $display("conflicts: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
