// tb_mot_fanin_tree: self-checking testbench of one fan-in tree (N = 8).
//
// Eight queued sources feed the leaves and a sink with random readiness takes
// the root. Checked: every packet arrives once, intact and in order per leaf;
// a lone packet takes log2(N) = 3 cycles; with all leaves saturated the root
// delivers one packet per cycle and, the arbitration being fair, every leaf
// gets exactly 1/8 of them; conflicts are counted and must happen.
module tb_mot_fanin_tree;
  import mot_tb_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned W = PW;

  logic         clk = 0, rst_n = 0;
  logic         push [N], space [N], gen_go [N];
  logic [W-1:0] push_data [N];
  logic [31:0]  backlog [N];
  logic         s_req [N], s_ks [N];
  logic [W-1:0] s_data [N];
  logic         o_req, o_ks, take, stalled;
  logic [W-1:0] o_data;
  logic [N-1:0] conflict;
  int unsigned  ready_pct = 100, gen_pct = 0;
  int unsigned  checks = 0, failures = 0, cyc = 0, got = 0, conflicts = 0, last_lat = 0;
  int unsigned  seq [N], exp_seq [N], per_src [N];
  int unsigned  only_src = N;

  for (genvar p = 0; p < N; p++) begin : g_src
    mot_tb_source #(.W(W)) u_src (.clk, .rst_n, .push(push[p]), .push_data(push_data[p]),
      .space(space[p]), .backlog(backlog[p]), .out_req(s_req[p]), .out_data(s_data[p]),
      .ks_in(s_ks[p]));
    assign push[p]      = rst_n && gen_go[p] && space[p];
    assign push_data[p] = pkt_make(0, p, seq[p], cyc);
    always_ff @(posedge clk) begin
      gen_go[p] <= (only_src == N || only_src == p) && ($urandom_range(99) < gen_pct);
      if (push[p]) seq[p] <= seq[p] + 1;
    end
  end
  mot_fanin_tree #(.N(N), .W(W)) dut (
    .clk, .rst_n, .leaf_req(s_req), .leaf_data(s_data), .leaf_ks(s_ks),
    .out_req(o_req), .out_data(o_data), .ks_in(o_ks), .conflict);
  mot_tb_sink u_snk (.clk, .rst_n, .ready_pct, .in_req(o_req), .ks(o_ks), .take, .stalled);

  always #5 clk = !clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && conflict != 0) conflicts <= conflicts + $countones(conflict);
    if (take) begin
      int unsigned s;
      s = pkt_src(o_data);
      checks++;
      got <= got + 1;
      last_lat <= cyc - pkt_ts(o_data);
      if (!pkt_ok(o_data) || s >= N || pkt_seq(o_data) != exp_seq[s % N] % 65536) begin
        failures++;
        $display("FAIL cycle %0d: bad packet %h", cyc, o_data);
      end else begin
        exp_seq[s] <= exp_seq[s] + 1;
        per_src[s] <= per_src[s] + 1;
      end
    end
  end

  task automatic expect_eq(input string what, input int unsigned a, input int unsigned b);
    checks++;
    if (a != b) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, a, b);
    end
  endtask

  initial begin
    int unsigned g0, total;
    int unsigned p0 [N];
    for (int p = 0; p < N; p++) begin seq[p] = 0; exp_seq[p] = 0; per_src[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // lone packet from leaf 5
    only_src = 5;
    @(negedge clk) gen_pct = 100;
    @(negedge clk) gen_pct = 0;
    wait (got == 1);
    @(negedge clk) expect_eq("tree latency", last_lat - 2, $clog2(N));
    only_src = N;
    repeat (5) @(posedge clk);
    // saturation: one per cycle, equal shares
    gen_pct = 100;
    repeat (50) @(posedge clk);
    @(negedge clk) begin g0 = got; for (int p = 0; p < N; p++) p0[p] = per_src[p]; end
    repeat (400) @(posedge clk);
    @(negedge clk) begin
      expect_eq("packets in 400 cycles", got - g0, 400);
      for (int p = 0; p < N; p++)
        expect_eq($sformatf("share of leaf %0d in 400 cycles", p), per_src[p] - p0[p], 50);
    end
    // random mixes with backpressure
    for (int ph = 0; ph < 5; ph++) begin
      gen_pct = 3 + 5 * ph;
      ready_pct = 100 - 15 * ph;
      repeat (500) @(posedge clk);
    end
    gen_pct = 0; ready_pct = 100;
    repeat (6000) @(posedge clk);
    total = 0;
    for (int p = 0; p < N; p++) total += seq[p];
    expect_eq("all packets delivered", got, total);
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
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
