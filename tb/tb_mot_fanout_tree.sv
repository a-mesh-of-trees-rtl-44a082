// tb_mot_fanout_tree: self-checking testbench of one fan-out tree (N = 8).
//
// A queued source offers packets with random destinations at the root; eight
// sinks with random readiness take the leaves. Checked: each packet reaches
// exactly the leaf of its destination, intact and in order; a lone packet
// takes log2(N) = 3 cycles; with all leaves draining the root takes one packet
// per cycle; a blocked leaf stalls the root (counted, must happen).
module tb_mot_fanout_tree;
  import mot_tb_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned W = PW;

  logic         clk = 0, rst_n = 0;
  logic         push, space, gen_go;
  logic [W-1:0] push_data;
  logic [31:0]  backlog;
  logic         s_req, s_ks, s_ks_d;
  logic [W-1:0] s_data;
  logic         l_req [N], l_ks [N], take [N], stalled [N];
  logic [W-1:0] l_data [N];
  int unsigned  ready_pct [N];
  int unsigned  checks = 0, failures = 0, cyc = 0, got = 0, sent = 0, last_take = 0;
  int unsigned  gen_pct = 0, stall_cycles = 0, gen_cycle = 0;
  int unsigned  seq [N], exp_seq [N];
  int unsigned  rnd_dest;

  mot_tb_source #(.W(W)) u_src (.clk, .rst_n, .push, .push_data, .space, .backlog,
                                .out_req(s_req), .out_data(s_data), .ks_in(s_ks));
  mot_fanout_tree #(.N(N), .W(W)) dut (
    .clk, .rst_n, .in_req(s_req), .in_data(s_data), .ks_out(s_ks),
    .leaf_req(l_req), .leaf_data(l_data), .leaf_ks(l_ks));
  for (genvar p = 0; p < N; p++) begin : g_snk
    mot_tb_sink u_snk (.clk, .rst_n, .ready_pct(ready_pct[p]), .in_req(l_req[p]),
                       .ks(l_ks[p]), .take(take[p]), .stalled(stalled[p]));
  end

  always #5 clk = !clk;

  assign push      = rst_n && gen_go && space;
  assign push_data = pkt_make(rnd_dest, 0, seq[rnd_dest], cyc);

  always_ff @(posedge clk) begin
    cyc      <= cyc + 1;
    gen_go   <= $urandom_range(99) < gen_pct;
    rnd_dest <= $urandom_range(N - 1);
    s_ks_d   <= s_ks;
    if (push) begin
      seq[rnd_dest] <= seq[rnd_dest] + 1;
      sent <= sent + 1;
    end
    if (rst_n && s_req && s_ks == s_ks_d && $past(s_req)) stall_cycles <= stall_cycles + 1;
  end

  always_ff @(posedge clk) begin
    int unsigned n;
    n = 0;
    for (int p = 0; p < N; p++) begin
      if (take[p]) begin
        checks++;
        n++;
        last_take <= cyc - pkt_ts(l_data[p]);
        if (!pkt_ok(l_data[p]) || pkt_dest(l_data[p]) != p ||
            pkt_seq(l_data[p]) != exp_seq[p] % 65536) begin
          failures++;
          $display("FAIL cycle %0d: leaf %0d got %h", cyc, p, l_data[p]);
        end else exp_seq[p] <= exp_seq[p] + 1;
      end
    end
    got <= got + n;
  end

  task automatic expect_eq(input string what, input int unsigned a, input int unsigned b);
    checks++;
    if (a != b) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, a, b);
    end
  endtask

  initial begin
    int unsigned g0;
    for (int p = 0; p < N; p++) begin ready_pct[p] = 100; seq[p] = 0; exp_seq[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // lone packet: generated, 2 cycles to the root input, log2(N) through the tree
    @(negedge clk) gen_pct = 100;
    @(negedge clk) gen_pct = 0;
    wait (got == 1);
    @(negedge clk) expect_eq("tree latency", last_take - 2, $clog2(N));
    repeat (5) @(posedge clk);
    // full rate
    gen_pct = 100;
    repeat (30) @(posedge clk);
    @(negedge clk) g0 = got;
    repeat (200) @(posedge clk);
    @(negedge clk) expect_eq("packets in 200 cycles", got - g0, 200);
    // random readiness, one leaf blocked in some phases
    for (int ph = 0; ph < 6; ph++) begin
      gen_pct = 40 + 10 * ph;
      for (int p = 0; p < N; p++) ready_pct[p] = (p == ph) ? 0 : 50 + 7 * p;
      repeat (400) @(posedge clk);
    end
    gen_pct = 0;
    for (int p = 0; p < N; p++) ready_pct[p] = 100;
    repeat (3000) @(posedge clk);
    expect_eq("all packets delivered", got, sent);
    checks++;
    if (stall_cycles == 0) begin
      failures++;
      $display("FAIL: no stall reached the root");
    end
    $display("root stall cycles: %0d", stall_cycles);
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
