// tb_mot_fanout_node: self-checking testbench of the fan-out primitive.
//
// The node under test routes on destination bit 1 (DBIT = 1). A queued source
// sends packets with random destinations; two sinks with random readiness
// take the up (out0) and down (out1) outputs. Checked: every packet leaves on
// the port its destination bit selects, once, unchanged and in order; a lone
// packet takes one cycle; with both sinks ready one packet passes per cycle;
// a full port stalls the input (counted, and must happen).
module tb_mot_fanout_node;
  import mot_tb_pkg::*;
  localparam int unsigned W = PW;
  localparam int unsigned DBIT = 1;

  logic         clk = 0, rst_n = 0;
  logic         push, space, gen_go;
  logic [W-1:0] push_data;
  logic [31:0]  backlog;
  logic         s_req, s_ks;
  logic [W-1:0] s_data;
  logic         o_req [2], o_ks [2], take [2], stalled [2];
  logic [W-1:0] o_data [2];
  int unsigned  ready_pct [2];
  int unsigned  checks = 0, failures = 0, cyc = 0, seq = 0, got = 0, sent = 0;
  int unsigned  gen_pct = 0, stall_cycles = 0, in_cycle = 0;
  logic [W-1:0] expq [2][$];
  logic [1:0]   dest_q;

  mot_tb_source #(.W(W)) u_src (.clk, .rst_n, .push, .push_data, .space, .backlog,
                                .out_req(s_req), .out_data(s_data), .ks_in(s_ks));
  mot_fanout_node #(.W(W), .DBIT(DBIT)) dut (
    .clk, .rst_n, .in_req(s_req), .in_data(s_data), .ks_out(s_ks),
    .out0_req(o_req[0]), .out0_data(o_data[0]), .ks0(o_ks[0]),
    .out1_req(o_req[1]), .out1_data(o_data[1]), .ks1(o_ks[1]));
  for (genvar p = 0; p < 2; p++) begin : g_snk
    mot_tb_sink u_snk (.clk, .rst_n, .ready_pct(ready_pct[p]), .in_req(o_req[p]),
                       .ks(o_ks[p]), .take(take[p]), .stalled(stalled[p]));
  end

  always #5 clk = !clk;

  assign push      = rst_n && gen_go && space;
  assign push_data = pkt_make(dest_q, 0, seq, cyc);

  logic s_ks_d;
  always_ff @(posedge clk) begin
    cyc    <= cyc + 1;
    gen_go <= $urandom_range(99) < gen_pct;
    dest_q <= 2'($urandom);
    s_ks_d <= s_ks;
    if (push) begin
      seq <= seq + 1;
      expq[push_data[DBIT]].push_back(push_data);
      sent <= sent + 1;
    end
    if (s_req && s_ks == s_ks_d && !$past(s_req)) in_cycle <= cyc;
    // input waiting while the node does not take it
    if (rst_n && s_req && s_ks == $past(s_ks) && cyc > 5) stall_cycles <= stall_cycles + 1;
    for (int p = 0; p < 2; p++) begin
      if (take[p]) begin
        checks++;
        got++;
        if (expq[p].size() == 0 || o_data[p] != expq[p][0]) begin
          failures++;
          $display("FAIL cycle %0d: port %0d got %h", cyc, p, o_data[p]);
        end else void'(expq[p].pop_front());
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
    int unsigned g0;
    ready_pct[0] = 100; ready_pct[1] = 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // lone packet latency
    @(negedge clk) gen_pct = 100;
    @(negedge clk) gen_pct = 0;
    wait (o_req[0] || o_req[1]);
    @(negedge clk);
    expect_eq("fan-out latency", cyc - in_cycle, 1);
    repeat (5) @(posedge clk);
    // full rate with both outputs draining
    gen_pct = 100;
    repeat (30) @(posedge clk);
    @(negedge clk) g0 = got;
    repeat (100) @(posedge clk);
    @(negedge clk) expect_eq("packets in 100 cycles", got - g0, 100);
    // random readiness, including one port blocked for a while
    for (int p = 0; p < 6; p++) begin
      gen_pct = 30 + 12 * p;
      ready_pct[0] = (p == 2) ? 0 : 100 - 10 * p;
      ready_pct[1] = (p == 4) ? 0 : 40 + 10 * p;
      repeat (400) @(posedge clk);
    end
    gen_pct = 0;
    ready_pct[0] = 100; ready_pct[1] = 100;
    repeat (2500) @(posedge clk);
    expect_eq("all packets delivered", got, sent);
    checks++;
    if (stall_cycles == 0) begin
      failures++;
      $display("FAIL: no input stall happened");
    end
    $display("input stall cycles: %0d", stall_cycles);
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
