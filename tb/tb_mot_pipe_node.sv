// tb_mot_pipe_node: self-checking testbench of the pipeline primitive.
//
// A queued source feeds the primitive and a sink with random readiness drains
// it. Checked: every packet arrives once, unchanged and in order; a lone
// packet takes exactly one cycle through the primitive; with the sink always
// ready one packet passes per cycle; with the sink stalled the primitive
// holds two packets and stops acknowledging (backpressure).
module tb_mot_pipe_node;
  import mot_tb_pkg::*;
  localparam int unsigned W = PW;

  logic         clk = 0, rst_n = 0;
  logic         push, space;
  logic [W-1:0] push_data;
  logic [31:0]  backlog;
  logic         s_req, s_ks, p_req, p_ks, take, stalled;
  logic [W-1:0] s_data, p_data;
  int unsigned  ready_pct = 100;
  int unsigned  checks = 0, failures = 0, cyc = 0, seq = 0, exp_seq = 0, got = 0;
  int unsigned  gen_pct = 0;
  int unsigned  in_cycle = 0, out_cycle = 0;
  logic         gen_go;

  mot_tb_source #(.W(W)) u_src (.clk, .rst_n, .push, .push_data, .space, .backlog,
                                .out_req(s_req), .out_data(s_data), .ks_in(s_ks));
  mot_pipe_node #(.W(W)) dut (.clk, .rst_n, .in_req(s_req), .in_data(s_data), .ks_out(s_ks),
                              .out_req(p_req), .out_data(p_data), .ks_in(p_ks));
  mot_tb_sink u_snk (.clk, .rst_n, .ready_pct, .in_req(p_req), .ks(p_ks), .take, .stalled);

  always #5 clk = !clk;

  assign push      = rst_n && gen_go && space;
  assign push_data = pkt_make(0, 1, seq, cyc);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    gen_go <= $urandom_range(99) < gen_pct;
    if (push) seq <= seq + 1;
    if (s_req && !$past(s_req)) in_cycle <= cyc;
    if (take) begin
      checks++;
      got++;
      out_cycle <= cyc;
      if (!pkt_ok(p_data) || pkt_seq(p_data) != exp_seq % 65536) begin
        failures++;
        $display("FAIL cycle %0d: got seq %0d ok=%0d, expected %0d", cyc, pkt_seq(p_data),
                 pkt_ok(p_data), exp_seq);
      end
      exp_seq <= exp_seq + 1;
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
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of a lone packet: one cycle from its input to its output
    @(negedge clk) gen_pct = 100;
    @(negedge clk) gen_pct = 0;
    wait (p_req);
    @(negedge clk);
    expect_eq("pipeline latency", cyc - in_cycle, 1);
    repeat (5) @(posedge clk);
    // full rate
    gen_pct = 100;
    repeat (20) @(posedge clk);
    @(negedge clk) g0 = got;
    repeat (100) @(posedge clk);
    @(negedge clk) expect_eq("packets in 100 cycles", got - g0, 100);
    // stalled output: the primitive fills its two buffers and stops taking
    ready_pct = 0;
    repeat (10) @(posedge clk);
    @(negedge clk) begin
      expect_eq("output held", p_req, 1);
      expect_eq("input waiting", s_req, 1);
    end
    g0 = exp_seq;
    ready_pct = 100;
    repeat (2) @(posedge clk);
    // random traffic
    for (int p = 0; p < 5; p++) begin
      gen_pct = 20 * p + 10;
      ready_pct = 100 - 15 * p;
      repeat (400) @(posedge clk);
    end
    gen_pct = 0;
    ready_pct = 100;
    repeat (1500) @(posedge clk);
    expect_eq("all packets delivered", exp_seq, seq);
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
