// mot_net_harness: traffic generator, checker and test sequence for the
// mesh-of-trees network (used by the end-to-end testbenches).
//
// It drives the N processing-cluster ports through queued sources
// (mot_tb_source) and drains the N memory-module ports through sinks
// (mot_tb_sink). Every packet carries its source, destination, a sequence
// number per source/destination pair, its generation cycle and a check word
// (mot_tb_pkg). At each memory module the harness checks that the packet is
// intact, addressed to that module, and next in order from its source.
//
// Test sequence:
//   1. zero load: lone packets between chosen pairs; the time the packet
//      spends in the network must be 2*log2(N)+1 cycles (one per switch
//      primitive on the path). A generated packet reaches the network input
//      SRC_DELAY = 2 cycles after it is generated (queue, then output port).
//   2. uniform random destinations, every cluster offering 1.0 packet per
//      cycle: the delivered rate per port must reach MIN_TPUT_PERMIL/1000.
//   3. offered load 0.1 .. 0.9: average latency printed; at 0.1 it must be
//      within 2 cycles of the zero-load latency.
//   4. hot spot: every cluster sends to module 0. Module 0 must still take one
//      packet per cycle, its fan-in tree arbitrates constantly and the stall
//      must reach the fan-out trees and the clusters.
//   5. memory modules ready only half of the time (backpressure at the roots).
//   6. drain: every generated packet must have been delivered.
// Mechanisms counted, each must happen: fan-in arbitration conflicts, cluster
// stalls (a packet offered and not taken), memory-side holds (a packet
// presented and not captured), kill-and-switch acknowledgements.
module mot_net_harness
  import mot_tb_pkg::*;
#(
  parameter int unsigned N               = 8,
  parameter int unsigned TPUT_CYCLES     = 2000,
  parameter int unsigned SWEEP_CYCLES    = 600,
  parameter int unsigned MIN_TPUT_PERMIL = 900
) (
  output logic          clk,
  output logic          rst_n,
  output logic          pc_req  [N],
  output logic [PW-1:0] pc_data [N],
  input  logic          pc_ks   [N],
  input  logic          mm_req  [N],
  input  logic [PW-1:0] mm_data [N],
  output logic          mm_ks   [N],
  input  logic [N-1:0]  arb_conflict [N]
);

  localparam int unsigned LOG2N     = $clog2(N);
  localparam int unsigned HOPS      = 2 * LOG2N + 1;
  localparam int unsigned SRC_DELAY = 2;

  typedef enum int { TR_UNIFORM, TR_HOTSPOT, TR_FIXED } traffic_e;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;

  // traffic control
  traffic_e    traffic = TR_UNIFORM;
  int unsigned rate_permil = 0;
  int unsigned ready_pct = 100;
  int unsigned fixed_src = 0, fixed_dst = 0;
  logic        fixed_shot = 1'b0;

  // statistics
  longint unsigned delivered = 0, lat_sum = 0, generated = 0;
  int unsigned     lat_max = 0, lat_last = 0;
  longint unsigned n_conflict = 0, n_pc_stall = 0, n_mm_hold = 0, n_ks = 0, n_gen_full = 0;
  longint unsigned mm0_taken = 0;

  int unsigned seq_tx [N][N];
  int unsigned seq_rx [N][N];

  logic          push [N], space [N], gen_go [N];
  logic [PW-1:0] push_data [N];
  logic [31:0]   backlog [N];
  int unsigned   dest_pick [N];
  logic          take [N], mm_stalled [N];
  logic          pc_ks_d [N];

  initial clk = 1'b0;
  always #5 clk = !clk;

  for (genvar i = 0; i < N; i++) begin : g_term
    mot_tb_source #(.W(PW)) u_src (
      .clk, .rst_n, .push(push[i]), .push_data(push_data[i]), .space(space[i]),
      .backlog(backlog[i]), .out_req(pc_req[i]), .out_data(pc_data[i]), .ks_in(pc_ks[i]));
    mot_tb_sink u_snk (
      .clk, .rst_n, .ready_pct, .in_req(mm_req[i]), .ks(mm_ks[i]), .take(take[i]),
      .stalled(mm_stalled[i]));

    always_comb begin
      case (traffic)
        TR_HOTSPOT: dest_pick[i] = 0;
        TR_FIXED:   dest_pick[i] = fixed_dst;
        default:    dest_pick[i] = 0;
      endcase
    end

    int unsigned rnd_dest;
    assign push[i]      = rst_n && gen_go[i] && space[i];
    assign push_data[i] = pkt_make((traffic == TR_UNIFORM) ? rnd_dest : dest_pick[i], i,
                                   seq_tx[i][(traffic == TR_UNIFORM) ? rnd_dest : dest_pick[i]],
                                   cyc);

    always_ff @(posedge clk) begin
      rnd_dest  <= $urandom_range(N - 1);
      gen_go[i] <= (traffic == TR_FIXED) ? (fixed_shot && fixed_src == i)
                                         : ($urandom_range(999) < rate_permil);
      pc_ks_d[i] <= pc_ks[i];
    end
  end

  // per-cycle bookkeeping and checking
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (push[i]) begin
          seq_tx[i][pkt_dest(push_data[i])] <= seq_tx[i][pkt_dest(push_data[i])] + 1;
          generated = generated + 1;
        end
        if (gen_go[i] && !space[i]) n_gen_full = n_gen_full + 1;
        if (pc_req[i] && pc_ks[i] == pc_ks_d[i] && $past(pc_req[i])) n_pc_stall = n_pc_stall + 1;
        if (pc_ks[i] != pc_ks_d[i]) n_ks = n_ks + 1;
        if (mm_stalled[i]) n_mm_hold = n_mm_hold + 1;
        for (int k = 0; k < N; k++) if (arb_conflict[i][k]) n_conflict = n_conflict + 1;
        if (take[i]) begin
          int unsigned s, lat;
          s   = pkt_src(mm_data[i]);
          lat = cyc - pkt_ts(mm_data[i]);
          checks++;
          if (!pkt_ok(mm_data[i]) || pkt_dest(mm_data[i]) != i || s >= N ||
              pkt_seq(mm_data[i]) != seq_rx[s % N][i] % 65536) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d: module %0d got %h (from %0d, seq %0d)", cyc, i,
                       mm_data[i], s, pkt_seq(mm_data[i]));
          end else seq_rx[s][i] <= seq_rx[s][i] + 1;
          delivered = delivered + 1;
          lat_sum   = lat_sum + lat;
          lat_last  = lat;
          if (lat > lat_max) lat_max = lat;
          if (i == 0) mm0_taken = mm0_taken + 1;
        end
      end
    end
  end

  task automatic expect_eq(input string what, input longint unsigned a, input longint unsigned b);
    checks++;
    if (a != b) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, a, b);
    end
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_until_empty();
    rate_permil = 0;
    traffic     = TR_UNIFORM;
    ready_pct   = 100;
    repeat (HOPS + 8) @(posedge clk);
    while (delivered != generated) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic lone_packet(input int unsigned s, input int unsigned d);
    longint unsigned d0;
    d0 = delivered;
    @(negedge clk);
    traffic = TR_FIXED; fixed_src = s; fixed_dst = d; fixed_shot = 1'b1;
    @(negedge clk) fixed_shot = 1'b0;
    while (delivered == d0) @(posedge clk);
    @(negedge clk);
    expect_eq($sformatf("network latency %0d->%0d", s, d), lat_last - SRC_DELAY, HOPS);
    traffic = TR_UNIFORM;
  endtask

  initial begin
    longint unsigned d0, l0, c0, m0;
    real tput, lat_lo, lat_hi, lat_avg;
    rst_n = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin seq_tx[i][j] = 0; seq_rx[i][j] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // 1. zero-load latency
    lone_packet(0, N - 1);
    lone_packet(N - 1, 0);
    lone_packet(N / 2, N / 2);
    lone_packet(1, N - 2);
    $display("zero-load latency: %0d cycles through %0d primitives", lat_last - SRC_DELAY, HOPS);

    // 2. saturation throughput, uniform traffic at 1.0 packet/cycle/port
    rate_permil = 1000;
    repeat (TPUT_CYCLES / 4) @(posedge clk);
    @(negedge clk) d0 = delivered;
    repeat (TPUT_CYCLES) @(posedge clk);
    @(negedge clk);
    tput = real'(delivered - d0) / real'(TPUT_CYCLES) / real'(N);
    $display("N=%0d offered 1.0 ppc: delivered %0.3f ppc per port", N, tput);
    expect_true($sformatf("throughput %0.3f below %0.3f", tput, MIN_TPUT_PERMIL / 1000.0),
                tput * 1000.0 >= real'(MIN_TPUT_PERMIL));
    idle_until_empty();

    // 3. latency against offered load
    for (int r = 1; r <= 9; r += 4) begin
      rate_permil = 100 * r;
      repeat (SWEEP_CYCLES / 4) @(posedge clk);
      @(negedge clk) begin d0 = delivered; l0 = lat_sum; end
      repeat (SWEEP_CYCLES) @(posedge clk);
      @(negedge clk);
      lat_avg = real'(lat_sum - l0) / real'(delivered - d0) - SRC_DELAY;
      $display("offered %0.1f ppc: delivered %0.3f ppc per port, average latency %0.2f cycles",
               r / 10.0, real'(delivered - d0) / real'(SWEEP_CYCLES) / real'(N), lat_avg);
      if (r == 1) lat_lo = lat_avg;
      if (r == 9) lat_hi = lat_avg;
      idle_until_empty();
    end
    expect_true("latency at 0.1 ppc near zero-load latency", lat_lo <= HOPS + 2.0);
    $display("latency growth 0.1 -> 0.9 ppc: %0.2f", lat_hi / lat_lo);

    // 4. hot spot: everybody to module 0
    @(negedge clk) begin traffic = TR_HOTSPOT; rate_permil = 1000; end
    repeat (4 * HOPS + 20) @(posedge clk);
    @(negedge clk) begin m0 = mm0_taken; c0 = n_pc_stall; end
    repeat (200) @(posedge clk);
    @(negedge clk);
    expect_eq("hot-spot module packets in 200 cycles", mm0_taken - m0, 200);
    expect_true("stall reached the clusters", n_pc_stall > c0);
    idle_until_empty();

    // 5. backpressure from the memory modules
    @(negedge clk) begin rate_permil = 400; ready_pct = 50; end
    repeat (SWEEP_CYCLES) @(posedge clk);
    idle_until_empty();

    // 6. everything delivered, mechanisms seen
    expect_eq("packets delivered", delivered, generated);
    $display("generated %0d delivered %0d; conflicts %0d, cluster stalls %0d, module holds %0d, ks toggles %0d, generator full %0d, max latency %0d",
             generated, delivered, n_conflict, n_pc_stall, n_mm_hold, n_ks, n_gen_full, lat_max);
    expect_true("fan-in arbitration conflict happened", n_conflict > 0);
    expect_true("cluster stall happened", n_pc_stall > 0);
    expect_true("memory-side hold happened", n_mm_hold > 0);
    expect_true("kill-and-switch toggles seen", n_ks == generated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
