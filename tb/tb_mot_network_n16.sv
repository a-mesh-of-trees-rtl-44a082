// tb_mot_network_n16: end-to-end testbench of the mesh-of-trees network at
// N = 16 terminals with 80-bit packets, the smallest size of the published
// throughput table. Runs the whole sequence of mot_net_harness: zero-load
// latency (9 cycles), saturation throughput with every cluster offering 1.0
// packet per cycle (must reach 0.94 per port; 0.951 was reported for this
// size), latency against offered load, a hot spot, memory-side backpressure
// and a final drain.
module tb_mot_network_n16;
  import mot_tb_pkg::*;
  localparam int unsigned N = 16;

  logic          clk, rst_n;
  logic          pc_req  [N];
  logic [PW-1:0] pc_data [N];
  logic          pc_ks   [N];
  logic          mm_req  [N];
  logic [PW-1:0] mm_data [N];
  logic          mm_ks   [N];
  logic [N-1:0]  arb_conflict [N];

  mot_network #(.N(N), .W(PW)) dut (.*);
  mot_net_harness #(.N(N), .TPUT_CYCLES(1500), .SWEEP_CYCLES(400), .MIN_TPUT_PERMIL(940)) u_h (.*);

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures + 1);
    $finish;
  end
endmodule
