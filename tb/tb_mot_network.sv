// tb_mot_network: end-to-end testbench of the mesh-of-trees network at
// N = 8 terminals (80-bit packets). The traffic, checks and test sequence are
// in mot_net_harness; this top wires it to the network and adds a watchdog.
module tb_mot_network;
  import mot_tb_pkg::*;
  localparam int unsigned N = 8;

  logic          clk, rst_n;
  logic          pc_req  [N];
  logic [PW-1:0] pc_data [N];
  logic          pc_ks   [N];
  logic          mm_req  [N];
  logic [PW-1:0] mm_data [N];
  logic          mm_ks   [N];
  logic [N-1:0]  arb_conflict [N];

  mot_network #(.N(N), .W(PW)) dut (.*);
  mot_net_harness #(.N(N)) u_h (.*);

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures + 1);
    $finish;
  end
endmodule
