// mot_pkg: constants shared by the mesh-of-trees (MoT) network modules.
//
// The network connects MOT_N processing clusters (packet sources) to MOT_N
// memory modules (packet destinations). A packet is one channel-wide word of
// MOT_B bits, moved whole in one cycle (no flits). The destination address
// sits in the low clog2(MOT_N) bits of the packet; the rest is payload that
// the network carries untouched.
//
// MOT_N = 64 terminals and MOT_B = 80 bits per channel are the configuration
// the network is evaluated in (64 terminals at 65 nm, b = 80). Placing the
// destination in the low bits is this design's own choice.
package mot_pkg;

  // Default number of terminals (clusters = memory modules).
  localparam int unsigned MOT_N = 64;
  // Default channel width in bits (one packet per channel word).
  localparam int unsigned MOT_B = 80;

  // Arbitration input names of a fan-in node.
  typedef enum logic {
    ARB_IN0 = 1'b0,
    ARB_IN1 = 1'b1
  } arb_sel_e;

endpackage
