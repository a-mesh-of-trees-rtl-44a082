// mot_tb_pkg: packet format used by the network testbenches.
//
// Test packets are 80 bits wide (the network's channel width):
//   [7:0]   destination memory module (only the low log2(N) bits are
//           nonzero, so the network routes on them)
//   [15:8]  source processing cluster
//   [31:16] sequence number of this source->destination pair
//   [55:32] cycle in which the packet was generated
//   [79:56] check word: a fold of bits 55:0, so that any corruption of the
//           packet on its way is seen by the receiver
package mot_tb_pkg;

  localparam int unsigned PW = 80;

  function automatic logic [23:0] pkt_check(input logic [55:0] body);
    logic [23:0] h;
    h = 24'h5a3c1f;
    for (int i = 0; i < 56; i += 8) begin
      h = {h[22:0], h[23]} ^ {16'h0, body[i +: 8]} ^ {body[i +: 8], 16'h0};
      h = h * 24'd7 + 24'd13;
    end
    return h;
  endfunction

  function automatic logic [PW-1:0] pkt_make(input int unsigned dest, input int unsigned src,
                                             input int unsigned seq, input int unsigned ts);
    logic [55:0] body;
    body = {ts[23:0], seq[15:0], src[7:0], dest[7:0]};
    return {pkt_check(body), body};
  endfunction

  function automatic int unsigned pkt_dest(input logic [PW-1:0] p); return int'(p[7:0]);   endfunction
  function automatic int unsigned pkt_src (input logic [PW-1:0] p); return int'(p[15:8]);  endfunction
  function automatic int unsigned pkt_seq (input logic [PW-1:0] p); return int'(p[31:16]); endfunction
  function automatic int unsigned pkt_ts  (input logic [PW-1:0] p); return int'(p[55:32]); endfunction
  function automatic logic pkt_ok(input logic [PW-1:0] p);
    return p[79:56] == pkt_check(p[55:0]);
  endfunction

endpackage
