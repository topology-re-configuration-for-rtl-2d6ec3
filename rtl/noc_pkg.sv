// noc_pkg: types and constants shared by the reconfigurable, back-tracking NoC.
//
// A link between two grid positions is a pair of independent one-way
// sub-links. Each sub-link carries a forward bundle (fwd_t: request, data
// strobe, data) from sender to receiver and a backward bundle (bwd_t: ACK,
// NACK) from receiver to sender. Path set-up uses a probe: the sender raises
// req with the destination node number in the low bits of data; the receiver
// answers with ack (path complete, held while req stays high) or nack (path
// blocked, held until req falls). After ack the sender moves data words with
// vld; dropping req tears the path down. The split into two sub-links per
// link and the 2-bit multiplexer fields follow the document; the signal-level
// handshake is this design's own.
package noc_pkg;

  parameter int unsigned DW_DEF = 64;   // link data width (64-bit links)
  parameter int unsigned NODE_W = 8;    // destination field in a probe header

  // Ports of a configuration switch (and the mesh ports of a router).
  typedef enum logic [1:0] {P_N = 2'd0, P_E = 2'd1, P_S = 2'd2, P_W = 2'd3} dir_e;

  // Router port numbers; 3-bit codes, RP_NONE means "no candidate".
  typedef enum logic [2:0] {
    RP_N = 3'd0, RP_E = 3'd1, RP_S = 3'd2, RP_W = 3'd3, RP_L = 3'd4, RP_NONE = 3'd7
  } rport_e;

  // A configuration switch output is set by a 2-bit field naming the input
  // port it takes; a field naming the output's own port means "off", since a
  // connection never loops back into the port it came from.

  typedef struct packed {
    logic          req;
    logic          vld;
    logic [DW_DEF-1:0] data;
  } fwd_t;

  typedef struct packed {
    logic ack;
    logic nack;
  } bwd_t;

  function automatic dir_e opp(input dir_e d);
    return dir_e'(d ^ 2'd2);
  endfunction

endpackage
