// noc_pkg: types shared by the mesh network, its routers and its network
// interfaces (NI).
//
// A flit on the network carries the 96-bit encoded payload produced by the
// source NI plus a small unencoded side band that routers need to move it:
// head/tail markers, the destination coordinates and the virtual channel
// (VC) it travels on. Routers never decode the payload; only the destination
// NI does (end-to-end codec placement). Flow control is credit based: each
// credit returns one buffer slot of one VC to the upstream sender.
//
// Four VCs per input port is the evaluated router configuration; the
// side-band format, port numbering and credit scheme are this design's own.
package noc_pkg;

  import ecc_pkg::FLIT_W;
  import ecc_pkg::CODE_W;

  localparam int NPORTS  = 5;                 // local + four mesh directions
  localparam int NUM_VC  = 4;                 // virtual channels per port
  localparam int VC_W    = $clog2(NUM_VC);
  localparam int COORD_W = 4;                 // up to a 16 x 16 mesh

  // Router port numbers. North is the neighbour at y+1, East at x+1.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [VC_W-1:0]    vc_t;

  // Flit as it travels between routers (payload encoded).
  typedef struct packed {
    logic              head;
    logic              tail;
    coord_t            dst_x;
    coord_t            dst_y;
    vc_t               vc;
    logic [CODE_W-1:0] code;
  } flit_t;

  // One direction of a router-to-router or NI-to-router link.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Credit returned upstream.
  typedef struct packed {
    logic valid;
    vc_t  vc;
  } credit_t;

  // Flit inside the NI before encoding (payload in clear).
  typedef struct packed {
    logic              head;
    logic              tail;
    coord_t            dst_x;
    coord_t            dst_y;
    vc_t               vc;
    logic [FLIT_W-1:0] data;
  } raw_flit_t;

  // Processing element -> NI request: one 64-bit data word of a packet.
  typedef struct packed {
    logic              valid;
    logic              last;     // last word of the packet
    coord_t            dst_x;
    coord_t            dst_y;
    logic [FLIT_W-1:0] data;
  } ni_tx_t;

  // NI -> processing element: one decoded flit, with error status.
  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    vc_t               vc;                // packets on different VCs may interleave
    logic [FLIT_W-1:0] data;              // corrected payload
    logic [3:0]        corrected;         // per 16-bit row: error corrected
    logic [3:0]        uncorrectable;     // per 16-bit row: error detected only
    logic              pkt_corrected;     // with tail: some flit of the packet was corrected
    logic              pkt_uncorrectable; // with tail: some flit had a detected error
  } ni_rx_t;

endpackage
