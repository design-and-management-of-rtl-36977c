// nim_pkg: types and constants shared by the 3D Network-in-Memory L2 fabric.
//
// A cache line (64 bytes) travels as a packet of 128-bit flits. Every packet
// starts with a head flit that carries a routing header (destination,
// source, the pillar used to change layers, message type and address);
// packets that carry a line add four data flits behind it. A link is one
// flit_t per cycle downstream plus one credit_t per cycle upstream.
//
// Following the document: 128-bit flits, 3 virtual channels per physical
// channel, each one 4-flit message deep, dimension-order routing, one
// pillar per cluster. This design's own choices: the header layout, the
// message types, the port numbering and the pillar position inside a
// cluster (2 nodes in from the cluster corner, away from the chip edge).
package nim_pkg;

  localparam int FLIT_W     = 128;  // link and dTDMA bus width b
  localparam int NVC        = 3;    // virtual channels per physical channel
  localparam int VCW        = 2;    // bits of a VC number
  localparam int VC_DEPTH   = 4;    // flits per VC buffer (one message)
  localparam int CW         = 4;    // bits of an X or Y coordinate
  localparam int LW         = 2;    // bits of a layer number
  localparam int ADDR_W     = 32;   // physical address (4 GB)
  localparam int LINE_W     = 512;  // 64-byte cache line
  localparam int DATA_FLITS = LINE_W / FLIT_W;
  localparam int CLUSTER_DIM = 4;   // a cluster is 4x4 = 16 bank nodes

  // Router port numbers. North is the smaller y.
  localparam int P_LOCAL = 0;
  localparam int P_N     = 1;
  localparam int P_E     = 2;
  localparam int P_S     = 3;
  localparam int P_W     = 4;
  localparam int P_V     = 5;       // vertical (dTDMA pillar) channel

  typedef struct packed {
    logic [CW-1:0] x;
    logic [CW-1:0] y;
    logic [LW-1:0] z;
  } coord_t;

  typedef enum logic [3:0] {
    MSG_RD_REQ  = 4'd1,   // read a line; 1-flit packet
    MSG_WR_REQ  = 4'd2,   // write a line; head + 4 data flits
    MSG_RD_RESP = 4'd3,   // line returned; head + 4 data flits
    MSG_WR_ACK  = 4'd4    // write done; 1-flit packet
  } mtype_e;

  typedef struct packed {
    logic [FLIT_W-84-1:0] pad;
    logic [7:0]        id;       // requester's transaction tag
    logic [ADDR_W-1:0] addr;
    logic              has_data; // four data flits follow
    mtype_e            mtype;
    coord_t            pillar;   // pillar used if dst.z differs (z unused)
    coord_t            src;
    coord_t            dst;
  } header_t;

  typedef struct packed {
    logic               valid;
    logic               head;
    logic               tail;
    logic [VCW-1:0]     vc;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  typedef struct packed {
    logic           valid;
    logic [VCW-1:0] vc;
  } credit_t;

  // One word on a dTDMA pillar bus: a flit with its source and target layer.
  typedef struct packed {
    logic              valid;
    logic [LW-1:0]     src;
    logic [LW-1:0]     dst;
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } bus_word_t;

  // A whole message as seen by a processing element.
  typedef struct packed {
    coord_t            dst;
    coord_t            src;
    mtype_e            mtype;
    logic [7:0]        id;
    logic [ADDR_W-1:0] addr;
    logic              has_data;
    logic [LINE_W-1:0] data;
  } msg_t;

  // Pillar node of cluster (cx, cy): two nodes in from the cluster corner.
  function automatic logic [CW-1:0] pillar_pos(input int c);
    return CW'(c * CLUSTER_DIM + CLUSTER_DIM / 2);
  endfunction

  // One CPU per pillar, CPUs offset between layers (checkerboard over the
  // clusters, rotated by layer) so that no two CPUs are stacked.
  function automatic logic cpu_here(input int cx, input int cy, input int z,
                                    input int nlayers);
    return ((cx + cy) % nlayers) == z;
  endfunction

  // Location of a line inside its 64 KB bank (1024 lines): the cache index
  // bits above the bank-select bits (set, addr[15:10]) and, as the way,
  // the tag bits above the cluster-select bits (addr[23:20]).
  function automatic logic [9:0] bank_location(input logic [ADDR_W-1:0] a);
    return {a[23:20], a[15:10]};
  endfunction

  function automatic int absdiff(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

endpackage
