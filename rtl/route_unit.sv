// route_unit: routing unit (RT) of the NoC router.
//
// Dimension-order routing inside a layer: X first, then Y. A packet whose
// destination is on another layer is first routed, still X then Y, to the
// pillar node named in its header; at that node it takes the vertical port
// onto the dTDMA pillar, which delivers it to the destination layer in a
// single hop, where XY routing continues to the destination.
// Purely combinational: from the head flit's header and this router's
// position to an output port number (nim_pkg P_*).
// The document gives dimension-order routing and the single-hop vertical
// pillar; the pillar redirection rule is this design's reading of it.
module route_unit
  import nim_pkg::*;
(
  input  coord_t   here,
  input  header_t  hdr,
  output logic [2:0] port
);
  logic [CW-1:0] tx, ty;
  logic          other_layer;

  always_comb begin
    other_layer = (hdr.dst.z != here.z);
    tx = other_layer ? hdr.pillar.x : hdr.dst.x;
    ty = other_layer ? hdr.pillar.y : hdr.dst.y;
    if      (tx > here.x) port = 3'(P_E);
    else if (tx < here.x) port = 3'(P_W);
    else if (ty > here.y) port = 3'(P_S);
    else if (ty < here.y) port = 3'(P_N);
    else if (other_layer) port = 3'(P_V);
    else                  port = 3'(P_LOCAL);
  end
endmodule
