// noc_router: single-stage wormhole router of the Network-in-Memory.
//
// NP physical channels: local processing element, North, East, South, West
// (5 ports, nim_pkg P_*), plus the vertical dTDMA channel (P_V) in pillar
// nodes (NP = 6). The vertical channel has its own input VCs and looks to
// the router like any other port. Each input port has NVC virtual channels
// of VC_DEPTH flits (vc_buffer).
//
// Operation: a flit written into an input VC in one cycle is routed (RT,
// route_unit), given a downstream VC if it is a head (VA, vc_allocator),
// wins the crossbar (SA, switch_allocator) and crosses it (XBAR, crossbar)
// all in the next cycle, leaving on out_flit towards the next buffer: one
// cycle per hop. The route and VC of a packet are held from head to tail
// (wormhole switching). Flow control is credit based: out_credit carries one
// credit per cycle from the downstream buffer, in_credit returns one to the
// upstream sender for each flit that leaves an input VC.
// Following the document: single-cycle router, 3 VCs of one 4-flit message,
// dimension-order routing, extra physical channel for the pillar. This
// design's own choices: doing VA and SA without speculation in one cycle,
// credit flow control and round-robin arbitration.
module noc_router
  import nim_pkg::*;
#(
  parameter int NP    = 5,
  parameter int MY_X  = 0,
  parameter int MY_Y  = 0,
  parameter int MY_Z  = 0,
  parameter int DEPTH = VC_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   in_flit    [NP],
  output credit_t in_credit  [NP],
  output flit_t   out_flit   [NP],
  input  credit_t out_credit [NP]
);
  coord_t here;
  assign here = '{x: CW'(MY_X), y: CW'(MY_Y), z: LW'(MY_Z)};

  flit_t          front    [NP][NVC];
  logic           empty    [NP][NVC];
  logic           full     [NP][NVC];
  logic           rd_en    [NP][NVC];
  logic [2:0]     rport    [NP][NVC];
  logic [2:0]     want     [NP][NVC];
  logic [NVC-1:0] elig     [NP];
  logic           active   [NP][NVC];
  logic [VCW-1:0] ovc      [NP][NVC];
  logic [2:0]     oport    [NP][NVC];

  logic           in_win   [NP];
  logic [VCW-1:0] in_vc    [NP];
  logic           out_valid[NP];
  logic [2:0]     out_in   [NP];

  logic           va_alloc [NP];
  logic [VCW-1:0] va_vc    [NP];
  logic           va_any   [NP];
  logic [NVC-1:0] va_cred  [NP];
  logic [VCW-1:0] send_vc  [NP];
  logic           send_tail[NP];
  flit_t          sel_flit [NP];

  // Input VC buffers and routing units.
  for (genvar i = 0; i < NP; i++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      vc_buffer #(.DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .wr_en  (in_flit[i].valid && int'(in_flit[i].vc) == v),
        .wr_flit(in_flit[i]),
        .rd_en  (rd_en[i][v]),
        .rd_flit(front[i][v]),
        .empty  (empty[i][v]),
        .full   (full[i][v]));
      route_unit u_rt (.here, .hdr(header_t'(front[i][v].data)), .port(rport[i][v]));
    end
  end

  // Eligibility: the front flit can move this cycle.
  always_comb begin
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NVC; v++) begin
        want[i][v] = active[i][v] ? oport[i][v] : rport[i][v];
        if (empty[i][v] || int'(want[i][v]) >= NP)
          elig[i][v] = 1'b0;
        else if (active[i][v])
          elig[i][v] = va_cred[want[i][v]][ovc[i][v]];
        else
          elig[i][v] = front[i][v].head && va_any[want[i][v]];
      end
  end

  switch_allocator #(.NP(NP)) u_sa (
    .clk, .rst_n, .elig, .want, .in_win, .in_vc, .out_valid, .out_in);

  always_comb begin
    for (int i = 0; i < NP; i++) sel_flit[i] = front[i][in_vc[i]];
    for (int i = 0; i < NP; i++) sel_flit[i].valid = in_win[i];
    for (int o = 0; o < NP; o++) begin
      va_alloc[o]  = out_valid[o] && !active[out_in[o]][in_vc[out_in[o]]];
      send_vc[o]   = va_alloc[o] ? va_vc[o] : ovc[out_in[o]][in_vc[out_in[o]]];
      send_tail[o] = sel_flit[out_in[o]].tail;
    end
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NVC; v++)
        rd_en[i][v] = in_win[i] && int'(in_vc[i]) == v;
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    vc_allocator #(.DEPTH(DEPTH)) u_va (
      .clk, .rst_n,
      .credit_in (out_credit[o]),
      .alloc     (va_alloc[o]),
      .alloc_vc  (va_vc[o]),
      .any_free  (va_any[o]),
      .send      (out_valid[o]),
      .send_vc   (send_vc[o]),
      .send_tail (send_tail[o]),
      .has_credit(va_cred[o]));
  end

  crossbar #(.NP(NP)) u_xbar (
    .in_flit(sel_flit), .out_valid, .out_in, .out_vc(send_vc), .out_flit);

  // Per input VC packet state (wormhole: route and VC held head to tail).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NVC; v++) begin
          active[i][v] <= 1'b0;
          ovc[i][v]    <= '0;
          oport[i][v]  <= '0;
        end
    end else begin
      for (int o = 0; o < NP; o++)
        if (out_valid[o]) begin
          if (sel_flit[out_in[o]].tail)
            active[out_in[o]][in_vc[out_in[o]]] <= 1'b0;
          else if (va_alloc[o]) begin
            active[out_in[o]][in_vc[out_in[o]]] <= 1'b1;
            ovc[out_in[o]][in_vc[out_in[o]]]    <= va_vc[o];
            oport[out_in[o]][in_vc[out_in[o]]]  <= 3'(o);
          end
        end
    end
  end

  always_comb
    for (int i = 0; i < NP; i++) in_credit[i] = '{valid: in_win[i], vc: in_vc[i]};

endmodule
