// network_interface: network interface (NIC) between a processing element
// (cache bank or CPU) and the local port of its router.
//
// Send: a message (msg_t) accepted with tx_valid/tx_ready becomes one head
// flit carrying the routing header, followed, if it carries a line, by four
// 128-bit data flits (line bits 127:0 first). The header names the pillar
// the packet uses if it must change layers: the pillar that minimises the
// in-layer hops from source to pillar plus pillar to destination. The
// packet goes out on a free router VC, one flit per cycle while credits
// last; the next message is taken once the tail has gone.
// Receive: the router's local output feeds one buffer per VC (credit flow
// control). The NIC reassembles one packet at a time, taking a VC whose
// front is a head flit and draining it up to the tail, then offers the
// message on rx_valid until rx_ready.
// The document shows the NIC only as a box between a node and its router;
// the packet format and the pillar choice are this design's.
module network_interface
  import nim_pkg::*;
#(
  parameter int MY_X  = 0,
  parameter int MY_Y  = 0,
  parameter int MY_Z  = 0,
  parameter int NCX   = 4,   // clusters (pillars) along X
  parameter int NCY   = 2,   // clusters (pillars) along Y
  parameter int DEPTH = VC_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  msg_t    tx_msg,
  input  logic    tx_valid,
  output logic    tx_ready,
  output msg_t    rx_msg,
  output logic    rx_valid,
  input  logic    rx_ready,
  output flit_t   to_rt,
  input  credit_t to_rt_credit,
  input  flit_t   from_rt,
  output credit_t from_rt_credit
);
  localparam int CNTW = $clog2(DEPTH + 1);

  // ---------------- send ----------------
  logic            busy;
  msg_t            m;
  header_t         hdr;
  coord_t          pil;
  logic [2:0]      k;          // flit number within the packet
  logic [VCW-1:0]  vc;
  logic [CNTW-1:0] cred [NVC];
  logic [NVC-1:0]  vc_free;
  logic            any_free, send;
  logic [VCW-1:0]  free_vc;

  always_comb begin
    int best, cost;
    best = 1 << 20;
    pil  = '{x: CW'(MY_X), y: CW'(MY_Y), z: LW'(MY_Z)};
    for (int cx = 0; cx < NCX; cx++)
      for (int cy = 0; cy < NCY; cy++) begin
        cost = absdiff(MY_X, int'(pillar_pos(cx))) + absdiff(MY_Y, int'(pillar_pos(cy)))
             + absdiff(int'(pillar_pos(cx)), int'(tx_msg.dst.x))
             + absdiff(int'(pillar_pos(cy)), int'(tx_msg.dst.y));
        if (cost < best) begin
          best  = cost;
          pil.x = pillar_pos(cx);
          pil.y = pillar_pos(cy);
        end
      end
  end

  always_comb begin
    any_free = 1'b0;
    free_vc  = '0;
    for (int v = NVC - 1; v >= 0; v--) begin
      vc_free[v] = (int'(cred[v]) == DEPTH);
      if (vc_free[v]) begin
        any_free = 1'b1;
        free_vc  = VCW'(v);
      end
    end
  end

  assign tx_ready = !busy && any_free;
  assign send     = busy && (cred[vc] != '0);

  always_comb begin
    to_rt = '0;
    to_rt.valid = send;
    to_rt.vc    = vc;
    to_rt.head  = (k == 0);
    to_rt.tail  = m.has_data ? (int'(k) == DATA_FLITS) : (k == 0);
    if (k == 0) to_rt.data = FLIT_W'(hdr);
    else        to_rt.data = m.data[(int'(k) - 1) * FLIT_W +: FLIT_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      vc   <= '0;
      m    <= '0;
      hdr  <= '0;
      for (int v = 0; v < NVC; v++) cred[v] <= CNTW'(DEPTH);
    end else begin
      if (tx_valid && tx_ready) begin
        busy <= 1'b1;
        k    <= '0;
        vc   <= free_vc;
        m    <= tx_msg;
        hdr  <= '{pad: '0, id: tx_msg.id, addr: tx_msg.addr, has_data: tx_msg.has_data,
                  mtype: tx_msg.mtype, pillar: pil, src: tx_msg.src, dst: tx_msg.dst};
      end else if (send) begin
        if (to_rt.tail) busy <= 1'b0;
        k <= k + 1'b1;
      end
      for (int v = 0; v < NVC; v++)
        cred[v] <= cred[v] - CNTW'(send && int'(vc) == v)
                           + CNTW'(to_rt_credit.valid && int'(to_rt_credit.vc) == v);
    end
  end

  // ---------------- receive ----------------
  flit_t          rf   [NVC];
  logic [NVC-1:0] re;
  logic [NVC-1:0] rd;
  logic           rlock;
  logic [VCW-1:0] rvc, rpick;
  logic           rpick_ok, pop;
  logic [2:0]     rk;
  header_t        rh;

  for (genvar v = 0; v < NVC; v++) begin : g_rx
    vc_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (from_rt.valid && int'(from_rt.vc) == v),
      .wr_flit(from_rt),
      .rd_en  (rd[v]),
      .rd_flit(rf[v]),
      .empty  (re[v]),
      .full   ());
  end

  always_comb begin
    rpick_ok = 1'b0;
    rpick    = '0;
    for (int v = NVC - 1; v >= 0; v--)
      if (!re[v] && rf[v].head) begin
        rpick_ok = 1'b1;
        rpick    = VCW'(v);
      end
    pop = !rx_valid && (rlock ? !re[rvc] : rpick_ok);
    for (int v = 0; v < NVC; v++)
      rd[v] = pop && ((rlock ? rvc : rpick) == VCW'(v));
    from_rt_credit = '{valid: pop, vc: rlock ? rvc : rpick};
    rh = header_t'(rf[rpick].data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rlock    <= 1'b0;
      rvc      <= '0;
      rk       <= '0;
      rx_valid <= 1'b0;
      rx_msg   <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (pop) begin
        if (!rlock) begin
          rx_msg.dst      <= rh.dst;
          rx_msg.src      <= rh.src;
          rx_msg.mtype    <= rh.mtype;
          rx_msg.id       <= rh.id;
          rx_msg.addr     <= rh.addr;
          rx_msg.has_data <= rh.has_data;
          rvc <= rpick;
          rk  <= 3'd1;
        end else begin
          rx_msg.data[(int'(rk) - 1) * FLIT_W +: FLIT_W] <= rf[rvc].data;
          rk <= rk + 1'b1;
        end
        if ((rlock ? rf[rvc].tail : rf[rpick].tail)) begin
          rlock    <= 1'b0;
          rx_valid <= 1'b1;
        end else begin
          rlock <= 1'b1;
        end
      end
    end
  end
endmodule
