// dtdma_transceiver: NoC/bus interface of one pillar node (one layer).
//
// Transmit side (Tx): an output buffer with one FIFO per virtual channel
// takes the flits the router sends on its vertical port, with credit flow
// control exactly like a downstream router. The transmitter picks a VC whose
// front is a head flit and sends that packet to the end before taking
// another, so each receiver sees whole packets per source layer. It
// requests the bus (tx_req, tx_dst) while it has a flit, and drives the bus
// (drive, bus_out) in a cycle where its slot shift register enables it, the
// frame in force was built for this very request, and the receiver has room.
// Receive side (Rx): a second shift register enables sampling of the bus;
// a sampled flit is held one cycle in the input register and then enters
// the router's vertical input port on the VC of its source layer (sources
// below this layer map to VC = source, sources above to source - 1, so up
// to NVC + 1 layers fit). rx_space tells the pillar, per VC, whether the
// router buffer behind the input register can take one more flit.
// After the document's transceiver figure: Tx and Rx buffers, one shift
// register for each, bus driver enables. The per-VC Tx FIFOs, the packet
// locking and the receiver-space signal are this design's choices.
module dtdma_transceiver
  import nim_pkg::*;
#(
  parameter int N     = 2,
  parameter int MY_L  = 0,
  parameter int DEPTH = VC_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // router side
  input  flit_t                rt_out,         // router vertical output
  output credit_t              rt_out_credit,  // credit back to the router
  output flit_t                rt_in,          // into router vertical input
  input  credit_t              rt_in_credit,   // credit from the router
  // arbiter side
  output logic                 tx_req,
  output logic [LW-1:0]        tx_dst,
  input  logic                 load,
  input  logic [N-1:0]         tx_cfg,
  input  logic [N-1:0]         rx_cfg,
  input  logic [$clog2(N)-1:0] len_m1,
  input  logic                 granted,
  input  logic [LW-1:0]        granted_dst,
  // bus side
  input  logic                 dst_ready,      // target receiver has room
  output logic                 drive,
  output bus_word_t            bus_out,
  input  bus_word_t            bus_in,
  output logic [NVC-1:0]       rx_space
);
  localparam int CNTW = $clog2(DEPTH + 2);

  // ---------------- transmit side ----------------
  flit_t          txf   [NVC];
  logic [NVC-1:0] txe;
  logic [NVC-1:0] rd;
  logic           locked;
  logic [VCW-1:0] lock_vc, pick_vc;
  logic [LW-1:0]  lock_dst;
  logic           pick_ok, tx_en, rx_en;
  flit_t          cur;
  header_t        ph;

  for (genvar v = 0; v < NVC; v++) begin : g_txbuf
    vc_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (rt_out.valid && int'(rt_out.vc) == v),
      .wr_flit(rt_out),
      .rd_en  (rd[v]),
      .rd_flit(txf[v]),
      .empty  (txe[v]),
      .full   ());
  end

  always_comb begin
    pick_ok = 1'b0;
    pick_vc = '0;
    for (int v = NVC - 1; v >= 0; v--)
      if (!txe[v] && txf[v].head) begin
        pick_ok = 1'b1;
        pick_vc = VCW'(v);
      end
  end

  always_comb begin
    cur    = locked ? txf[lock_vc] : txf[pick_vc];
    ph     = header_t'(txf[pick_vc].data);
    tx_req = locked ? !txe[lock_vc] : pick_ok;
    tx_dst = locked ? lock_dst : ph.dst.z;
    drive  = tx_req && tx_en && granted && (granted_dst == tx_dst) && dst_ready;
    for (int v = 0; v < NVC; v++)
      rd[v] = drive && ((locked ? lock_vc : pick_vc) == VCW'(v));
    bus_out = '{valid: drive, src: LW'(MY_L), dst: tx_dst,
                head: cur.head, tail: cur.tail, data: cur.data};
    rt_out_credit = '{valid: drive, vc: locked ? lock_vc : pick_vc};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_vc  <= '0;
      lock_dst <= '0;
    end else if (drive) begin
      if (cur.tail) locked <= 1'b0;
      else if (!locked) begin
        locked   <= 1'b1;
        lock_vc  <= pick_vc;
        lock_dst <= tx_dst;
      end
    end
  end

  dtdma_slot_shiftreg #(.N(N)) u_tx_sr (
    .clk, .rst_n, .load, .cfg(tx_cfg), .len_m1, .en(tx_en));

  // ---------------- receive side ----------------
  dtdma_slot_shiftreg #(.N(N)) u_rx_sr (
    .clk, .rst_n, .load, .cfg(rx_cfg), .len_m1, .en(rx_en));

  logic           take;
  logic [VCW-1:0] in_vc;
  logic [CNTW-1:0] cred [NVC];

  always_comb begin
    take  = rx_en && bus_in.valid && int'(bus_in.dst) == MY_L;
    in_vc = (int'(bus_in.src) < MY_L) ? VCW'(bus_in.src) : VCW'(int'(bus_in.src) - 1);
    for (int v = 0; v < NVC; v++) rx_space[v] = (cred[v] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_in <= '0;
      for (int v = 0; v < NVC; v++) cred[v] <= CNTW'(DEPTH);
    end else begin
      rt_in <= '{valid: take, head: bus_in.head, tail: bus_in.tail,
                 vc: in_vc, data: bus_in.data};
      for (int v = 0; v < NVC; v++)
        cred[v] <= cred[v] - CNTW'(take && int'(in_vc) == v)
                           + CNTW'(rt_in_credit.valid && int'(rt_in_credit.vc) == v);
    end
  end

  a_rx_room: assert property (@(posedge clk) disable iff (!rst_n) take |-> rx_space[in_vc]);
  a_rx_addr: assert property (@(posedge clk) disable iff (!rst_n)
                              (rx_en && bus_in.valid) |-> int'(bus_in.dst) == MY_L);
endmodule
