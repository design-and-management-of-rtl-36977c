// dtdma_pillar: one communication pillar, a dTDMA bus spanning all layers.
//
// Holds the bus arbiter (in the document's floorplan it sits in the middle
// layer) and one transceiver per layer. Every layer reaches every other in a
// single bus transfer. The shared b-bit bus is modelled as the OR of the
// transceivers' outputs, each gated by its driver enable, which is what the
// tri-state drivers of the document resolve to when at most one drives; an
// assertion checks that at most one does. The pillar also routes each
// receiver's free-space flags to the transmitter that addresses it.
// Interface per layer l: the router's vertical port (rt_out / rt_out_credit
// from the router, rt_in / rt_in_credit into it). A flit leaving a router
// in cycle t is in the Tx buffer at t+1, on the bus in its slot, and enters
// the destination router one cycle after the bus transfer.
module dtdma_pillar
  import nim_pkg::*;
#(
  parameter int NLAYERS = 2,
  parameter int DEPTH   = VC_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   rt_out        [NLAYERS],
  output credit_t rt_out_credit [NLAYERS],
  output flit_t   rt_in         [NLAYERS],
  input  credit_t rt_in_credit  [NLAYERS],
  output logic [$clog2(NLAYERS+1)-1:0] active_slots,
  output logic    bus_busy
);
  localparam int N = NLAYERS;
  logic [N-1:0]         req;
  logic [LW-1:0]        dst [N];
  logic                 load;
  logic [N-1:0]         tx_cfg [N];
  logic [N-1:0]         rx_cfg [N];
  logic [$clog2(N)-1:0] len_m1;
  logic [N-1:0]         granted;
  logic [LW-1:0]        granted_dst [N];
  logic [N-1:0]         drive;
  bus_word_t            bus_out [N];
  bus_word_t            bus;
  logic [NVC-1:0]       rx_space [N];
  logic                 dst_ready [N];

  dtdma_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .dst, .load, .tx_cfg, .rx_cfg, .len_m1,
    .granted, .granted_dst, .active_slots);

  for (genvar l = 0; l < N; l++) begin : g_layer
    dtdma_transceiver #(.N(N), .MY_L(l), .DEPTH(DEPTH)) u_trx (
      .clk, .rst_n,
      .rt_out(rt_out[l]), .rt_out_credit(rt_out_credit[l]),
      .rt_in(rt_in[l]),   .rt_in_credit(rt_in_credit[l]),
      .tx_req(req[l]), .tx_dst(dst[l]),
      .load, .tx_cfg(tx_cfg[l]), .rx_cfg(rx_cfg[l]), .len_m1,
      .granted(granted[l]), .granted_dst(granted_dst[l]),
      .dst_ready(dst_ready[l]), .drive(drive[l]), .bus_out(bus_out[l]),
      .bus_in(bus), .rx_space(rx_space[l]));
  end

  always_comb begin
    bus = '0;
    for (int l = 0; l < N; l++) if (drive[l]) bus = bus | bus_out[l];
    for (int l = 0; l < N; l++) begin
      int d, v;
      d = int'(dst[l]);
      v = (l < d) ? l : l - 1;
      dst_ready[l] = (d < N) && (d != l) && rx_space[d < N ? d : 0][v < NVC ? v : 0];
    end
  end
  assign bus_busy = bus.valid;

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drive));
  initial assert (NLAYERS - 1 <= NVC) else $error("more source layers than VCs");
endmodule
