// dtdma_arbiter: central arbiter of one dTDMA pillar bus.
//
// Clients are the N layers' transceivers. A client requests the bus (req)
// while its output buffer holds a flit, naming the layer it sends to (dst).
// The arbiter gives one timeslot to each requesting client, in layer order,
// so the TDMA frame grows and shrinks with the number of active clients and
// no slot is left idle for a silent client. Whenever the set of requests or
// their targets differs from the one the current frame was built for, load
// is raised for one cycle together with the new configuration: tx_cfg[i] is
// client i's one-hot slot, rx_cfg[j] marks the slots in which layer j's
// receiver must listen, len_m1 is the frame length minus one. All clients'
// shift registers load it at the same clock edge, and the frame is in force
// from the next cycle; granted[i]/granted_dst[i] tell each client which
// request the frame in force serves. Reconfiguration takes one cycle.
// The document gives the dynamic slot count and the central arbiter per
// pillar; the slot order, the change detection and the exact control
// signals are this design's.
module dtdma_arbiter
  import nim_pkg::*;
#(
  parameter int N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [LW-1:0]        dst [N],
  output logic                 load,
  output logic [N-1:0]         tx_cfg [N],
  output logic [N-1:0]         rx_cfg [N],
  output logic [$clog2(N)-1:0] len_m1,
  output logic [N-1:0]         granted,
  output logic [LW-1:0]        granted_dst [N],
  output logic [$clog2(N+1)-1:0] active_slots
);
  localparam int SW = $clog2(N + 1);
  logic [N-1:0]  cur_req;
  logic [LW-1:0] cur_dst [N];
  logic [SW-1:0] slot [N];
  logic [SW-1:0] nact;

  always_comb begin
    nact = '0;
    for (int i = 0; i < N; i++) begin
      slot[i] = nact;
      nact    = nact + SW'(req[i]);
    end
    for (int j = 0; j < N; j++) rx_cfg[j] = '0;
    for (int i = 0; i < N; i++) begin
      tx_cfg[i] = '0;
      if (req[i]) begin
        for (int s = 0; s < N; s++)
          if (int'(slot[i]) == s) begin
            tx_cfg[i][s] = 1'b1;
            for (int j = 0; j < N; j++)
              if (int'(dst[i]) == j) rx_cfg[j][s] = 1'b1;
          end
      end
    end
    len_m1 = (nact == '0) ? '0 : $bits(len_m1)'(nact - 1'b1);
    load = (req != cur_req);
    for (int i = 0; i < N; i++)
      if (req[i] && dst[i] != cur_dst[i]) load = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_req      <= '0;
      active_slots <= '0;
      for (int i = 0; i < N; i++) cur_dst[i] <= '0;
    end else if (load) begin
      cur_req      <= req;
      active_slots <= nact;
      for (int i = 0; i < N; i++) cur_dst[i] <= dst[i];
    end
  end

  assign granted = cur_req;
  always_comb for (int i = 0; i < N; i++) granted_dst[i] = cur_dst[i];
endmodule
