// vc_allocator: virtual-channel allocation (VA) for one output port.
//
// Keeps, for each VC of the downstream buffer, whether a packet owns it and
// how many credits (free flit slots) remain. A VC is free when no packet
// owns it and its buffer is empty (all credits back), so a VC holds one
// message at a time. When a head flit wins the switch for this port (alloc),
// the lowest-numbered free VC is returned combinationally on alloc_vc and
// becomes owned at the clock edge; the tail flit releases it. Each flit sent
// (send) spends one credit of send_vc; credit_in returns one.
// The document names the VA stage and sizes the VCs; the free-VC rule and
// lowest-index choice are this design's.
module vc_allocator
  import nim_pkg::*;
#(
  parameter int DEPTH = VC_DEPTH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  credit_t        credit_in,
  input  logic           alloc,
  output logic [VCW-1:0] alloc_vc,
  output logic           any_free,
  input  logic           send,
  input  logic [VCW-1:0] send_vc,
  input  logic           send_tail,
  output logic [NVC-1:0] has_credit
);
  /*verilator no_inline_module*/
  localparam int CNTW = $clog2(DEPTH + 1);
  logic [NVC-1:0]  busy;
  logic [CNTW-1:0] credits [NVC];
  logic [NVC-1:0]  free;

  always_comb begin
    any_free = 1'b0;
    alloc_vc = '0;
    for (int v = NVC - 1; v >= 0; v--) begin
      free[v]       = !busy[v] && (int'(credits[v]) == DEPTH);
      has_credit[v] = (credits[v] != '0);
      if (free[v]) begin
        any_free = 1'b1;
        alloc_vc = VCW'(v);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int v = 0; v < NVC; v++) credits[v] <= CNTW'(DEPTH);
    end else begin
      for (int v = 0; v < NVC; v++) begin
        credits[v] <= credits[v]
                      - CNTW'(send && int'(send_vc) == v)
                      + CNTW'(credit_in.valid && int'(credit_in.vc) == v);
        if (send && int'(send_vc) == v && send_tail) busy[v] <= 1'b0;
        else if (alloc && int'(alloc_vc) == v)      busy[v] <= 1'b1;
      end
    end
  end

  a_alloc_free:  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> any_free);
  a_credit_left: assert property (@(posedge clk) disable iff (!rst_n)
                                  send |-> has_credit[send_vc]);
endmodule
