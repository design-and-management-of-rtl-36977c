// switch_allocator: switch allocation (SA) of the NoC router.
//
// Separable, input-first allocation. Stage 1: every input port picks one of
// its eligible VCs round-robin. Stage 2: every output port picks, round-robin,
// one of the input ports whose stage-1 choice wants it. At most one flit per
// input and per output crosses the crossbar each cycle. Combinational from
// the requests; the round-robin pointers move only for requests that won
// both stages. An input VC is eligible when its front flit can move this
// cycle (the router checks VC and credit availability), so VA and SA fit in
// the same cycle, as the single-stage router needs.
// The document names the SA stage; the separable round-robin scheme is this
// design's choice.
module switch_allocator
  import nim_pkg::*;
#(
  parameter int NP = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NVC-1:0] elig   [NP],
  input  logic [2:0]     want   [NP][NVC],
  output logic           in_win [NP],
  output logic [VCW-1:0] in_vc  [NP],
  output logic           out_valid [NP],
  output logic [2:0]     out_in    [NP]
);
  /*verilator no_inline_module*/
  logic [NVC-1:0] s1_grant [NP];
  logic [VCW-1:0] s1_idx   [NP];
  logic           s1_any   [NP];
  logic [NP-1:0]  s2_req   [NP];
  logic [NP-1:0]  s2_grant [NP];
  logic [$clog2(NP)-1:0] s2_idx [NP];
  logic           s2_any   [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(elig[i]), .update(in_win[i]),
      .grant(s1_grant[i]), .grant_idx(s1_idx[i]), .any(s1_any[i]));
  end

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++)
        s2_req[o][i] = s1_any[i] && (int'(want[i][s1_idx[i]]) == o);
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n, .req(s2_req[o]), .update(1'b1),
      .grant(s2_grant[o]), .grant_idx(s2_idx[o]), .any(s2_any[o]));
    assign out_valid[o] = s2_any[o];
    assign out_in[o]    = 3'(s2_idx[o]);
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      in_win[i] = 1'b0;
      in_vc[i]  = s1_idx[i];
      for (int o = 0; o < NP; o++)
        if (s2_grant[o][i]) in_win[i] = 1'b1;
    end
  end
endmodule
