// rr_arbiter: N-way round-robin arbiter.
//
// grant is one-hot over the requesters, searching from the position after
// the last winner; it is purely combinational from req and the pointer.
// When update is high in a cycle with a grant, the pointer moves to the
// position after the winner at the clock edge, so every requester is served
// within N grants. Reset puts the highest priority on requester 0.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic         any
);
  /*verilator no_inline_module*/
  localparam int IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any            = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (update && any) ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end
endmodule
