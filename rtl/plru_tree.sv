// plru_tree: tree pseudo-LRU replacement for one set of WAYS ways.
//
// The set's state is WAYS-1 bits, one per node of a binary tree over the
// ways (node 0 is the root, node n has children 2n+1 and 2n+2). A node bit
// of 0 means the left half was used more recently, so the victim lies to
// the right; 1 points left. victim follows the bits from the root.
// next_state is the state after an access to way `access`: every node on
// that way's path is set to point away from it. Combinational.
// The document asks for a pseudo-LRU policy; the tree form is this
// design's choice.
module plru_tree #(
  parameter int WAYS = 16,
  localparam int LW  = $clog2(WAYS)
) (
  input  logic [WAYS-2:0] state,
  input  logic [LW-1:0]   access,
  output logic [WAYS-2:0] next_state,
  output logic [LW-1:0]   victim
);
  always_comb begin
    int n;
    // victim: walk down following the bits
    n = 0;
    for (int l = 0; l < LW; l++) begin
      victim[LW-1-l] = !state[n];
      n = 2 * n + 1 + (state[n] ? 0 : 1);
    end
  end

  // update: point every node on the accessed path away from it
  always_comb begin
    int n;
    next_state = state;
    n = 0;
    for (int l = 0; l < LW; l++) begin
      next_state[n] = access[LW-1-l];
      n = 2 * n + 1 + int'(access[LW-1-l]);
    end
  end
endmodule
