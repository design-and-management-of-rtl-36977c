// cluster_tag_array: the tag array of one L2 cluster.
//
// Holds the tags of every line stored in the cluster's 16 banks: SETS sets
// (the 10-bit cache index) of WAYS ways, each entry a valid bit and a TAG_W
// tag, plus WAYS-1 pseudo-LRU bits per set (plru_tree). One operation at a
// time, accepted when op_ready, answered after TAG_LAT cycles with a
// one-cycle res_valid pulse:
//   OP_LOOKUP     res_hit/res_way; a hit makes the way most recently used.
//   OP_INSERT     places the tag (invalid way first, else the pseudo-LRU
//                 victim, reported in res_evict/res_evict_tag), marks it
//                 most recently used and returns the way. Inserting a tag
//                 already present just returns its way.
//   OP_INVALIDATE removes the tag if present (res_hit tells whether it was).
// After reset the array clears itself one set per cycle (SETS cycles)
// before op_ready rises.
// The document gives the per-cluster tag array, its 4-cycle access and the
// pseudo-LRU replacement; the operation set and the entry format are this
// design's (17-bit entries make 34 KB where the document states 24 KB).
module cluster_tag_array #(
  parameter int SETS    = 1024,
  parameter int WAYS    = 16,
  parameter int TAG_W   = 16,
  parameter int TAG_LAT = 4,
  localparam int SW     = $clog2(SETS),
  localparam int WW     = $clog2(WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_valid,
  input  logic [1:0]       op,         // 0 lookup, 1 insert, 2 invalidate
  input  logic [SW-1:0]    set_idx,
  input  logic [TAG_W-1:0] tag,
  output logic             op_ready,
  output logic             res_valid,
  output logic             res_hit,
  output logic [WW-1:0]    res_way,
  output logic             res_evict,
  output logic [TAG_W-1:0] res_evict_tag
);
  localparam logic [1:0] OP_LOOKUP = 2'd0, OP_INSERT = 2'd1, OP_INVALIDATE = 2'd2;
  localparam int EW = TAG_W + 1;             // {valid, tag}
  localparam int TW = $clog2(TAG_LAT + 1);

  logic [WAYS*EW-1:0] row  [SETS];
  logic [WAYS-2:0]    plru [SETS];

  logic            clearing;
  logic [SW-1:0]   clr_idx;
  logic            busy;
  logic [TW-1:0]   t;
  logic [1:0]      q_op;
  logic [SW-1:0]   q_set;
  logic [TAG_W-1:0] q_tag;

  logic [WAYS*EW-1:0] cur_row, new_row;
  logic [WAYS-2:0]    cur_plru, new_plru;
  logic               hit, has_inv, do_write;
  logic [WW-1:0]      hit_way, inv_way, way, victim;
  logic [EW-1:0]      e;

  assign op_ready = !clearing && !busy;
  assign cur_row  = row[q_set];
  assign cur_plru = plru[q_set];

  plru_tree #(.WAYS(WAYS)) u_plru (
    .state(cur_plru), .access(way), .next_state(new_plru), .victim(victim));

  always_comb begin
    hit = 1'b0; hit_way = '0; has_inv = 1'b0; inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      e = cur_row[w*EW +: EW];
      if (e[EW-1] && e[TAG_W-1:0] == q_tag) begin hit = 1'b1; hit_way = WW'(w); end
      if (!e[EW-1]) begin has_inv = 1'b1; inv_way = WW'(w); end
    end
    way = hit ? hit_way : (has_inv ? inv_way : victim);
    new_row  = cur_row;
    do_write = 1'b0;
    if (q_op == OP_INSERT) begin
      new_row[way*EW +: EW] = {1'b1, q_tag};
      do_write = 1'b1;
    end else if (q_op == OP_INVALIDATE && hit) begin
      new_row[hit_way*EW +: EW] = '0;
      do_write = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing  <= 1'b1;
      clr_idx   <= '0;
      busy      <= 1'b0;
      t         <= '0;
      q_op      <= '0;
      q_set     <= '0;
      q_tag     <= '0;
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_way   <= '0;
      res_evict <= 1'b0;
      res_evict_tag <= '0;
    end else begin
      res_valid <= 1'b0;
      if (clearing) begin
        clr_idx <= clr_idx + 1'b1;
        if (int'(clr_idx) == SETS - 1) clearing <= 1'b0;
      end else if (op_valid && op_ready) begin
        busy  <= 1'b1;
        t     <= TW'(TAG_LAT - 1);
        q_op  <= op;
        q_set <= set_idx;
        q_tag <= tag;
      end else if (busy) begin
        if (t == '0) begin
          busy      <= 1'b0;
          res_valid <= 1'b1;
          res_hit   <= hit;
          res_way   <= (q_op == OP_INVALIDATE) ? hit_way : way;
          res_evict <= (q_op == OP_INSERT) && !hit && !has_inv;
          res_evict_tag <= cur_row[victim*EW +: TAG_W];
        end else t <= t - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clearing) begin
      row[clr_idx]  <= '0;
      plru[clr_idx] <= '0;
    end else if (busy && t == '0) begin
      if (do_write) row[q_set] <= new_row;
      if (hit || q_op == OP_INSERT) plru[q_set] <= new_plru;
    end
  end
endmodule
