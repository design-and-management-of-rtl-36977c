// l2_directory: search, placement and migration control over the cluster
// tag arrays of the 3D NUCA L2.
//
// Holds one cluster_tag_array per cluster (NCX x NCY per layer, NLAYERS
// layers; cluster number = (z * NCY + cy) * NCX + cx) and serves one
// request at a time from the CPUs' side:
//   RQ_ACCESS  two-step search for a line on behalf of the CPU of
//              cluster column (cpu_cx, cpu_cy). Step 1 looks up, in parallel, the
//              CPU's own cluster and the clusters directly above and below
//              it (reached through the CPU's pillar). If none hits, step 2
//              looks up all remaining clusters in parallel. No hit in either
//              step is an L2 miss. On a hit with migrate_en high, the line's
//              tag moves to the cluster chosen by migration_unit (removed
//              from the old cluster, inserted into the new one); the reply
//              gives both places so the line's data can be moved.
//   RQ_FILL    after a miss, places the line in its initial cluster, picked
//              by the low-order tag bits (address_mapper), and reports the
//              way used and any tag evicted by pseudo-LRU replacement.
// migrate_en low gives the static NUCA (no migration).
// Timing: each search step (and each migration operation) costs
// TAG_LAT + 2 cycles: one to issue to the tag arrays, TAG_LAT of tag access,
// one to collect; the reply follows two cycles after the last step.
// The search order, placement and migration rules follow the document; the
// request/reply interface, the one-request-at-a-time service and evicting
// (rather than swapping) a victim displaced by a migration are this
// design's choices.
module l2_directory
  import nim_pkg::*;
#(
  parameter int NCX     = 4,
  parameter int NCY     = 2,
  parameter int NLAYERS = 2,
  parameter int SETS    = 1024,
  parameter int WAYS    = 16,
  parameter int TAG_LAT = 4,
  localparam int NCL = NCX * NCY * NLAYERS,
  localparam int CLW = $clog2(NCL),
  localparam int XW  = $clog2(NCX > 1 ? NCX : 2),
  localparam int YW  = $clog2(NCY > 1 ? NCY : 2),
  localparam int WW  = $clog2(WAYS),
  localparam int SW  = $clog2(SETS),
  localparam int TAG_W = ADDR_W - 6 - SW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              migrate_en,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_fill,    // 0: RQ_ACCESS, 1: RQ_FILL
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [XW-1:0]     req_cpu_cx,
  input  logic [YW-1:0]     req_cpu_cy,
  output logic              resp_valid,
  output logic              resp_hit,
  output logic [1:0]        resp_step,      // search step that hit (1 or 2)
  output logic [CLW-1:0]    resp_cluster,   // where the line is (was)
  output logic [WW-1:0]     resp_way,
  output logic              resp_migrated,
  output logic [CLW-1:0]    resp_new_cluster,
  output logic [WW-1:0]     resp_new_way,
  output logic              resp_evict,
  output logic [TAG_W-1:0]  resp_evict_tag
);
  typedef enum logic [2:0] {S_IDLE, S_STEP1, S_STEP2, S_INV, S_INS, S_RESP} state_e;
  state_e st;

  logic [NCL-1:0]   t_valid, t_ready, t_rv, t_hit, t_ev;
  logic [1:0]       t_op;
  logic [WW-1:0]    t_way [NCL];
  logic [TAG_W-1:0] t_evtag [NCL];
  logic             issued;

  logic [ADDR_W-1:0] a;
  logic [XW-1:0]     ccx;
  logic [YW-1:0]     ccy;
  logic              fill;
  logic [SW-1:0]     set_idx;
  logic [TAG_W-1:0]  tag;
  logic [CLW-1:0]    init_cl;
  logic [NCL-1:0]    step1_mask;
  logic [3:0]        bank_unused;
  logic [SW-5:0]     sib_unused;

  address_mapper #(.BANK_W(4), .SET_W(SW - 4), .CLUSTER_W(CLW)) u_map (
    .addr(a), .cluster(init_cl), .bank(bank_unused), .set_in_bank(sib_unused), .index(set_idx), .tag(tag));

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    cluster_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .TAG_LAT(TAG_LAT)) u_tags (
      .clk, .rst_n, .op_valid(t_valid[c]), .op(t_op), .set_idx, .tag,
      .op_ready(t_ready[c]), .res_valid(t_rv[c]), .res_hit(t_hit[c]), .res_way(t_way[c]),
      .res_evict(t_ev[c]), .res_evict_tag(t_evtag[c]));
  end

  function automatic logic [CLW-1:0] cl_num(input int cx, input int cy, input int z);
    return CLW'((z * NCY + cy) * NCX + cx);
  endfunction

  always_comb
    for (int c = 0; c < NCL; c++)
      step1_mask[c] = ((c % NCX) == int'(ccx)) && (((c / NCX) % NCY) == int'(ccy));

  // Hit cluster decoding and migration choice.
  logic           any_hit;
  logic [CLW-1:0] hit_cl;
  logic           mig;
  logic [XW-1:0]  ncx;
  logic [YW-1:0]  ncy;
  always_comb begin
    any_hit = 1'b0;
    hit_cl  = '0;
    for (int c = NCL - 1; c >= 0; c--)
      if (t_rv[c] && t_hit[c]) begin any_hit = 1'b1; hit_cl = CLW'(c); end
  end
  migration_unit #(.NCX(NCX), .NCY(NCY), .NLAYERS(NLAYERS)) u_mig (
    .line_cx(XW'(int'(resp_cluster) % NCX)),
    .line_cy(YW'((int'(resp_cluster) / NCX) % NCY)),
    .line_z (LW'(int'(resp_cluster) / (NCX * NCY))),
    .cpu_cx(ccx), .cpu_cy(ccy),
    .migrate(mig), .next_cx(ncx), .next_cy(ncy));

  assign req_ready = (st == S_IDLE) && (&t_ready);

  always_comb begin
    t_valid = '0;
    t_op    = 2'd0;
    if (!issued)
      case (st)
        S_STEP1: t_valid = fill ? (NCL'(1) << init_cl) : step1_mask;
        S_STEP2: t_valid = ~step1_mask;
        S_INV:   t_valid = mig ? (NCL'(1) << resp_cluster) : '0;
        S_INS:   t_valid = NCL'(1) << resp_new_cluster;
        default: t_valid = '0;
      endcase
    case (st)
      S_INV:   t_op = 2'd2;
      S_INS:   t_op = 2'd1;
      S_STEP1: t_op = fill ? 2'd1 : 2'd0;
      default: t_op = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issued <= 1'b0; a <= '0; ccx <= '0; ccy <= '0; fill <= 1'b0;
      resp_valid <= 1'b0; resp_hit <= 1'b0; resp_step <= '0; resp_cluster <= '0;
      resp_way <= '0; resp_migrated <= 1'b0; resp_new_cluster <= '0; resp_new_way <= '0;
      resp_evict <= 1'b0; resp_evict_tag <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (st)
        S_IDLE: if (req_valid && req_ready) begin
          a <= req_addr; ccx <= req_cpu_cx; ccy <= req_cpu_cy;
          fill <= req_fill; issued <= 1'b0; st <= S_STEP1;
          resp_hit <= 1'b0; resp_step <= '0; resp_migrated <= 1'b0;
          resp_evict <= 1'b0; resp_evict_tag <= '0;
        end
        S_STEP1, S_STEP2: begin
          issued <= 1'b1;
          if (|t_rv) begin
            issued <= 1'b0;
            if (fill) begin
              resp_hit <= 1'b0; resp_cluster <= init_cl; resp_way <= t_way[init_cl];
              resp_evict <= t_ev[init_cl]; resp_evict_tag <= t_evtag[init_cl];
              st <= S_RESP;
            end else if (any_hit) begin
              resp_hit <= 1'b1; resp_cluster <= hit_cl; resp_way <= t_way[hit_cl];
              resp_step <= (st == S_STEP1) ? 2'd1 : 2'd2;
              st <= migrate_en ? S_INV : S_RESP;
            end else st <= (st == S_STEP1) ? S_STEP2 : S_RESP;
          end
        end
        S_INV: begin
          // decide once, on entry: leave the line where it is if at target
          if (!issued && !mig) st <= S_RESP;
          else begin
            issued <= 1'b1;
            if (!issued) resp_new_cluster <= cl_num(int'(ncx), int'(ncy), int'(resp_cluster) / (NCX * NCY));
            if (|t_rv) begin issued <= 1'b0; st <= S_INS; end
          end
        end
        S_INS: begin
          issued <= 1'b1;
          if (|t_rv) begin
            issued <= 1'b0;
            resp_migrated <= 1'b1;
            resp_new_way <= t_way[resp_new_cluster];
            resp_evict <= t_ev[resp_new_cluster];
            resp_evict_tag <= t_evtag[resp_new_cluster];
            st <= S_RESP;
          end
        end
        S_RESP: begin
          resp_valid <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
