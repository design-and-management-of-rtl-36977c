// nim_3d_top: 3D Network-in-Memory shared L2 for a chip multiprocessor.
//
// NLAYERS stacked device layers, each a MESH_X x MESH_Y mesh of single-stage
// routers (noc_router), one per node. The layer is cut into 4x4-node
// clusters; each cluster has one pillar node, two nodes in from its corner,
// whose router has a sixth, vertical port onto that cluster's dTDMA pillar
// (dtdma_pillar), a bus reaching the same node position on every layer in
// one hop. Every pillar carries exactly one CPU: the CPU of cluster
// (cx, cy) sits on layer (cx + cy) mod NLAYERS, so CPUs are offset in all
// three dimensions and never stacked. Every other node is a 64 KB L2 bank
// (l2_bank) behind a network interface (network_interface).
//
// The CPUs (with their L1 caches) are outside this design: each CPU node's
// network interface is brought out as ports, indexed c = cy * NCX + cx.
// A CPU sends msg_t requests (read or write of a line, destination bank in
// dst, its own node in src) and receives the banks' replies. Packets are
// routed X then Y inside a layer; a packet for another layer goes to the
// pillar picked by the sending interface, crosses on the bus and continues
// X then Y. One cycle per router hop.
//
// The L2 directory (l2_directory) holds one tag array per cluster and is
// reached through the dir_* ports: the agent serving a CPU's L2 request
// asks it where a line is (two-step search), places a line fetched on a
// miss, and, with migrate_en high (the dynamic CMP-DNUCA-3D policy), has a
// hit move the line one cluster closer to the CPU; with migrate_en low the
// placement is static (CMP-SNUCA-3D). The directory reports the move and
// any eviction; copying the line's data between banks is left to that
// agent, which sends ordinary read and write messages through the network.
//
// Defaults follow the document's main configuration: 2 layers, 8 pillars,
// 8 CPUs, 128-bit flits. With a 16 x 8 mesh per layer there are 256 nodes;
// the 8 CPU nodes take 8 of them, leaving 248 banks (15.5 MB) where the
// document counts 256 banks (16 MB) besides the CPUs.
module nim_3d_top
  import nim_pkg::*;
#(
  parameter int MESH_X  = 16,
  parameter int MESH_Y  = 8,
  parameter int NLAYERS = 2,
  parameter int LINES   = 1024,
  parameter int BANK_LAT = 5,
  localparam int NCX  = MESH_X / CLUSTER_DIM,
  localparam int NCY  = MESH_Y / CLUSTER_DIM,
  localparam int NCPU = NCX * NCY
) (
  input  logic    clk,
  input  logic    rst_n,
  input  msg_t    cpu_tx_msg   [NCPU],
  input  logic    cpu_tx_valid [NCPU],
  output logic    cpu_tx_ready [NCPU],
  output msg_t    cpu_rx_msg   [NCPU],
  output logic    cpu_rx_valid [NCPU],
  input  logic    cpu_rx_ready [NCPU],
  // L2 directory (cluster tag arrays): search / fill requests from the CPUs
  input  logic                migrate_en,
  input  logic                dir_req_valid,
  output logic                dir_req_ready,
  input  logic                dir_req_fill,
  input  logic [ADDR_W-1:0]   dir_req_addr,
  input  logic [$clog2(NCX > 1 ? NCX : 2)-1:0] dir_req_cpu_cx,
  input  logic [$clog2(NCY > 1 ? NCY : 2)-1:0] dir_req_cpu_cy,
  output logic                dir_resp_valid,
  output logic                dir_resp_hit,
  output logic [1:0]          dir_resp_step,
  output logic [$clog2(NCX*NCY*NLAYERS)-1:0] dir_resp_cluster,
  output logic [3:0]          dir_resp_way,
  output logic                dir_resp_migrated,
  output logic [$clog2(NCX*NCY*NLAYERS)-1:0] dir_resp_new_cluster,
  output logic [3:0]          dir_resp_new_way,
  output logic                dir_resp_evict,
  output logic [ADDR_W-17:0]  dir_resp_evict_tag
);
  // Link wiring, per node and port. f_out/c_out: what the router drives
  // (flits out, credits for its inputs); f_in/c_in: what it receives.
  flit_t   f_out [NLAYERS][MESH_Y][MESH_X][6];
  flit_t   f_in  [NLAYERS][MESH_Y][MESH_X][6];
  credit_t c_out [NLAYERS][MESH_Y][MESH_X][6];
  credit_t c_in  [NLAYERS][MESH_Y][MESH_X][6];

  for (genvar z = 0; z < NLAYERS; z++) begin : g_z
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      for (genvar x = 0; x < MESH_X; x++) begin : g_x
        localparam bit PIL = (x % CLUSTER_DIM == CLUSTER_DIM / 2) &&
                             (y % CLUSTER_DIM == CLUSTER_DIM / 2);
        localparam int CX  = x / CLUSTER_DIM;
        localparam int CY  = y / CLUSTER_DIM;
        localparam bit CPU = PIL && cpu_here(CX, CY, z, NLAYERS);
        localparam int NP  = PIL ? 6 : 5;

        // Neighbour links (mesh edges are tied off).
        always_comb begin
          f_in[z][y][x][P_N] = (y > 0)          ? f_out[z][(y>0)?y-1:0][x][P_S] : '0;
          c_in[z][y][x][P_N] = (y > 0)          ? c_out[z][(y>0)?y-1:0][x][P_S] : '0;
          f_in[z][y][x][P_S] = (y < MESH_Y - 1) ? f_out[z][(y<MESH_Y-1)?y+1:y][x][P_N] : '0;
          c_in[z][y][x][P_S] = (y < MESH_Y - 1) ? c_out[z][(y<MESH_Y-1)?y+1:y][x][P_N] : '0;
          f_in[z][y][x][P_W] = (x > 0)          ? f_out[z][y][(x>0)?x-1:0][P_E] : '0;
          c_in[z][y][x][P_W] = (x > 0)          ? c_out[z][y][(x>0)?x-1:0][P_E] : '0;
          f_in[z][y][x][P_E] = (x < MESH_X - 1) ? f_out[z][y][(x<MESH_X-1)?x+1:x][P_W] : '0;
          c_in[z][y][x][P_E] = (x < MESH_X - 1) ? c_out[z][y][(x<MESH_X-1)?x+1:x][P_W] : '0;
        end

        flit_t   r_in   [NP];
        flit_t   r_out  [NP];
        credit_t r_cin  [NP];
        credit_t r_cout [NP];
        always_comb
          for (int p = 0; p < NP; p++) begin
            r_in[p]  = f_in[z][y][x][p];
            r_cin[p] = c_in[z][y][x][p];
            f_out[z][y][x][p] = r_out[p];
            c_out[z][y][x][p] = r_cout[p];
          end
        if (!PIL) begin : g_nov
          assign f_out[z][y][x][P_V] = '0;
          assign c_out[z][y][x][P_V] = '0;
          assign f_in[z][y][x][P_V]  = '0;
          assign c_in[z][y][x][P_V]  = '0;
        end

        noc_router #(.NP(NP), .MY_X(x), .MY_Y(y), .MY_Z(z)) u_router (
          .clk, .rst_n, .in_flit(r_in), .in_credit(r_cout),
          .out_flit(r_out), .out_credit(r_cin));

        // Processing element on the local port.
        msg_t ni_tx, ni_rx;
        logic ni_tx_v, ni_tx_r, ni_rx_v, ni_rx_r;
        network_interface #(.MY_X(x), .MY_Y(y), .MY_Z(z), .NCX(NCX), .NCY(NCY)) u_ni (
          .clk, .rst_n,
          .tx_msg(ni_tx), .tx_valid(ni_tx_v), .tx_ready(ni_tx_r),
          .rx_msg(ni_rx), .rx_valid(ni_rx_v), .rx_ready(ni_rx_r),
          .to_rt(f_in[z][y][x][P_LOCAL]), .to_rt_credit(c_out[z][y][x][P_LOCAL]),
          .from_rt(f_out[z][y][x][P_LOCAL]), .from_rt_credit(c_in[z][y][x][P_LOCAL]));

        if (CPU) begin : g_cpu
          localparam int C = CY * NCX + CX;
          assign ni_tx           = cpu_tx_msg[C];
          assign ni_tx_v         = cpu_tx_valid[C];
          assign cpu_tx_ready[C] = ni_tx_r;
          assign cpu_rx_msg[C]   = ni_rx;
          assign cpu_rx_valid[C] = ni_rx_v;
          assign ni_rx_r         = cpu_rx_ready[C];
        end else begin : g_bank
          l2_bank #(.LINES(LINES), .ACCESS_LAT(BANK_LAT), .MY_X(x), .MY_Y(y), .MY_Z(z)) u_bank (
            .clk, .rst_n,
            .req(ni_rx), .req_valid(ni_rx_v), .req_ready(ni_rx_r),
            .resp(ni_tx), .resp_valid(ni_tx_v), .resp_ready(ni_tx_r));
        end
      end
    end
  end

  // One dTDMA pillar per cluster.
  for (genvar cy = 0; cy < NCY; cy++) begin : g_py
    for (genvar cx = 0; cx < NCX; cx++) begin : g_px
      localparam int PX = cx * CLUSTER_DIM + CLUSTER_DIM / 2;
      localparam int PY = cy * CLUSTER_DIM + CLUSTER_DIM / 2;
      flit_t   p_rt_out [NLAYERS];
      credit_t p_rt_oc  [NLAYERS];
      flit_t   p_rt_in  [NLAYERS];
      credit_t p_rt_ic  [NLAYERS];
      logic [$clog2(NLAYERS+1)-1:0] p_slots;
      logic    p_busy;
      for (genvar z = 0; z < NLAYERS; z++) begin : g_l
        assign p_rt_out[z]          = f_out[z][PY][PX][P_V];
        assign c_in[z][PY][PX][P_V] = p_rt_oc[z];
        assign f_in[z][PY][PX][P_V] = p_rt_in[z];
        assign p_rt_ic[z]           = c_out[z][PY][PX][P_V];
      end
      dtdma_pillar #(.NLAYERS(NLAYERS)) u_pillar (
        .clk, .rst_n,
        .rt_out(p_rt_out), .rt_out_credit(p_rt_oc),
        .rt_in(p_rt_in),   .rt_in_credit(p_rt_ic),
        .active_slots(p_slots), .bus_busy(p_busy));
    end
  end

  // Tag arrays of all clusters with the search, placement and migration
  // control (16 ways, 1024 sets of a 1 MB cluster, 4-cycle tag access).
  l2_directory #(.NCX(NCX), .NCY(NCY), .NLAYERS(NLAYERS),
                 .SETS(1024), .WAYS(16), .TAG_LAT(4)) u_dir (
    .clk, .rst_n, .migrate_en,
    .req_valid(dir_req_valid), .req_ready(dir_req_ready), .req_fill(dir_req_fill),
    .req_addr(dir_req_addr), .req_cpu_cx(dir_req_cpu_cx), .req_cpu_cy(dir_req_cpu_cy),
    .resp_valid(dir_resp_valid), .resp_hit(dir_resp_hit), .resp_step(dir_resp_step),
    .resp_cluster(dir_resp_cluster), .resp_way(dir_resp_way),
    .resp_migrated(dir_resp_migrated), .resp_new_cluster(dir_resp_new_cluster),
    .resp_new_way(dir_resp_new_way), .resp_evict(dir_resp_evict),
    .resp_evict_tag(dir_resp_evict_tag));
endmodule
