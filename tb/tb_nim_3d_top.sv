// tb_nim_3d_top: end-to-end test of the 3D Network-in-Memory at a reduced
// size: 2 layers of 8 x 4 nodes, i.e. 2 clusters of 4 x 4 per layer, 2
// pillars, 2 CPUs (one per pillar, on alternating layers), 62 L2 banks.
// The testbench plays the two CPUs and the L2 directory's client.
//  1. Hop latency: with the network idle, CPU 0 reads a bank 1 hop away and
//     one 3 hops away on its own layer; the round trip must grow by exactly
//     4 cycles (2 more hops each way at one cycle per router).
//  2. Traffic: both CPUs stream writes to random banks on both layers
//     without waiting for the acknowledgements, then stream reads of the
//     same lines; replies are matched by message id and the data compared.
//  3. Hot spot: both CPUs stream reads to one bank of the other layer, so
//     requests and replies share a pillar in both directions at once.
//  4. L2 directory: a miss, a fill, a step-1 hit for the CPU on the line's
//     column, a step-2 hit for the other CPU, the line read over the
//     network from the bank the directory names, a migration with
//     migrate_en high (dynamic mode) and none with it low (static mode), and
//     an eviction when a 17th line enters a full set.
// It counts, and fails unless each happened at least once: pillar bus
// transfers, pillar frames with two active timeslots, flits kept waiting
// by a router for a busy output, CPU requests held back by a network
// interface, directory misses, step-1 and step-2 hits, migrations and
// evictions. Replies are taken by an always block per CPU, so the CPU side
// never stalls the network.
module tb_nim_3d_top;
  import nim_pkg::*;
  localparam int MX = 8, MYY = 4, NL = 2;
  localparam int NCX = MX / 4, NCY = MYY / 4, NCPU = NCX * NCY, NCL = NCX * NCY * NL;
  localparam int XW = $clog2(NCX > 1 ? NCX : 2), YW = $clog2(NCY > 1 ? NCY : 2);
  localparam int CLW = $clog2(NCL);
  localparam int NWR = 16;   // lines written per CPU in phase 2
  localparam int NHOT = 8;   // reads per CPU in phase 3
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  msg_t cpu_tx_msg [NCPU], cpu_rx_msg [NCPU];
  logic cpu_tx_valid [NCPU], cpu_tx_ready [NCPU], cpu_rx_valid [NCPU], cpu_rx_ready [NCPU];
  logic migrate_en, dir_req_valid, dir_req_ready, dir_req_fill;
  logic [31:0] dir_req_addr;
  logic [XW-1:0] dir_req_cpu_cx;
  logic [YW-1:0] dir_req_cpu_cy;
  logic dir_resp_valid, dir_resp_hit, dir_resp_migrated, dir_resp_evict;
  logic [1:0] dir_resp_step;
  logic [CLW-1:0] dir_resp_cluster, dir_resp_new_cluster;
  logic [3:0] dir_resp_way, dir_resp_new_way;
  logic [15:0] dir_resp_evict_tag;

  nim_3d_top #(.MESH_X(MX), .MESH_Y(MYY), .NLAYERS(NL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic coord_t cpu_pos(int c);
    int cx, cy;
    cx = c % NCX; cy = c / NCX;
    return '{x: CW'(cx * 4 + 2), y: CW'(cy * 4 + 2), z: LW'((cx + cy) % NL)};
  endfunction
  function automatic bit is_cpu(coord_t p);
    for (int c = 0; c < NCPU; c++) if (cpu_pos(c) == p) return 1;
    return 0;
  endfunction
  function automatic coord_t rand_bank();
    coord_t p;
    do p = '{x: CW'($urandom_range(0, MX - 1)), y: CW'($urandom_range(0, MYY - 1)),
             z: LW'($urandom_range(0, NL - 1))};
    while (is_cpu(p));
    return p;
  endfunction

  // replies: one queue per CPU, with the cycle each arrived
  msg_t rxq [NCPU][$];
  int   rxt [NCPU][$];
  for (genvar c = 0; c < NCPU; c++) begin : g_rx
    always @(posedge clk) if (rst_n && cpu_rx_valid[c] && cpu_rx_ready[c]) begin
      rxq[c].push_back(cpu_rx_msg[c]);
      rxt[c].push_back(cyc);
    end
  end

  // hand one request to CPU c's network interface; returns the cycle it was taken
  task automatic send(input int c, input bit wr, input coord_t bank, input logic [31:0] a,
                      input logic [7:0] id, input logic [LINE_W-1:0] d, output int t);
    msg_t m;
    m = '0;
    m.dst = bank; m.src = cpu_pos(c); m.addr = a; m.id = id;
    m.mtype = wr ? MSG_WR_REQ : MSG_RD_REQ; m.has_data = wr; m.data = d;
    @(negedge clk);
    cpu_tx_msg[c] = m; cpu_tx_valid[c] = 1;
    #1;
    while (!cpu_tx_ready[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    t = cyc;
    #1 cpu_tx_valid[c] = 0;
  endtask

  task automatic get(input int c, output msg_t r, output int t);
    while (rxq[c].size() == 0) @(negedge clk);
    r = rxq[c].pop_front();
    t = rxt[c].pop_front();
  endtask

  // mechanism counters; per-instance counters are summed at the end
  int bus_cnt [NCY][NCX], two_cnt [NCY][NCX];
  for (genvar py = 0; py < NCY; py++) begin : g_pc_y
    for (genvar px = 0; px < NCX; px++) begin : g_pc_x
      initial begin bus_cnt[py][px] = 0; two_cnt[py][px] = 0; end
      always @(posedge clk) if (rst_n) begin
        if (dut.g_py[py].g_px[px].p_busy) bus_cnt[py][px]++;
        if (dut.g_py[py].g_px[px].p_slots == 2) two_cnt[py][px]++;
      end
    end
  end
  int rt_cnt [NL][MYY][MX];
  for (genvar z = 0; z < NL; z++) begin : g_rc_z
    for (genvar y = 0; y < MYY; y++) begin : g_rc_y
      for (genvar x = 0; x < MX; x++) begin : g_rc_x
        initial rt_cnt[z][y][x] = 0;
        always @(posedge clk) if (rst_n)
          for (int i = 0; i < 5; i++)
            if (dut.g_z[z].g_y[y].g_x[x].u_router.elig[i] != '0 &&
                !dut.g_z[z].g_y[y].g_x[x].u_router.in_win[i])
              rt_cnt[z][y][x]++;
      end
    end
  end
  int ni_wait = 0;
  int d_miss = 0, d_s1 = 0, d_s2 = 0, d_mig = 0, d_ev = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCPU; c++) if (cpu_tx_valid[c] && !cpu_tx_ready[c]) ni_wait++;
    if (dir_resp_valid) begin
      if (dir_resp_hit && dir_resp_step == 1) d_s1++;
      if (dir_resp_hit && dir_resp_step == 2) d_s2++;
      if (dir_resp_migrated) d_mig++;
      if (dir_resp_evict) d_ev++;
    end
  end

  task automatic dir_op(input bit fill, input logic [31:0] a, input int cpu);
    @(negedge clk);
    while (!dir_req_ready) @(negedge clk);
    dir_req_valid = 1; dir_req_fill = fill; dir_req_addr = a;
    dir_req_cpu_cx = XW'(cpu % NCX); dir_req_cpu_cy = YW'(cpu / NCX);
    @(posedge clk); #1 dir_req_valid = 0;
    while (!dir_resp_valid) begin @(posedge clk); #1; end
    if (!fill && !dir_resp_hit) d_miss++;
  endtask

  // node of bank b (address bits 9:6) of cluster cl; an index that falls on
  // the cluster's CPU node uses the node beside it
  function automatic coord_t bank_node(int cl, int b);
    coord_t p;
    p.x = CW'((cl % NCX) * 4 + b % 4);
    p.y = CW'(((cl / NCX) % NCY) * 4 + b / 4);
    p.z = LW'(cl / (NCX * NCY));
    if (is_cpu(p)) p.x = p.x + 1'b1;
    return p;
  endfunction

  logic [LINE_W-1:0] refd [NCPU][NWR];
  coord_t banks [NCPU][NWR];

  initial begin
    msg_t r;
    int t0, t1, t3;
    for (int c = 0; c < NCPU; c++) begin
      cpu_tx_msg[c] = '0; cpu_tx_valid[c] = 0; cpu_rx_ready[c] = 1;
    end
    migrate_en = 0; dir_req_valid = 0; dir_req_fill = 0; dir_req_addr = 0;
    dir_req_cpu_cx = 0; dir_req_cpu_cy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. hop latency (CPU 0 sits at (2,2,0))
    send(0, 0, '{x: 3, y: 2, z: 0}, 32'h0, 8'd1, '0, t0);
    get(0, r, t1);
    t1 = t1 - t0;
    send(0, 0, '{x: 5, y: 2, z: 0}, 32'h0, 8'd2, '0, t0);
    get(0, r, t3);
    t3 = t3 - t0;
    check(r.mtype == MSG_RD_RESP && r.src == '{x: 5, y: 2, z: 0} && r.id == 8'd2, "reply from the right bank");
    check(t3 - t1 == 4, $sformatf("one cycle per router hop (%0d vs %0d cycles)", t1, t3));
    $display("round trip at idle: 1 hop %0d cycles, 3 hops %0d cycles", t1, t3);

    // 2. both CPUs stream writes, then reads of the same lines
    for (int c = 0; c < NCPU; c++)
      for (int i = 0; i < NWR; i++) begin
        banks[c][i] = rand_bank();
        for (int w = 0; w < 16; w++) refd[c][i][w*32 +: 32] = $urandom;
      end
    for (int c = 0; c < NCPU; c++) begin
      fork
        automatic int cc = c;
        begin
          automatic msg_t rr;
          automatic int t;
          automatic bit seen [NWR];
          for (int i = 0; i < NWR; i++) seen[i] = 0;
          for (int i = 0; i < NWR; i++)
            send(cc, 1, banks[cc][i], (32'(cc) << 20) | (32'(i) << 10), 8'(i), refd[cc][i], t);
          for (int i = 0; i < NWR; i++) begin
            get(cc, rr, t);
            check(rr.mtype == MSG_WR_ACK && int'(rr.id) < NWR && !seen[rr.id] &&
                  rr.src == banks[cc][rr.id] && rr.dst == cpu_pos(cc), "write acknowledged by its bank");
            if (int'(rr.id) < NWR) seen[rr.id] = 1;
          end
          for (int i = 0; i < NWR; i++)
            send(cc, 0, banks[cc][i], (32'(cc) << 20) | (32'(i) << 10), 8'(i), '0, t);
          for (int i = 0; i < NWR; i++) begin
            get(cc, rr, t);
            check(rr.mtype == MSG_RD_RESP && int'(rr.id) < NWR && rr.src == banks[cc][rr.id] &&
                  rr.data == refd[cc][rr.id], $sformatf("CPU %0d line %0d read back", cc, rr.id));
          end
        end
      join_none
    end
    wait fork;

    // 3. hot spot: both CPUs read bank (3,2,1), right above CPU 0's pillar
    for (int c = 0; c < NCPU; c++) begin
      fork
        automatic int cc = c;
        begin
          automatic msg_t rr;
          automatic int t;
          for (int i = 0; i < NHOT; i++)
            send(cc, 0, '{x: 3, y: 2, z: 1}, 32'(i) << 10, 8'(100 + i), '0, t);
          for (int i = 0; i < NHOT; i++) begin
            get(cc, rr, t);
            check(rr.mtype == MSG_RD_RESP && rr.dst == cpu_pos(cc) && rr.src == '{x: 3, y: 2, z: 1},
                  "hot-spot reply reaches its CPU");
          end
        end
      join_none
    end
    wait fork;

    // 4. directory: line A starts in cluster NCL-1 (layer 1, column 1, CPU 1's)
    begin
      logic [31:0] A;
      logic [LINE_W-1:0] d;
      int t, cl;
      A = 32'h0A00_0000 | (32'(NCL - 1) << 16) | (32'd5 << 6);
      dir_op(0, A, 0);
      check(!dir_resp_hit, "directory miss before the fill");
      dir_op(1, A, 0);
      check(int'(dir_resp_cluster) == NCL - 1, "fill into the cluster named by the tag bits");
      // CPU 0 writes the fetched line into the bank the directory chose
      for (int w = 0; w < 16; w++) d[w*32 +: 32] = $urandom;
      send(0, 1, bank_node(NCL - 1, int'(A[9:6])), A, 8'd200, d, t);
      get(0, r, t);
      check(r.mtype == MSG_WR_ACK, "line written into its bank");
      dir_op(0, A, 1);
      check(dir_resp_hit && dir_resp_step == 1, "step-1 hit for the CPU on the line's column");
      dir_op(0, A, 0);
      check(dir_resp_hit && dir_resp_step == 2 && !dir_resp_migrated,
            "step-2 hit for the other CPU, no migration in static mode");
      cl = int'(dir_resp_cluster);
      send(0, 0, bank_node(cl, int'(A[9:6])), A, 8'd201, '0, t);
      get(0, r, t);
      check(r.mtype == MSG_RD_RESP && r.data == d, "line read from the bank the directory names");
      migrate_en = 1;
      dir_op(0, A, 0);
      check(dir_resp_migrated && int'(dir_resp_new_cluster) == NCL - 2,
            "dynamic mode: the hit moves the line one cluster towards CPU 0");
      dir_op(0, A, 0);
      check(dir_resp_hit && int'(dir_resp_cluster) == NCL - 2, "line found where it moved");
      migrate_en = 0;
      for (int i = 0; i < 17; i++) dir_op(1, (32'(i) << 24) | (32'd9 << 6), 0);
      check(dir_resp_evict, "17th line into a full set evicts");
    end

    repeat (10) @(posedge clk);
    begin
      int bus_xfers, two_slot, rt_wait;
      bus_xfers = 0; two_slot = 0; rt_wait = 0;
      for (int py = 0; py < NCY; py++)
        for (int px = 0; px < NCX; px++) begin
          bus_xfers += bus_cnt[py][px]; two_slot += two_cnt[py][px];
        end
      for (int z = 0; z < NL; z++)
        for (int y = 0; y < MYY; y++)
          for (int x = 0; x < MX; x++) rt_wait += rt_cnt[z][y][x];
      check(bus_xfers > 0, $sformatf("pillar bus transfers (%0d)", bus_xfers));
      check(two_slot > 0, $sformatf("pillar frames with two active slots (%0d)", two_slot));
      check(rt_wait > 0, $sformatf("flits waiting for a busy router output (%0d)", rt_wait));
      check(ni_wait > 0, $sformatf("CPU requests waiting for the interface (%0d)", ni_wait));
      check(d_miss > 0 && d_s1 > 0 && d_s2 > 0 && d_mig > 0 && d_ev > 0,
            $sformatf("directory: miss %0d step1 %0d step2 %0d migrations %0d evictions %0d",
                      d_miss, d_s1, d_s2, d_mig, d_ev));
      $display("bus cycles %0d, two-slot cycles %0d, router waits %0d, interface waits %0d",
               bus_xfers, two_slot, rt_wait, ni_wait);
      $display("directory: miss %0d step1 %0d step2 %0d migrations %0d evictions %0d",
               d_miss, d_s1, d_s2, d_mig, d_ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
