// tb_l2_directory: the search/placement/migration control over 16 cluster
// tag arrays (4x2 clusters on 2 layers, 1024 sets each).
// Checks: a line never placed misses after both search steps; a fill puts
// it in the cluster named by its low tag bits; the CPU above or below that
// cluster finds it in step 1, other CPUs in step 2, and step 2 costs
// exactly one more tag step (TAG_LAT + 2 cycles); with migration on,
// repeated hits move the line cluster by cluster as migration_unit's
// reference rule says until it sits at its target, after which it stays;
// with migration off (static NUCA) it never moves; a 17th line in a full
// set evicts one.
module tb_l2_directory;
  import nim_pkg::*;
  localparam int NCX = 4, NCY = 2, NL = 2, SETS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic migrate_en, req_valid, req_ready, req_fill;
  logic [31:0] req_addr;
  logic [1:0] req_cpu_cx;
  logic [0:0] req_cpu_cy;
  logic resp_valid, resp_hit, resp_migrated, resp_evict;
  logic [1:0] resp_step;
  logic [3:0] resp_cluster, resp_new_cluster, resp_way, resp_new_way;
  logic [15:0] resp_evict_tag;
  int lat, n_step1 = 0, n_step2 = 0, n_miss = 0, n_mig = 0, n_evict = 0;

  l2_directory #(.NCX(NCX), .NCY(NCY), .NLAYERS(NL), .SETS(SETS), .WAYS(16), .TAG_LAT(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic req(input bit fill, input logic [31:0] a, input int cx, input int cy);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_fill = fill; req_addr = a; req_cpu_cx = 2'(cx); req_cpu_cy = 1'(cy);
    @(posedge clk); #1 req_valid = 0;
    lat = 0;
    while (!resp_valid) begin @(posedge clk); #1 lat++; end
    if (!fill && !resp_hit) n_miss++;
    if (resp_hit && resp_step == 1) n_step1++;
    if (resp_hit && resp_step == 2) n_step2++;
    if (resp_migrated) n_mig++;
    if (resp_evict) n_evict++;
  endtask

  // reference next cluster (same rule as the migration policy, own code)
  function automatic int ref_next(int cl, int cx, int cy);
    int x, y, z;
    x = cl % NCX; y = (cl / NCX) % NCY; z = cl / (NCX * NCY);
    do begin
      if (x != cx) x += (cx > x) ? 1 : -1;
      else y += (cy > y) ? 1 : -1;
    end while (!(x == cx && y == cy) && ((x + y) % NL) == z);
    return (z * NCY + y) * NCX + x;
  endfunction

  initial begin
    // cluster 13 = layer 1, cy 1, cx 1 -> address bits 19:16 = 13
    logic [31:0] A;
    int l1, l2, cl;
    A = 32'hABCD_0000 | (32'd13 << 16) | (32'd7 << 6);
    migrate_en = 0; req_valid = 0; req_fill = 0; req_addr = 0; req_cpu_cx = 0; req_cpu_cy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    req(0, A, 0, 0);
    check(!resp_hit, "unplaced line misses");
    req(1, A, 0, 0);
    check(!resp_hit && resp_cluster == 4'd13, "fill places the line in cluster 13");
    req(0, A, 1, 1);
    check(resp_hit && resp_step == 1 && resp_cluster == 13, "CPU of column (1,1) hits in step 1");
    l1 = lat;
    req(0, A, 3, 0);
    check(resp_hit && resp_step == 2 && resp_cluster == 13, "CPU of column (3,0) hits in step 2");
    l2 = lat;
    check(l2 - l1 == 6, $sformatf("step 2 costs one more tag step (%0d vs %0d)", l2, l1));
    req(0, A, 3, 0);
    check(resp_hit && !resp_migrated && resp_cluster == 13, "static NUCA: no migration");
    // dynamic: CPU of column (3,0) sits on layer 1 ((3+0)%2), same layer as the line
    migrate_en = 1;
    cl = 13;
    for (int i = 0; i < 6; i++) begin
      req(0, A, 3, 0);
      check(resp_hit && resp_cluster == 4'(cl), "line found where it was moved");
      if (cl == 1 * 8 + 0 * 4 + 3) check(!resp_migrated, "stays once at the CPU's cluster");
      else begin
        check(resp_migrated && int'(resp_new_cluster) == ref_next(cl, 3, 0),
              $sformatf("moves from %0d to %0d (got %0d)", cl, ref_next(cl, 3, 0), resp_new_cluster));
        cl = int'(resp_new_cluster);
      end
    end
    check(cl == 11, "line reached the accessing CPU's cluster");
    // CPU of column (0,0) is on layer 0: the line stays in layer 1 and heads for (0,0) there
    req(0, A, 0, 0);
    check(resp_hit && resp_migrated && int'(resp_new_cluster) / 8 == 1 &&
          int'(resp_new_cluster) == ref_next(11, 0, 0), "other-layer CPU: move within the line's layer");
    // eviction: 17 lines into one set of one cluster
    migrate_en = 0;
    for (int i = 0; i < 17; i++) req(1, (32'(i) << 20) | (32'd2 << 16) | (32'd9 << 6), 0, 0);
    check(resp_evict, "17th line in a set evicts");
    check(n_step1 > 0 && n_step2 > 0 && n_miss > 0 && n_mig > 0 && n_evict > 0, "all outcomes seen");
    $display("step1 %0d step2 %0d miss %0d migrations %0d evictions %0d", n_step1, n_step2, n_miss, n_mig, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
