// tb_cluster_tag_array: a 64-set, 16-way tag array. Fills one set with 16
// tags (no eviction, distinct ways), looks each up (hits on the way it was
// given, 4-cycle answer), inserts a 17th tag (evicts a tag that was in the
// set and not the one touched last; the evicted tag then misses), checks
// that another set is untouched, and invalidates a tag.
module tb_cluster_tag_array;
  localparam int SETS = 64, WAYS = 16, TW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic op_valid, op_ready, res_valid, res_hit, res_evict;
  logic [1:0] op;
  logic [5:0] set_idx;
  logic [TW-1:0] tag, res_evict_tag;
  logic [3:0] res_way;

  cluster_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW), .TAG_LAT(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(input logic [1:0] o, input logic [5:0] s, input logic [TW-1:0] t);
    int lat;
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op_valid = 1; op = o; set_idx = s; tag = t;
    @(posedge clk); #1 op_valid = 0;
    lat = 0;
    while (!res_valid) begin @(posedge clk); #1 lat++; end
    check(lat == 4, $sformatf("answer after the 4-cycle tag access (%0d)", lat));
  endtask

  initial begin
    logic [3:0] ways [16];
    logic [TW-1:0] ev;
    op_valid = 0; op = 0; set_idx = 0; tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      do_op(2'd1, 6'd5, TW'(16'h100 + i));
      check(!res_evict, "no eviction while the set has room");
      ways[i] = res_way;
      for (int j = 0; j < i; j++) check(ways[j] != res_way, "distinct ways");
    end
    for (int i = 0; i < 16; i++) begin
      do_op(2'd0, 6'd5, TW'(16'h100 + i));
      check(res_hit && res_way == ways[i], $sformatf("lookup %0d hits its way", i));
    end
    do_op(2'd0, 6'd6, TW'(16'h100));
    check(!res_hit, "other set does not hold the tag");
    do_op(2'd1, 6'd5, TW'(16'h200));
    check(res_evict && res_evict_tag >= 16'h100 && res_evict_tag < 16'h10F,
          "17th tag evicts an older, not the last used, tag");
    ev = res_evict_tag;
    do_op(2'd0, 6'd5, ev);
    check(!res_hit, "evicted tag misses");
    do_op(2'd0, 6'd5, TW'(16'h200));
    check(res_hit, "new tag hits");
    do_op(2'd2, 6'd5, TW'(16'h10F));
    check(res_hit, "invalidate finds the tag");
    do_op(2'd0, 6'd5, TW'(16'h10F));
    check(!res_hit, "invalidated tag misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
