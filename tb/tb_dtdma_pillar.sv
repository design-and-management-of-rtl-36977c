// tb_dtdma_pillar: a 4-layer pillar. Each layer's router is modelled: it
// sends packets (1 or 5 flits) to random other layers on rotating VCs with
// credit flow control and sinks what the pillar delivers, returning
// credits. Checks: every packet arrives at its target layer, intact, whole
// and on the VC of its source layer; an idle pillar moves a lone flit from
// one router to another in 3 cycles (Tx buffer, one-cycle reconfiguration,
// bus plus input register); a single streaming client gets the bus every
// cycle (no idle slots); the frame grows to several clients and shrinks
// back to none.
module tb_dtdma_pillar;
  import nim_pkg::*;
  localparam int NL = 4, NPKT = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  flit_t rt_out [NL], rt_in [NL];
  credit_t rt_out_credit [NL], rt_in_credit [NL];
  logic [2:0] active_slots;
  logic bus_busy;

  dtdma_pillar #(.NLAYERS(NL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cred [NL][NVC];
  int sent_pkts [NL], k [NL], cur_vc [NL], cur_len [NL], cur_dst [NL], cur_id [NL];
  int npkt [NL];
  bit run = 0;
  int rx_id [NL][NVC], rx_k [NL][NVC];
  int exp_dst [int], exp_src [int];
  int delivered = 0, max_slots = 0, busy_cycles = 0;

  always_ff @(posedge clk)
    for (int l = 0; l < NL; l++) rt_in_credit[l] <= '{valid: rt_in[l].valid, vc: rt_in[l].vc};

  always @(negedge clk) if (run) begin
    for (int l = 0; l < NL; l++)
      if (rt_out_credit[l].valid) cred[l][rt_out_credit[l].vc]++;
    for (int l = 0; l < NL; l++) begin
      rt_out[l] = '0;
      if (k[l] < 0 && sent_pkts[l] < npkt[l] && cred[l][sent_pkts[l] % NVC] == VC_DEPTH) begin
        int d;
        cur_vc[l] = sent_pkts[l] % NVC;
        cur_len[l] = ($urandom_range(0, 1) == 1) ? 5 : 1;
        d = $urandom_range(0, NL - 2);
        cur_dst[l] = (npkt[l] > 1000) ? 1 : (d >= l ? d + 1 : d);
        cur_id[l] = l * 100000 + sent_pkts[l];
        exp_dst[cur_id[l]] = cur_dst[l];
        exp_src[cur_id[l]] = l;
        k[l] = 0;
        sent_pkts[l]++;
      end
      if (k[l] >= 0 && cred[l][cur_vc[l]] > 0) begin
        header_t h = '0;
        h.dst.z = LW'(cur_dst[l]); h.addr = ADDR_W'(cur_id[l]);
        rt_out[l].valid = 1; rt_out[l].vc = VCW'(cur_vc[l]);
        rt_out[l].head = (k[l] == 0); rt_out[l].tail = (k[l] == cur_len[l] - 1);
        rt_out[l].data = (k[l] == 0) ? FLIT_W'(h) : FLIT_W'({32'(cur_id[l]), 32'(k[l])});
        cred[l][cur_vc[l]]--;
        k[l] = (k[l] == cur_len[l] - 1) ? -1 : k[l] + 1;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (int'(active_slots) > max_slots) max_slots = int'(active_slots);
    if (bus_busy) busy_cycles++;
    for (int l = 0; l < NL; l++) begin
      flit_t f;
      f = rt_in[l];
      if (f.valid) begin
        if (f.head) begin
          header_t h;
          int id;
          h = header_t'(f.data);
          id = int'(h.addr);
          check(rx_id[l][f.vc] < 0, "packets not interleaved on a VC");
          check(exp_dst.exists(id) && exp_dst[id] == l, $sformatf("packet %0d at its layer", id));
          check(exp_src.exists(id) &&
                int'(f.vc) == ((exp_src[id] < l) ? exp_src[id] : exp_src[id] - 1),
                "VC of the source layer");
          rx_id[l][f.vc] = id;
          rx_k[l][f.vc] = 1;
        end else begin
          check(f.data[63:0] == {32'(rx_id[l][f.vc]), 32'(rx_k[l][f.vc])}, "body flit order");
          rx_k[l][f.vc]++;
        end
        if (f.tail) begin rx_id[l][f.vc] = -1; delivered++; end
      end
    end
  end

  initial begin
    for (int l = 0; l < NL; l++) begin
      rt_out[l] = '0; sent_pkts[l] = 0; k[l] = -1; npkt[l] = 0;
      for (int v = 0; v < NVC; v++) begin cred[l][v] = VC_DEPTH; rx_id[l][v] = -1; rx_k[l][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1) lone flit latency, layer 0 -> layer 2
    @(negedge clk);
    begin
      header_t h = '0;
      int t0, t1;
      h.dst.z = 2; h.addr = 32'd777;
      exp_dst[777] = 2; exp_src[777] = 0;
      rt_out[0] = '{valid: 1, head: 1, tail: 1, vc: 0, data: FLIT_W'(h)};
      // count clock edges from the one that takes the flit off the router
      // output to the one at which the destination router buffers it
      @(posedge clk) t0 = 0;
      #1 rt_out[0] = '0;
      t1 = 0;
      while (!rt_in[2].valid) begin @(posedge clk); t1++; #1; end
      @(posedge clk); t1++;
      check(t1 == 3, $sformatf("lone flit crosses in 3 cycles (took %0d)", t1));
    end
    repeat (5) @(posedge clk);
    // 2) a single client streaming to layer 1: bus busy every cycle
    begin
      int b0, c0;
      npkt[0] = 2000; // marks "always to layer 1"
      run = 1;
      repeat (20) @(posedge clk);
      b0 = busy_cycles;
      repeat (40) @(posedge clk);
      check(busy_cycles - b0 >= 38, $sformatf("single client uses the bus every cycle (%0d/40)", busy_cycles - b0));
      npkt[0] = sent_pkts[0];
      wait (k[0] < 0);
    end
    repeat (30) @(posedge clk);
    // 3) all layers, random targets
    for (int l = 0; l < NL; l++) npkt[l] = sent_pkts[l] + NPKT;
    wait (delivered == npkt[0] + npkt[1] + npkt[2] + npkt[3] + 1);
    repeat (10) @(posedge clk);
    check(delivered == npkt[0] + npkt[1] + npkt[2] + npkt[3] + 1, "all packets delivered");
    check(max_slots >= 3, $sformatf("frame grew to %0d slots", max_slots));
    check(active_slots == 0, "frame shrank to none when idle");
    $display("delivered %0d, max slots %0d", delivered, max_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("timeout delivered %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
