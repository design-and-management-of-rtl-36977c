// tb_noc_router: a 6-port pillar router at (2,2) on layer 0 under random
// traffic. Every input port sends packets (1 or 5 flits) on rotating VCs
// with credit flow control; every output port is a sink that returns a
// credit one cycle after each flit. Checks: each packet leaves on the port
// an independent XY/pillar reference gives, its flits arrive in order and
// unmixed per VC, every packet arrives, and a lone flit crosses the idle
// router in one cycle. Counts output contention (a flit that was ready but
// waited), which must occur.
module tb_noc_router;
  import nim_pkg::*;
  localparam int NP = 6, NPKT = 40;
  localparam int HX = 2, HY = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  flit_t   in_flit [NP], out_flit [NP];
  credit_t in_credit [NP], out_credit [NP];

  noc_router #(.NP(NP), .MY_X(HX), .MY_Y(HY), .MY_Z(0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_port(header_t h);
    int tx, ty;
    tx = (h.dst.z == 0) ? h.dst.x : h.pillar.x;
    ty = (h.dst.z == 0) ? h.dst.y : h.pillar.y;
    if (tx > HX) return P_E;
    if (tx < HX) return P_W;
    if (ty > HY) return P_S;
    if (ty < HY) return P_N;
    return (h.dst.z == 0) ? P_LOCAL : P_V;
  endfunction

  // sender state
  int cred [NP][NVC];
  int sent_pkts [NP];
  int k [NP];           // flit index in current packet, -1 = none
  int cur_vc [NP];
  int cur_len [NP];
  header_t cur_hdr [NP];
  bit enable_send = 0;
  // receiver state
  int exp_port [int];   // packet id -> expected output
  int rx_id [NP][NVC];
  int rx_k  [NP][NVC];
  int rx_done = 0;
  int contention = 0;

  function automatic header_t rand_hdr(int id, int src);
    header_t h = '0;
    h.dst.x = CW'($urandom_range(0, 7));
    h.dst.y = CW'($urandom_range(0, 7));
    h.dst.z = LW'($urandom_range(0, 1));
    h.pillar.x = CW'(HX); h.pillar.y = CW'(HY);
    h.src.x = CW'(src);
    h.addr = ADDR_W'(id);
    h.mtype = MSG_RD_REQ;
    return h;
  endfunction

  always_ff @(posedge clk) begin
    for (int o = 0; o < NP; o++) out_credit[o] <= '{valid: out_flit[o].valid, vc: out_flit[o].vc};
  end

  // senders
  always @(negedge clk) begin
    for (int i = 0; i < NP; i++) begin
      if (in_credit[i].valid) cred[i][in_credit[i].vc]++;
    end
    for (int i = 0; i < NP; i++) begin
      if (!enable_send) continue;
      in_flit[i] = '0;
      if (k[i] < 0 && sent_pkts[i] < NPKT && cred[i][sent_pkts[i] % NVC] == VC_DEPTH) begin
        int id;
        id = i * 1000 + sent_pkts[i];
        cur_vc[i] = sent_pkts[i] % NVC;
        cur_len[i] = ($urandom_range(0, 1) == 1) ? 5 : 1;
        cur_hdr[i] = rand_hdr(id, i);
        exp_port[id] = ref_port(cur_hdr[i]);
        k[i] = 0;
        sent_pkts[i]++;
      end
      if (k[i] >= 0 && cred[i][cur_vc[i]] > 0) begin
        in_flit[i].valid = 1;
        in_flit[i].vc = VCW'(cur_vc[i]);
        in_flit[i].head = (k[i] == 0);
        in_flit[i].tail = (k[i] == cur_len[i] - 1);
        in_flit[i].data = (k[i] == 0) ? FLIT_W'(cur_hdr[i]) : FLIT_W'({32'(cur_hdr[i].addr), 32'(k[i])});
        cred[i][cur_vc[i]]--;
        k[i] = (k[i] == cur_len[i] - 1) ? -1 : k[i] + 1;
      end
    end
  end

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++) begin
      flit_t f;
      f = out_flit[o];
      if (f.valid) begin
        if (f.head) begin
          header_t h;
          h = header_t'(f.data);
          check(rx_id[o][f.vc] < 0, "head on a VC not in the middle of a packet");
          check(exp_port.exists(int'(h.addr)) && exp_port[int'(h.addr)] == o,
                $sformatf("packet %0d on expected port (got %0d)", h.addr, o));
          rx_id[o][f.vc] = int'(h.addr);
          rx_k[o][f.vc] = 1;
        end else begin
          check(f.data[63:0] == {32'(rx_id[o][f.vc]), 32'(rx_k[o][f.vc])},
                $sformatf("body flit order on port %0d vc %0d", o, f.vc));
          rx_k[o][f.vc]++;
        end
        if (f.tail) begin rx_id[o][f.vc] = -1; rx_done++; end
      end
    end
    // contention: some input VC had a flit but its input did not win
    for (int i = 0; i < NP; i++)
      if (dut.elig[i] != '0 && !dut.in_win[i]) contention++;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin
      in_flit[i] = '0; out_credit[i] = '0; sent_pkts[i] = 0; k[i] = -1;
      for (int v = 0; v < NVC; v++) begin cred[i][v] = VC_DEPTH; rx_id[i][v] = -1; rx_k[i][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single-flit latency through the idle router: West input, to East
    @(negedge clk);
    begin
      header_t h = '0;
      h.dst.x = 5; h.dst.y = HY; h.addr = 32'hABCD;
      exp_port[32'hABCD] = P_E;
      in_flit[P_W] = '{valid: 1, head: 1, tail: 1, vc: 0, data: FLIT_W'(h)};
      cred[P_W][0]--;
      #1 check(!out_flit[P_E].valid, "nothing leaves before the flit is buffered");
      @(posedge clk); #1 in_flit[P_W] = '0;
      // buffered at this edge; routed, allocated and switched in this cycle,
      // so the next buffer captures it at the next edge: one cycle per hop
      check(out_flit[P_E].valid && out_flit[P_E].data[66:35] == 32'hABCD,
            "lone flit crosses the router in the cycle after it is buffered");
      @(posedge clk); #1;
      check(!out_flit[P_E].valid, "and only once");
    end
    repeat (3) @(posedge clk);
    enable_send = 1;
    wait (rx_done == NP * NPKT + 1);
    repeat (5) @(posedge clk);
    check(rx_done == NP * NPKT + 1, "all packets delivered");
    check(contention > 0, $sformatf("output contention happened (%0d)", contention));
    $display("packets %0d, contention cycles %0d", rx_done, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("timeout, delivered %0d", rx_done);
    for (int i = 0; i < NP; i++) begin
      $display("in %0d sent %0d k %0d cred %0d %0d %0d", i, sent_pkts[i], k[i], cred[i][0], cred[i][1], cred[i][2]);
      for (int v = 0; v < NVC; v++)
        $display("  vc%0d empty %0d active %0d want %0d elig %0d ovc %0d", v, dut.empty[i][v], dut.active[i][v], dut.want[i][v], dut.elig[i][v], dut.ovc[i][v]);
    end
    for (int o = 0; o < NP; o++) $display("out %0d anyfree %0d cred %b", o, dut.va_any[o], dut.va_cred[o]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
