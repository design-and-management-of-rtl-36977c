// tb_network_interface: the interface's send side is looped back into its
// own receive side through a one-cycle link, so every message sent must
// come back whole (possibly overtaken by one on another VC). Checks the reassembled messages (header fields and, for
// line-carrying messages, all 512 data bits), that the header names the
// pillar with the fewest in-layer hops (independent brute-force search),
// that a 5-flit packet goes out in 5 consecutive cycles, and that a
// receiver holding rx_ready low stalls delivery without losing messages.
module tb_network_interface;
  import nim_pkg::*;
  localparam int MX = 5, MYY = 6, NCX = 4, NCY = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  msg_t tx_msg, rx_msg;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t to_rt, from_rt;
  credit_t to_rt_credit, from_rt_credit;

  network_interface #(.MY_X(MX), .MY_Y(MYY), .MY_Z(0), .NCX(NCX), .NCY(NCY)) dut (.*);

  always_ff @(posedge clk) from_rt <= rst_n ? to_rt : '0;
  assign to_rt_credit = from_rt_credit;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t q[int];   // in flight, by id (packets on different VCs may overtake)
  int stalls = 0, run_len = 0, max_run = 0;
  int best_cost [int];

  // watch head flits for the pillar choice, and flit bursts
  always @(posedge clk) if (rst_n) begin
    if (to_rt.valid) begin
      run_len++;
      if (run_len > max_run) max_run = run_len;
      if (to_rt.head) begin
        header_t h;
        int cost;
        h = header_t'(to_rt.data);
        cost = absdiff(MX, h.pillar.x) + absdiff(MYY, h.pillar.y)
             + absdiff(h.pillar.x, h.dst.x) + absdiff(h.pillar.y, h.dst.y);
        check(cost == best_cost[int'(h.id)], "pillar on a shortest path");
        check((h.pillar.x % 4) == 2 && (h.pillar.y % 4) == 2 &&
              h.pillar.x < 4 * NCX && h.pillar.y < 4 * NCY, "pillar is a pillar node");
      end
    end else run_len = 0;
    if (rx_valid && !rx_ready) stalls++;
  end

  always @(negedge clk) rx_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    msg_t e;
    check(q.exists(int'(rx_msg.id)), "message was sent");
    e = q[int'(rx_msg.id)];
    q.delete(int'(rx_msg.id));
    check(rx_msg.dst == e.dst && rx_msg.src == e.src && rx_msg.mtype == e.mtype &&
          rx_msg.id == e.id && rx_msg.addr == e.addr && rx_msg.has_data == e.has_data,
          $sformatf("header of message %0d", e.id));
    if (e.has_data) check(rx_msg.data == e.data, $sformatf("line data of message %0d", e.id));
  end

  initial begin
    tx_msg = '0; tx_valid = 0; rx_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      msg_t m;
      int b;
      m = '0;
      m.dst = '{x: CW'($urandom_range(0, 15)), y: CW'($urandom_range(0, 7)), z: LW'($urandom_range(0, 1))};
      m.src = '{x: CW'(MX), y: CW'(MYY), z: 0};
      m.has_data = $urandom_range(0, 1);
      m.mtype = m.has_data ? MSG_WR_REQ : MSG_RD_REQ;
      m.id = 8'(n);
      m.addr = $urandom;
      for (int w = 0; w < LINE_W / 32; w++) m.data[w*32 +: 32] = $urandom;
      b = 1 << 20;
      for (int cx = 0; cx < NCX; cx++)
        for (int cy = 0; cy < NCY; cy++) begin
          int px, py, c;
          px = cx * 4 + 2; py = cy * 4 + 2;
          c = absdiff(MX, px) + absdiff(MYY, py) + absdiff(px, m.dst.x) + absdiff(py, m.dst.y);
          if (c < b) b = c;
        end
      best_cost[n] = b;
      @(negedge clk);
      tx_msg = m; tx_valid = 1;
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      q[n] = m;
      @(negedge clk);
      tx_valid = 0;
    end
    repeat (50) @(posedge clk);
    check(q.size() == 0, "every message came back");
    check(max_run == 5, $sformatf("a line packet goes out in 5 back-to-back flits (%0d)", max_run));
    check(stalls > 0, "receiver back-pressure exercised");
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
