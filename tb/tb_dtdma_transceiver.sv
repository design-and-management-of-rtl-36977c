// tb_dtdma_transceiver: the layer-0 transceiver of a 2-layer pillar, with
// the testbench acting as router, arbiter and the other layer. Checks that
// the transmitter requests the bus for the packet's target layer, sends
// whole packets in order only in its slot and only when the receiver has
// room, returns a router credit per flit sent; and that the receiver takes
// only flits in its listening slots and hands them to the router on the VC
// of their source layer one cycle later, tracking buffer space by credits.
module tb_dtdma_transceiver;
  import nim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  flit_t rt_out, rt_in;
  credit_t rt_out_credit, rt_in_credit;
  logic tx_req, load, granted, dst_ready, drive;
  logic [LW-1:0] tx_dst, granted_dst;
  logic [1:0] tx_cfg, rx_cfg;
  logic [0:0] len_m1;
  bus_word_t bus_out, bus_in;
  logic [NVC-1:0] rx_space;
  int credits_back = 0, sent = 0, withheld = 0;

  dtdma_transceiver #(.N(2), .MY_L(0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rt_out_credit.valid) credits_back++;
    if (drive) sent++;
    if (tx_req && !drive) withheld++;
  end

  initial begin
    rt_out = '0; rt_in_credit = '0; load = 0; tx_cfg = '0; rx_cfg = '0; len_m1 = '0;
    granted = 0; granted_dst = '0; dst_ready = 1; bus_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // router sends a 4-flit packet (its VC credit limit) for layer 1 on VC 1
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      rt_out = '0;
      rt_out.valid = 1; rt_out.vc = 1; rt_out.head = (k == 0); rt_out.tail = (k == 3);
      if (k == 0) begin
        header_t h = '0;
        h.dst.z = 1; h.addr = 32'h55;
        rt_out.data = FLIT_W'(h);
      end else rt_out.data = FLIT_W'(k);
    end
    @(negedge clk);
    rt_out = '0;
    check(tx_req && tx_dst == 1, "requests the bus for layer 1");
    check(!drive, "no transmission before a frame is granted");
    // arbiter: one active client, layer 0 in slot 0, frame length 1
    load = 1; tx_cfg = 2'b01; rx_cfg = 2'b00; len_m1 = 0;
    @(negedge clk);
    load = 0; granted = 1; granted_dst = 1;
    // receiver has no room for two cycles
    dst_ready = 0;
    #1 check(!drive, "held while the receiver is full");
    @(negedge clk);
    dst_ready = 1;
    for (int k = 0; k < 4; k++) begin
      #1;
      check(drive && bus_out.valid && bus_out.dst == 1 && bus_out.src == 0 &&
            bus_out.head == (k == 0) && bus_out.tail == (k == 3) &&
            (k == 0 || bus_out.data == FLIT_W'(k)), $sformatf("flit %0d on the bus", k));
      @(negedge clk);
    end
    #1 check(!tx_req && !drive, "idle after the packet");
    check(credits_back == 4, "one router credit per flit sent");
    // receive side: layer 1 sends to layer 0; listen in slot 1 of a 2-slot frame
    load = 1; tx_cfg = 2'b00; rx_cfg = 2'b10; len_m1 = 1;
    @(negedge clk);
    load = 0;
    bus_in = '{valid: 1, src: 1, dst: 0, head: 1, tail: 0, data: 128'hFEED};
    // slot 0 now: not listening
    @(negedge clk);
    check(!rt_in.valid, "ignores the bus outside its slots");
    // slot 1: listening
    @(negedge clk);
    check(rt_in.valid && rt_in.vc == 0 && rt_in.data == 128'hFEED && rt_in.head,
          "flit from layer 1 enters the router on VC 0 a cycle after the bus");
    bus_in = '0;
    check(rx_space == 3'b111, "space left on VC 0 after one flit");
    // fill VC0's remaining space (3 more) in listening slots
    for (int k = 0; k < 6; k++) begin
      bus_in = '{valid: 1, src: 1, dst: 0, head: 0, tail: 0, data: 128'(k)};
      @(negedge clk);
    end
    bus_in = '0;
    check(!rx_space[0] && rx_space[1], "VC 0 full after four flits without credits");
    rt_in_credit = '{valid: 1, vc: 0};
    @(negedge clk);
    rt_in_credit = '0;
    check(rx_space[0], "credit from the router frees space");
    check(withheld > 0, "transmission was held back at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
