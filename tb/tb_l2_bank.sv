// tb_l2_bank: writes lines to random locations of a bank and reads them
// back against a reference memory, checking reply type, destination (the
// requester), tag and data, the 5-cycle access (accept to reply), and that
// a reply held by resp_ready low blocks new requests.
module tb_l2_bank;
  import nim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  msg_t req, resp;
  logic req_valid, req_ready, resp_valid, resp_ready;
  logic [LINE_W-1:0] refmem [int];

  l2_bank #(.LINES(1024), .ACCESS_LAT(5), .MY_X(3), .MY_Y(1), .MY_Z(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic wr, input logic [31:0] a, input logic [LINE_W-1:0] d,
                        input int hold);
    int lat;
    @(negedge clk);
    req = '0;
    req.mtype = wr ? MSG_WR_REQ : MSG_RD_REQ;
    req.has_data = wr; req.addr = a; req.data = d; req.id = 8'(a);
    req.src = '{x: 4'd9, y: 4'd5, z: 2'd0};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1 req_valid = 0;
    lat = 0;
    while (!resp_valid) begin @(posedge clk); #1 lat++; end
    check(lat == 5, $sformatf("access takes 5 cycles (%0d)", lat));
    check(resp.dst == '{x: 4'd9, y: 4'd5, z: 2'd0} && resp.src == '{x: 4'd3, y: 4'd1, z: 2'd1}
          && resp.id == 8'(a) && resp.addr == a, "reply addressed to the requester");
    if (wr) check(resp.mtype == MSG_WR_ACK && !resp.has_data, "write acknowledged");
    else check(resp.mtype == MSG_RD_RESP && resp.has_data && resp.data == refmem[int'(bank_location(a))],
               "read returns the stored line");
    resp_ready = 0;
    repeat (hold) begin
      @(negedge clk);
      check(!req_ready, "busy while the reply waits");
    end
    resp_ready = 1;
    @(negedge clk);
    resp_ready = 1;
  endtask

  initial begin
    logic [31:0] addrs [20];
    req = '0; req_valid = 0; resp_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [LINE_W-1:0] d;
      addrs[i] = $urandom;
      for (int w = 0; w < 16; w++) d[w*32 +: 32] = $urandom;
      refmem[int'(bank_location(addrs[i]))] = d;
      access(1, addrs[i], d, i % 3);
    end
    for (int i = 0; i < 20; i++) access(0, addrs[i], '0, i % 2);
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
