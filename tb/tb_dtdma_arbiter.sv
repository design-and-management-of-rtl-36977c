// tb_dtdma_arbiter: random request sets for a 4-layer pillar. Checks the
// frame length equals the number of requesters, each requester holds a
// distinct slot in layer order, each receiver listens in exactly the slots
// of the transmitters addressing it, load fires exactly when the request
// set or a target changes, and the granted state follows one cycle later.
module tb_dtdma_arbiter;
  import nim_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0] req;
  logic [LW-1:0] dst [N];
  logic load;
  logic [N-1:0] tx_cfg [N], rx_cfg [N];
  logic [1:0] len_m1;
  logic [N-1:0] granted;
  logic [LW-1:0] granted_dst [N];
  logic [2:0] active_slots;
  logic [N-1:0] prev_req;
  logic [LW-1:0] prev_dst [N];
  int loads = 0;

  dtdma_arbiter #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    req = '0;
    for (int i = 0; i < N; i++) begin dst[i] = '0; prev_dst[i] = '0; end
    prev_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        req = N'($urandom);
        for (int i = 0; i < N; i++) begin
          int d;
          d = $urandom_range(0, N - 2);
          dst[i] = LW'(d >= i ? d + 1 : d);
        end
      end
      #1;
      begin
        int cnt, s;
        bit changed;
        logic [N-1:0] exp_rx [N];
        cnt = $countones(req);
        changed = (req != prev_req);
        for (int i = 0; i < N; i++) if (req[i] && dst[i] != prev_dst[i]) changed = 1;
        check(load == changed, "load exactly on a change");
        if (cnt > 0) check(int'(len_m1) == cnt - 1, "frame length = active clients");
        s = 0;
        for (int j = 0; j < N; j++) exp_rx[j] = '0;
        for (int i = 0; i < N; i++) begin
          if (req[i]) begin
            check(tx_cfg[i] == N'(1 << s), $sformatf("client %0d slot %0d", i, s));
            exp_rx[dst[i]][s] = 1'b1;
            s++;
          end else check(tx_cfg[i] == '0, "idle client has no slot");
        end
        for (int j = 0; j < N; j++) check(rx_cfg[j] == exp_rx[j], $sformatf("receiver %0d slots", j));
        if (load) loads++;
      end
      @(posedge clk); #1;
      if (load || 1) begin
        // after the edge the granted state must equal what was requested
      end
      check(granted == req, "granted follows the request set");
      prev_req = req;
      for (int i = 0; i < N; i++) begin
        if (req[i]) check(granted_dst[i] == dst[i], "granted target");
        prev_dst[i] = req[i] ? dst[i] : prev_dst[i];
      end
    end
    check(loads > 100, "reconfigurations happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
