// tb_switch_allocator: random eligibility; every cycle the grants must form
// a matching (one flit per input and per output), only eligible VCs may win
// and only for the output they want, an output wanted by someone must be
// given (no idle output with a request), and a VC that stays eligible must
// be served within a bounded number of cycles (round-robin fairness).
module tb_switch_allocator;
  import nim_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NVC-1:0] elig [NP];
  logic [2:0] want [NP][NVC];
  logic in_win [NP];
  logic [VCW-1:0] in_vc [NP];
  logic out_valid [NP];
  logic [2:0] out_in [NP];
  int wait_cnt [NP][NVC];
  int max_wait = 0;

  switch_allocator #(.NP(NP)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < NP; i++) begin
      elig[i] = '0;
      for (int v = 0; v < NVC; v++) begin want[i][v] = '0; wait_cnt[i][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // persistent heavy load on output 0 in the first phase, random after
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NVC; v++) begin
          if (cyc < 1000) begin elig[i][v] = 1'b1; want[i][v] = 3'd0; end
          else if (wait_cnt[i][v] == 0) begin
            elig[i][v] = $urandom_range(0, 1);
            want[i][v] = 3'($urandom_range(0, NP - 1));
          end
        end
      #1;
      begin
        int used_in [NP];
        bit wanted [NP];
        for (int i = 0; i < NP; i++) used_in[i] = 0;
        for (int o = 0; o < NP; o++) wanted[o] = 0;
        for (int i = 0; i < NP; i++)
          for (int v = 0; v < NVC; v++) if (elig[i][v]) wanted[want[i][v]] = 1;
        for (int o = 0; o < NP; o++) begin
          if (out_valid[o]) begin
            int i;
            i = int'(out_in[o]);
            used_in[i]++;
            check(in_win[i] && elig[i][in_vc[i]] && int'(want[i][in_vc[i]]) == o,
                  $sformatf("grant of output %0d is legal in=%0d vc=%0d win=%0d elig=%b want=%0d cyc=%0d", o, i, in_vc[i], in_win[i], elig[i], want[i][in_vc[i]], cyc));
          end
          check(!(wanted[o] && !out_valid[o]) || cyc >= 1000, "requested output granted");
        end
        for (int i = 0; i < NP; i++) check(used_in[i] <= 1, "one output per input");
        for (int i = 0; i < NP; i++) check(in_win[i] == (used_in[i] == 1), "input wins only through a granted output");
      end
      @(posedge clk);
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NVC; v++)
          if (elig[i][v] && !(in_win[i] && int'(in_vc[i]) == v)) wait_cnt[i][v]++;
          else begin
            if (wait_cnt[i][v] > max_wait) max_wait = wait_cnt[i][v];
            wait_cnt[i][v] = 0;
          end
    end
    check(max_wait < NP * NVC, $sformatf("fairness: longest wait %0d cycles", max_wait));
    $display("longest wait %0d", max_wait);
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
