// tb_plru_tree: drives a 16-way tree pseudo-LRU set through random access
// sequences. Checks that the victim is never the way just used, that after
// touching every way once in some order the victim is the first of them,
// and that the victim matches a reference model of the tree kept in the
// testbench as an array of node directions.
module tb_plru_tree;
  localparam int WAYS = 16;
  int checks = 0, failures = 0;
  logic [WAYS-2:0] state, next_state;
  logic [3:0] access, victim;

  plru_tree #(.WAYS(WAYS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: node n points to the child holding the victim (0 left, 1 right)
  bit dir [WAYS-1];
  function automatic int ref_victim();
    int n = 0, w = 0;
    for (int l = 0; l < 4; l++) begin
      w = w * 2 + int'(dir[n]);
      n = 2 * n + 1 + int'(dir[n]);
    end
    return w;
  endfunction
  function automatic void ref_touch(int w);
    int n = 0;
    for (int l = 3; l >= 0; l--) begin
      int b;
      b = (w >> l) & 1;
      dir[n] = !b;
      n = 2 * n + 1 + b;
    end
  endfunction

  initial begin
    state = '0; access = '0;
    for (int i = 0; i < WAYS - 1; i++) dir[i] = 1;  // all-zero state: victim to the right
    #1;
    for (int it = 0; it < 3000; it++) begin
      int w;
      w = (it < 16) ? 15 - it : $urandom_range(0, WAYS - 1);
      access = 4'(w);
      #1;
      state = next_state;
      ref_touch(w);
      #1;
      check(int'(victim) != w, "victim is not the way just used");
      check(int'(victim) == ref_victim(), "victim matches the reference tree");
      if (it == 15) check(victim == 4'd15, "after touching 15..0 the victim is way 15");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
