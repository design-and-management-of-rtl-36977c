// tb_vc_allocator: allocation of free VCs, credit spending and return,
// release at the tail, and that a VC whose buffer is not yet empty is not
// handed out again.
module tb_vc_allocator;
  import nim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  credit_t credit_in;
  logic alloc, any_free, send, send_tail;
  logic [VCW-1:0] alloc_vc, send_vc;
  logic [NVC-1:0] has_credit;

  vc_allocator #(.DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one flit; alloc for a head
  task automatic flit(input bit head, input bit tail, input logic [VCW-1:0] vc);
    alloc = head; send = 1; send_tail = tail;
    send_vc = head ? alloc_vc : vc;
    @(negedge clk);
    alloc = 0; send = 0; send_tail = 0;
  endtask

  initial begin
    credit_in = '0; alloc = 0; send = 0; send_tail = 0; send_vc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(any_free && alloc_vc == 0 && has_credit == 3'b111, "all free after reset");
    // packet A on VC0: head + 3 body, not tail yet
    flit(1, 0, 0);
    check(alloc_vc == 1, "VC0 taken, next free is VC1");
    flit(0, 0, 0); flit(0, 0, 0); flit(0, 0, 0);
    check(!has_credit[0], "VC0 out of credits after 4 flits");
    // packet B on VC1, single flit
    flit(1, 1, 0);
    check(alloc_vc == 2, "VC1 not free until its credit returns");
    // packet C on VC2
    flit(1, 0, 0);
    check(!any_free, "no VC free");
    credit_in = '{valid: 1, vc: 1};
    @(negedge clk);
    credit_in = '0;
    check(any_free && alloc_vc == 1, "VC1 free after credit return");
    // tail of A on VC0 needs a credit first
    credit_in = '{valid: 1, vc: 0};
    @(negedge clk);
    credit_in = '0;
    check(has_credit[0], "VC0 has one credit again");
    flit(0, 1, 0);
    for (int i = 0; i < 4; i++) begin
      credit_in = '{valid: 1, vc: 0};
      @(negedge clk);
    end
    credit_in = '0;
    check(any_free && alloc_vc == 0, "VC0 free after tail and all credits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
