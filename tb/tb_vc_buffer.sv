// tb_vc_buffer: fills a 4-flit VC buffer, checks full/empty, first-in
// first-out order, and a simultaneous write and read.
module tb_vc_buffer;
  import nim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0;
  flit_t wr_flit, rd_flit;
  logic empty, full;

  vc_buffer #(.DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t mk(input int i);
    flit_t f = '0;
    f.valid = 1; f.data = FLIT_W'(i * 32'h01010101 + 7);
    return f;
  endfunction

  initial begin
    wr_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    for (int i = 0; i < 4; i++) begin
      wr_en = 1; wr_flit = mk(i);
      @(negedge clk);
    end
    wr_en = 0;
    check(full && !empty, "full after four writes");
    check(rd_flit.data == mk(0).data, "front is first flit");
    // read one and write one in the same cycle
    rd_en = 1; wr_en = 1; wr_flit = mk(4);
    @(negedge clk);
    wr_en = 0;
    check(full, "still full after simultaneous read/write");
    for (int i = 1; i <= 4; i++) begin
      check(rd_flit.data == mk(i).data, $sformatf("order %0d", i));
      @(negedge clk);
    end
    rd_en = 0;
    check(empty, "empty at end");
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
