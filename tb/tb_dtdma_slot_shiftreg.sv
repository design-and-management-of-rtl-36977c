// tb_dtdma_slot_shiftreg: loads one-hot and multi-bit slot patterns with
// every frame length of a 4-register chain and checks that the enable
// repeats the pattern with exactly that period.
module tb_dtdma_slot_shiftreg;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load = 0;
  logic [N-1:0] cfg = '0;
  logic [1:0] len_m1 = '0;
  logic en;

  dtdma_slot_shiftreg #(.N(N)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int len = 1; len <= N; len++)
      for (int pat = 1; pat < (1 << len); pat++) begin
        @(negedge clk);
        load = 1; cfg = N'(pat); len_m1 = 2'(len - 1);
        @(negedge clk);
        load = 0; cfg = '0;
        // slot s of every frame must show bit s of the pattern
        for (int c = 0; c < 3 * len; c++) begin
          checks++;
          if (en != pat[c % len]) begin
            failures++;
            $display("FAIL len %0d pat %b cycle %0d en %0d", len, pat, c, en);
          end
          @(negedge clk);
        end
      end
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
