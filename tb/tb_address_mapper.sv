// tb_address_mapper: random addresses against the placement rule written
// out with shifts and masks: cluster = low 4 tag bits (address bits 19:16),
// bank = low 4 index bits (9:6), set in bank = bits 15:10, tag = 31:16.
module tb_address_mapper;
  int checks = 0, failures = 0;
  logic [31:0] addr;
  logic [3:0] cluster, bank;
  logic [5:0] set_in_bank;
  logic [9:0] index;
  logic [15:0] tag;

  address_mapper dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      addr = $urandom;
      #1;
      checks++;
      if (cluster != ((addr >> 16) & 32'hF) || bank != ((addr >> 6) & 32'hF) ||
          set_in_bank != ((addr >> 10) & 32'h3F) || index != ((addr >> 6) & 32'h3FF) ||
          tag != (addr >> 16)) begin
        failures++;
        $display("FAIL addr %h", addr);
      end
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
