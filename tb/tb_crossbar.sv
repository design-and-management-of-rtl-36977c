// tb_crossbar: random input flits and selections; every output must carry
// the selected input's flit with the new VC, or be idle.
module tb_crossbar;
  import nim_pkg::*;
  localparam int NP = 6;
  int checks = 0, failures = 0;
  flit_t in_flit [NP], out_flit [NP];
  logic out_valid [NP];
  logic [2:0] out_in [NP];
  logic [VCW-1:0] out_vc [NP];

  crossbar #(.NP(NP)) dut (.*);

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int p = 0; p < NP; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        in_flit[p].valid = 1'b1;
        out_valid[p] = $urandom_range(0, 1);
        out_in[p] = 3'($urandom_range(0, NP - 1));
        out_vc[p] = VCW'($urandom_range(0, NVC - 1));
      end
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_flit[o].valid != out_valid[o] ||
            (out_valid[o] && (out_flit[o].data != in_flit[out_in[o]].data ||
                              out_flit[o].vc != out_vc[o] ||
                              out_flit[o].head != in_flit[out_in[o]].head ||
                              out_flit[o].tail != in_flit[out_in[o]].tail))) begin
          failures++;
          $display("FAIL output %0d", o);
        end
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
