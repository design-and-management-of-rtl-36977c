// crossbar: the router's NP x NP crossbar (XBAR).
//
// Each output port carries the flit of the input port chosen for it by the
// switch allocator, or an idle (valid low) flit. The VC field of the flit is
// replaced by the downstream VC given by the VC allocator. Combinational.
module crossbar
  import nim_pkg::*;
#(
  parameter int NP = 5
) (
  input  flit_t          in_flit   [NP],
  input  logic           out_valid [NP],
  input  logic [2:0]     out_in    [NP],
  input  logic [VCW-1:0] out_vc    [NP],
  output flit_t          out_flit  [NP]
);
  /*verilator no_inline_module*/
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_flit[o]       = in_flit[out_in[o]];
      out_flit[o].vc    = out_vc[o];
      out_flit[o].valid = out_valid[o] && in_flit[out_in[o]].valid;
    end
  end
endmodule
