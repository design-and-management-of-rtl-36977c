// address_mapper: initial placement of a cache line in the 3D NUCA L2.
//
// Splits a 32-bit physical address of a 64-byte line. The cache index (10
// bits, above the 6 offset bits) selects the set; its low-order 4 bits pick
// the bank inside the cluster and the remaining 6 bits the set inside that
// bank. The tag is the 16 bits above the index; its low-order bits pick the
// cluster where the line is first placed (16 clusters: 4 bits, numbered
// layer-major, then cy, then cx). Combinational.
// The bit assignment follows the document's placement policy; the field
// widths follow from its sizes (64 B lines, 16 banks of 64 KB per cluster,
// 16 ways, 16 clusters).
module address_mapper
  import nim_pkg::*;
#(
  parameter int BANK_W    = 4,   // 16 banks per cluster
  parameter int SET_W     = 6,   // 64 sets per bank (16-way, 64 KB)
  parameter int CLUSTER_W = 4    // 16 clusters
) (
  input  logic [ADDR_W-1:0]             addr,
  output logic [CLUSTER_W-1:0]          cluster,
  output logic [BANK_W-1:0]             bank,
  output logic [SET_W-1:0]              set_in_bank,
  output logic [BANK_W+SET_W-1:0]       index,
  output logic [ADDR_W-6-BANK_W-SET_W-1:0] tag
);
  localparam int OFF_W = 6;
  assign index       = addr[OFF_W +: BANK_W + SET_W];
  assign bank        = index[BANK_W-1:0];
  assign set_in_bank = index[BANK_W +: SET_W];
  assign tag         = addr[ADDR_W-1 : OFF_W + BANK_W + SET_W];
  assign cluster     = tag[CLUSTER_W-1:0];
endmodule
