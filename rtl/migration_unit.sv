// migration_unit: where an accessed L2 line moves next (dynamic NUCA).
//
// Clusters are addressed by (cx, cy) inside a layer and a layer z. Given
// the cluster holding a line and the cluster of the CPU that just hit on
// it, the line moves one cluster closer to a target, inside its own layer:
//   - same layer as the CPU: the target is the CPU's own cluster;
//   - other layer: the target is the cluster that holds the CPU's pillar
//     on the line's layer (lines never move between layers, since the
//     pillar already makes those clusters local).
// A step moves along X first, then Y. A cluster holding another CPU is
// skipped: the line keeps stepping until it reaches a cluster without a
// CPU or the target itself. migrate is low when the line is already at its
// target. Combinational; CPU positions follow nim_pkg::cpu_here.
// The targets, the layer rule and the skipping follow the document; the X
// then Y stepping order is this design's choice.
module migration_unit
  import nim_pkg::*;
#(
  parameter int NCX     = 4,
  parameter int NCY     = 2,
  parameter int NLAYERS = 2,
  localparam int XW = $clog2(NCX > 1 ? NCX : 2),
  localparam int YW = $clog2(NCY > 1 ? NCY : 2)
) (
  input  logic [XW-1:0] line_cx,
  input  logic [YW-1:0] line_cy,
  input  logic [LW-1:0] line_z,
  input  logic [XW-1:0] cpu_cx,
  input  logic [YW-1:0] cpu_cy,
  output logic          migrate,
  output logic [XW-1:0] next_cx,
  output logic [YW-1:0] next_cy
);
  always_comb begin
    int x, y;
    logic done;
    x = int'(line_cx);
    y = int'(line_cy);
    migrate = !(line_cx == cpu_cx && line_cy == cpu_cy);
    done = !migrate;
    for (int s = 0; s < NCX + NCY; s++) begin
      if (!done) begin
        if      (x < int'(cpu_cx)) x++;
        else if (x > int'(cpu_cx)) x--;
        else if (y < int'(cpu_cy)) y++;
        else if (y > int'(cpu_cy)) y--;
        if ((x == int'(cpu_cx) && y == int'(cpu_cy)) || !cpu_here(x, y, int'(line_z), NLAYERS))
          done = 1'b1;
      end
    end
    next_cx = XW'(x);
    next_cy = YW'(y);
  end
endmodule
