// tb_route_unit: compares the routing unit against an independent
// reference of X-then-Y routing with the pillar detour, over random
// positions and headers.
module tb_route_unit;
  import nim_pkg::*;
  int checks = 0, failures = 0;
  coord_t here;
  header_t hdr;
  logic [2:0] port;

  route_unit dut (.*);

  function automatic int ref_port(coord_t h, header_t d);
    int tx, ty;
    if (d.dst.z == h.z) begin tx = d.dst.x; ty = d.dst.y; end
    else begin tx = d.pillar.x; ty = d.pillar.y; end
    if (tx != h.x) return (tx > h.x) ? 2 : 4;      // E : W
    if (ty != h.y) return (ty > h.y) ? 3 : 1;      // S : N
    return (d.dst.z == h.z) ? 0 : 5;               // local : vertical
  endfunction

  int seen [6];
  initial begin
    for (int i = 0; i < 4000; i++) begin
      here = coord_t'($urandom);
      hdr  = header_t'({$urandom, $urandom, $urandom, $urandom});
      if (i % 4 == 0) hdr.dst.z = here.z;
      if (i % 8 == 1) begin hdr.pillar.x = here.x; hdr.pillar.y = here.y; end
      if (i % 8 == 2) begin hdr.dst.x = here.x; hdr.dst.y = here.y; hdr.dst.z = here.z; end
      #1;
      checks++;
      seen[ref_port(here, hdr)]++;
      if (int'(port) != ref_port(here, hdr)) begin
        failures++;
        $display("FAIL here=%p dst=%p pil=%p got %0d", here, hdr.dst, hdr.pillar, port);
      end
    end
    for (int p = 0; p < 6; p++) begin
      checks++;
      if (seen[p] == 0) begin failures++; $display("FAIL port %0d never chosen", p); end
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
