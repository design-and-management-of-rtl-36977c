// tb_migration_unit: every (line cluster, CPU cluster, line layer)
// combination of a 4x2x2 arrangement, against a reference that lists the
// clusters of the X-then-Y path and takes the first one that is the
// target or holds no CPU; also checks that repeated migration always
// reaches the target column within a few steps.
module tb_migration_unit;
  import nim_pkg::*;
  localparam int NCX = 4, NCY = 2, NL = 2;
  int checks = 0, failures = 0;
  logic [1:0] line_cx, cpu_cx, next_cx;
  logic [0:0] line_cy, cpu_cy, next_cy;
  logic [LW-1:0] line_z;
  logic migrate;
  int moves = 0, skips = 0;

  migration_unit #(.NCX(NCX), .NCY(NCY), .NLAYERS(NL)) dut (.*);

  function automatic bit has_cpu(int x, int y, int z);
    return ((x + y) % NL) == z;
  endfunction

  initial begin
    for (int lz = 0; lz < NL; lz++)
      for (int lx = 0; lx < NCX; lx++) for (int ly = 0; ly < NCY; ly++)
        for (int cx = 0; cx < NCX; cx++) for (int cy = 0; cy < NCY; cy++) begin
          int px[$], py[$];
          int x, y, ex, ey;
          bit em;
          // path, X first
          px.delete(); py.delete();
          x = lx; y = ly;
          while (x != cx) begin x += (cx > x) ? 1 : -1; px.push_back(x); py.push_back(y); end
          while (y != cy) begin y += (cy > y) ? 1 : -1; px.push_back(x); py.push_back(y); end
          em = (px.size() > 0);
          ex = lx; ey = ly;
          foreach (px[i]) begin
            ex = px[i]; ey = py[i];
            if ((ex == cx && ey == cy) || !has_cpu(ex, ey, lz)) break;
          end
          line_cx = 2'(lx); line_cy = 1'(ly); line_z = LW'(lz);
          cpu_cx = 2'(cx); cpu_cy = 1'(cy);
          #1;
          checks++;
          if (migrate != em || (em && (int'(next_cx) != ex || int'(next_cy) != ey))) begin
            failures++;
            $display("FAIL line (%0d,%0d,%0d) cpu (%0d,%0d): got %0d (%0d,%0d) exp %0d (%0d,%0d)",
                     lx, ly, lz, cx, cy, migrate, next_cx, next_cy, em, ex, ey);
          end
          if (em) moves++;
          if (em && (absdiff(ex, lx) + absdiff(ey, ly)) > 1) skips++;
          // repeated migration converges
          begin
            int n;
            n = 0;
            while (migrate && n < 8) begin
              line_cx = next_cx; line_cy = next_cy;
              #1 n++;
            end
            checks++;
            if (migrate || line_cx != 2'(cx) || line_cy != 1'(cy)) begin
              failures++; $display("FAIL: no convergence");
            end
          end
        end
    checks++;
    if (skips == 0) begin failures++; $display("FAIL: no CPU cluster was ever skipped"); end
    $display("moves %0d skips %0d", moves, skips);
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
