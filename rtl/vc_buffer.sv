// vc_buffer: one virtual-channel FIFO of an input physical channel.
//
// Holds the flits of one pending message (default 4 flits, as the document
// sizes its VCs). A write and a read may happen in the same cycle. The front
// flit is visible combinationally on rd_flit while empty is low, so a router
// can allocate and forward it in the cycle after it was written. Overflow is
// prevented by the credit protocol upstream; an assertion checks it.
// The assertions are disabled during reset through rst_n; lint tools may
// report rst_n as used both synchronously and asynchronously because of
// that, but every flip-flop here resets asynchronously.
module vc_buffer
  import nim_pkg::*;
#(
  parameter int DEPTH = VC_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t rd_flit,
  output logic  empty,
  output logic  full
);
  /*verilator no_inline_module*/
  localparam int AW = $clog2(DEPTH > 1 ? DEPTH : 2);
  flit_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  assign empty   = (cnt == 0);
  assign full    = (int'(cnt) == DEPTH);
  assign rd_flit = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr_en) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  always_ff @(posedge clk) if (wr_en) mem[wp] <= wr_flit;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
