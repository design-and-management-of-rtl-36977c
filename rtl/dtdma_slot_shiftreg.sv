// dtdma_slot_shiftreg: fully-tapped feedback shift register of a dTDMA client.
//
// N one-bit registers Reg(0)..Reg(N-1). On load, every register takes its
// bit of the timeslice configuration sent by the arbiter, and the feedback
// length (len_m1 = active timeslots - 1, log2(N) bits) is stored. Otherwise
// the contents move one place towards Reg(0) each cycle and Reg(0) is fed
// back into Reg(len_m1), so the pattern rotates through exactly as many
// timeslots as there are active clients. Reg(0) is the enable of the
// client's bus driver (transmitter) or bus sampler (receiver).
// Follows the register chain, per-stage load multiplexers and length-select
// feedback multiplexer of the document's transceiver figure; the shift
// direction and the length encoding are this design's reading of it.
module dtdma_slot_shiftreg #(
  parameter int N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         cfg,
  input  logic [$clog2(N)-1:0] len_m1,
  output logic                 en
);
  logic [N-1:0]         r;
  logic [$clog2(N)-1:0] len_q;

  assign en = r[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= '0;
      len_q <= '0;
    end else if (load) begin
      r     <= cfg;
      len_q <= len_m1;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (i == int'(len_q))  r[i] <= r[0];
        else if (i < N - 1)    r[i] <= r[i+1];
        else                   r[i] <= 1'b0;
      end
    end
  end
endmodule
