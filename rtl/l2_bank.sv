// l2_bank: one 64 KB bank of the shared L2 cache, a node of the network.
//
// The data array holds LINES 64-byte lines. A request message (read or
// write of a whole line) is accepted when the bank is idle; after
// ACCESS_LAT cycles (the bank access time) the bank writes the line or
// reads it and offers the reply (line data, or a write acknowledgement) to
// the requester named in the request's source field, holding it until
// resp_ready. One access is in progress at a time. The line's location in
// the bank comes from nim_pkg::bank_location. The bank's own coordinate is
// given by the MY_* parameters and used as the reply's source.
// The capacity and the 5-cycle access follow the document; the message
// interface and the one-at-a-time service are this design's.
module l2_bank
  import nim_pkg::*;
#(
  parameter int LINES      = 1024,
  parameter int ACCESS_LAT = 5,
  parameter int MY_X = 0,
  parameter int MY_Y = 0,
  parameter int MY_Z = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  msg_t req,
  input  logic req_valid,
  output logic req_ready,
  output msg_t resp,
  output logic resp_valid,
  input  logic resp_ready
);
  localparam int AW = $clog2(LINES);
  localparam int TW = $clog2(ACCESS_LAT + 1);

  logic [LINE_W-1:0] mem [LINES];
  msg_t              r;
  logic              busy;
  logic [TW-1:0]     t;
  logic [AW-1:0]     loc;

  assign req_ready = !busy && !resp_valid;
  assign loc       = AW'(bank_location(r.addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      t          <= '0;
      r          <= '0;
      resp       <= '0;
      resp_valid <= 1'b0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        busy <= 1'b1;
        t    <= TW'(ACCESS_LAT - 1);
        r    <= req;
      end else if (busy) begin
        if (t == '0) begin
          busy            <= 1'b0;
          resp_valid      <= 1'b1;
          resp.dst        <= r.src;
          resp.src        <= '{x: CW'(MY_X), y: CW'(MY_Y), z: LW'(MY_Z)};
          resp.id         <= r.id;
          resp.addr       <= r.addr;
          resp.mtype      <= (r.mtype == MSG_WR_REQ) ? MSG_WR_ACK : MSG_RD_RESP;
          resp.has_data   <= (r.mtype != MSG_WR_REQ);
          resp.data       <= mem[loc];
        end else t <= t - 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (busy && t == '0 && r.mtype == MSG_WR_REQ) mem[loc] <= r.data;
endmodule
