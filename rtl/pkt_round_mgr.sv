// pkt_round_mgr: packet round manager of the write channel.
//
// In the packet region a node may send several variable-length packets per
// access, up to a maximum. This unit counts the packets sent in the current
// access: grant_pkt (the start of an access) clears the count and each
// pkt_done pulse adds one. more_ok tells the delimiter generation unit whether
// another packet may follow; it is refused once MAX_PKTS packets were sent or
// when the frame has expired, so the node ends its access with EA.
//
// The per-access maximum follows the document; its value is not given there
// and MAX_PKTS is this design's choice. more_ok is combinational from the
// registered count.
module pkt_round_mgr #(
  parameter int MAX_PKTS = 4,
  localparam int CW = $clog2(MAX_PKTS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          grant_pkt,
  input  logic          pkt_done,
  input  logic          frame_expired,
  output logic [CW-1:0] pkt_count,
  output logic          more_ok
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_count <= '0;
    end else if (grant_pkt) begin
      pkt_count <= '0;
    end else if (pkt_done && int'(pkt_count) < MAX_PKTS) begin
      pkt_count <= pkt_count + 1'b1;
    end
  end

  assign more_ok = (int'(pkt_count) < MAX_PKTS) && !frame_expired;

endmodule
