// tl_counter: TL (time-out) counter of the sense channel.
//
// A node whose turn it is but which has nothing to send stays silent; after the
// time-out TL the next node takes the turn. This counter measures silence on
// the sensed bus in byte times. Any byte on the bus, any delimiter report or a
// disabled state restarts it; after TL_BYTES silent byte times it pulses
// tl_pulse for one clock and starts over, so a long silence yields one TL per
// skipped node. The access right detection unit counts these pulses together
// with EA delimiters.
//
// The TL mechanism follows the document; its length is not given there and
// TL_BYTES is this design's choice. It must exceed the longest bus round trip
// plus the receive pipeline (about 6 byte times).
module tl_counter #(
  parameter int TL_BYTES = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,     // counting allowed (inside a hybrid frame)
  input  logic bus_act,    // a byte is present on the sensed bus
  input  logic restart,    // a delimiter was just recognised
  output logic tl_pulse
);

  localparam int CW = $clog2(TL_BYTES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      tl_pulse <= 1'b0;
    end else begin
      tl_pulse <= 1'b0;
      if (!enable || bus_act || restart) begin
        cnt <= '0;
      end else if (int'(cnt) == TL_BYTES - 1) begin
        cnt      <= '0;
        tl_pulse <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
