// wc_bus_splitter: write-channel bus splitter.
//
// The write channel takes its data either from the stream data interface
// (circuit region) or from the packet data interface (packet region). This
// unit joins the two sources onto the internal write bus: sel_pkt chooses the
// source, take is the request for one byte this clock, and the ready signal is
// returned only to the selected source, so the other source is never consumed.
// d_valid/d_data/d_last present the selected source's byte.
//
// Both sources use a valid/ready handshake with a last flag closing each
// circuit channel or packet (this design's choice). Purely combinational.
module wc_bus_splitter (
  input  logic       sel_pkt,
  input  logic       take,
  input  logic       st_valid,
  input  logic [7:0] st_data,
  input  logic       st_last,
  output logic       st_ready,
  input  logic       pk_valid,
  input  logic [7:0] pk_data,
  input  logic       pk_last,
  output logic       pk_ready,
  output logic       d_valid,
  output logic [7:0] d_data,
  output logic       d_last
);

  always_comb begin
    if (sel_pkt) begin
      d_valid = pk_valid;
      d_data  = pk_data;
      d_last  = pk_last;
    end else begin
      d_valid = st_valid;
      d_data  = st_data;
      d_last  = st_last;
    end
    st_ready = take & !sel_pkt;
    pk_ready = take & sel_pkt;
  end

endmodule
