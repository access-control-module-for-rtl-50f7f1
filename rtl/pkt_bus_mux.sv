// pkt_bus_mux: packet bus multiplexer driving the MAU write bus.
//
// Each clock the write bus carries either a delimiter byte from the delimiter
// generation unit (act=1, dlm=1, its code), a data byte from the write bus
// splitter (act=1, dlm=0), or nothing (act=0). A delimiter takes precedence.
// The output is registered, so a byte chosen in one clock is on the bus in the
// next. The register stage is this design's choice.
module pkt_bus_mux
  import acm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dlm_en,
  input  logic [7:0] dlm_byte,
  input  logic       data_en,
  input  logic [7:0] data_byte,
  output mau_byte_t  wc_tx
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       wc_tx <= IDLE_BYTE;
    else if (dlm_en)  wc_tx <= '{act: 1'b1, dlm: 1'b1, data: dlm_byte};
    else if (data_en) wc_tx <= '{act: 1'b1, dlm: 1'b0, data: data_byte};
    else              wc_tx <= IDLE_BYTE;
  end

endmodule
