// rc_bus_splitter: read-channel bus splitter.
//
// Received data bytes (delimiters already removed) belong either to circuit
// channels or to packets, depending on the hybrid frame region. The splitter
// follows the region from the delimiters it is given: SF opens the circuit
// region, RB the packet region. Inside a region an SC delimiter opens a new
// circuit channel or packet, and EA, SR, SF, RB or an unknown delimiter closes
// it. Data of an open circuit channel goes to the stream data interface, data
// of an open packet to the packet address detection unit; bytes outside an
// open unit are discarded. The first byte of each unit is marked (soc/sop) and
// the close of a packet is signalled by pk_end.
//
// Timing: all outputs are registered, one clock after the input. The region and
// SC/EA rules follow the document; the marker signals are this design's own.
module rc_bus_splitter
  import acm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dlm_valid,
  input  dlm_t       dlm_type,
  input  mau_byte_t  in_byte,
  // to the stream data interface
  output logic       st_valid,
  output logic [7:0] st_data,
  output logic       st_soc,
  // to the packet address detection unit
  output logic       pk_valid,
  output logic [7:0] pk_data,
  output logic       pk_sop,
  output logic       pk_end,
  output region_t    region
);

  logic unit_open, first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region    <= REG_IDLE;
      unit_open <= 1'b0;
      first     <= 1'b0;
      st_valid  <= 1'b0;
      st_data   <= '0;
      st_soc    <= 1'b0;
      pk_valid  <= 1'b0;
      pk_data   <= '0;
      pk_sop    <= 1'b0;
      pk_end    <= 1'b0;
    end else begin
      st_valid <= 1'b0;
      st_soc   <= 1'b0;
      pk_valid <= 1'b0;
      pk_sop   <= 1'b0;
      pk_end   <= 1'b0;
      // data first: it precedes any delimiter reported in the same cycle
      if (in_byte.act && unit_open) begin
        first <= 1'b0;
        if (region == REG_CIRCUIT) begin
          st_valid <= 1'b1;
          st_data  <= in_byte.data;
          st_soc   <= first;
        end else if (region == REG_PACKET) begin
          pk_valid <= 1'b1;
          pk_data  <= in_byte.data;
          pk_sop   <= first;
        end
      end
      if (dlm_valid) begin
        if (unit_open && region == REG_PACKET) pk_end <= 1'b1;
        unit_open <= 1'b0;
        unique case (dlm_type)
          DLM_SF: region <= REG_CIRCUIT;
          DLM_RB: region <= REG_PACKET;
          DLM_SC: begin
            unit_open <= (region != REG_IDLE);
            first     <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
