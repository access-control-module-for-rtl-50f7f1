// acm_pkg: types and constants shared by the access control module (ACM).
//
// The hybrid access protocol (HAP) marks the structure of the 5 ms frame with
// delimiters: start of frame (SF), region boundary (RB), end of activity (EA),
// start of round (SR) and start of channel (SC). Each delimiter is sent as three
// consecutive bytes carrying the same code; a receiver accepts it when two of
// the three match. The names and the 3-byte/2-of-3 rule follow the protocol;
// the byte codes below, the MAU flag that marks a delimiter byte and the byte
// clocking are choices of this design.
//
// Every clock cycle is one byte time on the medium (18 Mbyte/s, 56 ns).
package acm_pkg;

  // One byte slot on an 8-bit MAU bus. act: a byte is present (carrier);
  // dlm: the MAU decoded this byte as a delimiter symbol; data: the byte.
  typedef struct packed {
    logic       act;
    logic       dlm;
    logic [7:0] data;
  } mau_byte_t;

  localparam mau_byte_t IDLE_BYTE = '{act: 1'b0, dlm: 1'b0, data: 8'h00};

  // Delimiter kinds as reported by the 3-byte window unit.
  typedef enum logic [2:0] {
    DLM_NONE = 3'd0,
    DLM_SF   = 3'd1,   // start of frame
    DLM_RB   = 3'd2,   // circuit/packet region boundary
    DLM_EA   = 3'd3,   // end of a node's activity
    DLM_SR   = 3'd4,   // start of packet round
    DLM_SC   = 3'd5,   // start of circuit channel / packet
    DLM_BAD  = 3'd6    // delimiter event whose code matches no delimiter
  } dlm_t;

  // Delimiter byte codes (pairwise Hamming distance 4).
  localparam logic [7:0] CODE_SF = 8'h0F;
  localparam logic [7:0] CODE_RB = 8'h33;
  localparam logic [7:0] CODE_EA = 8'h55;
  localparam logic [7:0] CODE_SR = 8'h66;
  localparam logic [7:0] CODE_SC = 8'h99;

  function automatic logic [7:0] code_of(dlm_t d);
    case (d)
      DLM_SF:  return CODE_SF;
      DLM_RB:  return CODE_RB;
      DLM_EA:  return CODE_EA;
      DLM_SR:  return CODE_SR;
      DLM_SC:  return CODE_SC;
      default: return 8'h00;
    endcase
  endfunction

  // Hybrid frame regions as seen by a node.
  typedef enum logic [1:0] {
    REG_IDLE    = 2'd0,   // no SF seen since reset
    REG_CIRCUIT = 2'd1,
    REG_PACKET  = 2'd2
  } region_t;

  // Alarm bit positions reported to node management.
  localparam int ALM_SC_BAD_DLM  = 0;  // sense channel: unknown delimiter code
  localparam int ALM_RC_BAD_DLM  = 1;  // read channel: unknown delimiter code
  localparam int ALM_SEQ_ERR     = 2;  // delimiter out of order for the region
  localparam int ALM_MGR_SILENT  = 3;  // RB/SR due but not sent within TL
  localparam int ALM_FRAME_LOST  = 4;  // no SF within the frame period plus slack
  localparam int ALM_WC_UNDERRUN = 5;  // source ran dry inside a channel/packet
  localparam int ALM_BITS        = 6;

endpackage
