// dlm_detect3: the '3-byte window' delimiter detection unit.
//
// When the 4-byte window unit reports a delimiter event, this unit decides
// which delimiter the three bytes hold. A delimiter kind is recognised when at
// least two of the three byte codes equal its code (2-of-3 majority, as the
// protocol prescribes); if no code reaches a majority the event is reported as
// DLM_BAD so that the alarm generator can flag it.
//
// Interface and timing: dlm_valid/dlm_type are registered and appear one clock
// after evt. The data stream from the event unit is delayed by the same one
// register, so delimiters and data leave this unit in their order on the bus.
// The byte codes themselves are this design's choice (acm_pkg).
module dlm_detect3
  import acm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            evt,
  input  logic [2:0][7:0] dlm_code,
  input  mau_byte_t       in_byte,
  output logic            dlm_valid,
  output dlm_t            dlm_type,
  output mau_byte_t       out_byte
);

  function automatic logic majority_is(logic [2:0][7:0] c, logic [7:0] code);
    logic [2:0] m;
    for (int i = 0; i < 3; i++) m[i] = (c[i] == code);
    return (m[0] & m[1]) | (m[0] & m[2]) | (m[1] & m[2]);
  endfunction

  dlm_t kind;
  always_comb begin
    if      (majority_is(dlm_code, CODE_SF)) kind = DLM_SF;
    else if (majority_is(dlm_code, CODE_RB)) kind = DLM_RB;
    else if (majority_is(dlm_code, CODE_EA)) kind = DLM_EA;
    else if (majority_is(dlm_code, CODE_SR)) kind = DLM_SR;
    else if (majority_is(dlm_code, CODE_SC)) kind = DLM_SC;
    else                                     kind = DLM_BAD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dlm_valid <= 1'b0;
      dlm_type  <= DLM_NONE;
      out_byte  <= IDLE_BYTE;
    end else begin
      dlm_valid <= evt;
      dlm_type  <= evt ? kind : DLM_NONE;
      out_byte  <= in_byte;
    end
  end

endmodule
