// dlm_event_detect: the '4-byte window' delimiter event detection unit.
//
// A HAP delimiter occupies three consecutive bytes, and a receiver accepts it
// when at least two of the three are delimiter symbols (majority rule). To see
// where a delimiter ends, the unit keeps a window of four bytes, w[3] oldest to
// w[0] newest, and examines the triple w[3..1] together with the byte w[0]
// that follows it:
//   event = (all three of w[3..1] flagged)
//         | (two of w[3..1] flagged and w[0] not flagged)
// After an event the two delimiter bytes still in the window are marked, which
// blocks the next two cycles from reporting the same delimiter again.
//
// The byte that leaves the window (w[3]) is forwarded on out_byte with act
// cleared when it belongs to an accepted delimiter, so out_byte carries only
// data; delimiters are decapsulated here. The triple codes are presented on
// dlm_code for the 3-byte window unit.
//
// Timing: one byte per clock. evt is combinational from the window registers
// and is valid in the cycle the third delimiter byte sits in w[1]; the first
// byte after the delimiter is then in w[0]. out_byte lags in_byte by four cycles.
// The window size and the 2-of-3 rule follow the document; the per-byte MAU
// delimiter flag (in_byte.dlm) and the lock-out are this design's choices.
module dlm_event_detect
  import acm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  mau_byte_t       in_byte,
  output logic            evt,          // delimiter event in w[3..1]
  output logic [2:0][7:0] dlm_code,     // [2]=w[3] (first byte) .. [0]=w[1]
  output mau_byte_t       out_byte,     // data stream, delimiter bytes removed
  output logic            bus_act       // a byte is present in w[0]
);

  mau_byte_t  w [4];
  logic [3:0] mark;
  logic [3:0] f;

  always_comb begin
    for (int i = 0; i < 4; i++) f[i] = w[i].act & w[i].dlm;
  end

  logic maj3, all3, lock;
  assign maj3 = (f[3] & f[2]) | (f[3] & f[1]) | (f[2] & f[1]);
  assign all3 = f[3] & f[2] & f[1];
  assign lock = mark[3] | mark[2];
  assign evt  = !lock && (all3 || (maj3 && !f[0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) w[i] <= IDLE_BYTE;
      mark <= '0;
    end else begin
      w[0] <= in_byte;
      w[1] <= w[0];
      w[2] <= w[1];
      w[3] <= w[2];
      mark[0] <= 1'b0;
      mark[1] <= 1'b0;
      mark[2] <= mark[1] | evt;   // w[1] of the event moves to w[2]
      mark[3] <= mark[2] | evt;   // w[2] of the event moves to w[3]
    end
  end

  assign dlm_code = {w[3].data, w[2].data, w[1].data};

  always_comb begin
    out_byte     = w[3];
    out_byte.act = w[3].act & !mark[3] & !evt;
    out_byte.dlm = 1'b0;
  end

  assign bus_act = w[0].act;

endmodule
