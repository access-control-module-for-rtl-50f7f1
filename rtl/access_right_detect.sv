// access_right_detect: access right detection unit of the sense channel.
//
// Follows the hybrid frame from the delimiters recognised on the sense bus and
// from the TL time-outs, and tells the write channel when this node may send.
// Access in both regions is round robin by physical node number 0..N_NODES-1:
//   * SF starts a frame and its circuit region; the circuit position is 0.
//   * Each EA (a node finished) or TL (a node stayed silent) advances the
//     position of the current region by one, up to N_NODES.
//   * When the circuit position reaches N_NODES the region boundary RB is due;
//     RB starts the packet region.
//   * The packet position survives from frame to frame, so an interrupted
//     packet round resumes where it stopped. When it reaches N_NODES a start of
//     round SR is due; SR sets it to 0. After reset it is N_NODES, so the first
//     packet region begins with SR.
//   * A frame timer, restarted by each SF, marks the frame as expired after
//     FRAME_BYTES byte times. Then no new packet access is granted and SF is due.
// grant_circ/grant_pkt pulse for one clock when this node's turn begins.
// rb_due, sr_due and sf_due tell a frame-managing node which frame delimiter
// to send. Alarm pulses: seq_err for RB outside the circuit region or SR
// outside the packet region, mgr_silent for a TL while RB or SR is due,
// frame_lost when no SF came for FRAME_BYTES + FRAME_SLACK byte times.
//
// The round robin, the EA/TL counting and the resumption of rounds follow the
// document; the frame length is its 5 ms at 18 Mbyte/s. N_NODES, the slack and
// refusing new packet accesses in an expired frame are this design's choices.
// Region, positions and alarm pulses are registered; the access levels and
// due flags are decoded from them, and the grant pulses are the rising edges of
// the access levels.
module access_right_detect
  import acm_pkg::*;
#(
  parameter int N_NODES     = 8,
  parameter int FRAME_BYTES = 90000,
  parameter int FRAME_SLACK = 4096,
  localparam int PW = $clog2(N_NODES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] my_id,
  input  logic          dlm_valid,
  input  dlm_t          dlm_type,
  input  logic          tl_pulse,
  output region_t       region,
  output logic [PW-1:0] circ_pos,
  output logic [PW-1:0] pkt_pos,
  output logic          acc_circ,
  output logic          acc_pkt,
  output logic          grant_circ,
  output logic          grant_pkt,
  output logic          frame_expired,
  output logic          sf_due,
  output logic          rb_due,
  output logic          sr_due,
  output logic          seq_err,
  output logic          mgr_silent,
  output logic          frame_lost
);

  localparam int TW = $clog2(FRAME_BYTES + FRAME_SLACK + 2);
  logic [TW-1:0] ftimer;
  logic          acc_circ_q, acc_pkt_q;

  logic advance;   // EA or TL: one node's turn is over
  assign advance = tl_pulse || (dlm_valid && dlm_type == DLM_EA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region     <= REG_IDLE;
      circ_pos   <= PW'(N_NODES);
      pkt_pos    <= PW'(N_NODES);
      ftimer     <= '0;
      seq_err    <= 1'b0;
      mgr_silent <= 1'b0;
      frame_lost <= 1'b0;
    end else begin
      seq_err    <= 1'b0;
      mgr_silent <= 1'b0;
      frame_lost <= 1'b0;
      if (region != REG_IDLE && int'(ftimer) < FRAME_BYTES + FRAME_SLACK + 1)
        ftimer <= ftimer + 1'b1;
      if (region != REG_IDLE && int'(ftimer) == FRAME_BYTES + FRAME_SLACK)
        frame_lost <= 1'b1;
      if (tl_pulse && (rb_due || sr_due))
        mgr_silent <= 1'b1;

      if (advance) begin
        if (region == REG_CIRCUIT && int'(circ_pos) < N_NODES) circ_pos <= circ_pos + 1'b1;
        if (region == REG_PACKET  && int'(pkt_pos)  < N_NODES) pkt_pos  <= pkt_pos + 1'b1;
      end
      if (dlm_valid) begin
        case (dlm_type)
          DLM_SF: begin
            region   <= REG_CIRCUIT;
            circ_pos <= '0;
            ftimer   <= '0;
          end
          DLM_RB: begin
            if (region != REG_CIRCUIT) seq_err <= 1'b1;
            if (region != REG_IDLE) region <= REG_PACKET;
          end
          DLM_SR: begin
            if (region != REG_PACKET) seq_err <= 1'b1;
            else pkt_pos <= '0;
          end
          default: ;
        endcase
      end
    end
  end

  assign frame_expired = (region != REG_IDLE) && (int'(ftimer) >= FRAME_BYTES);
  assign rb_due = (region == REG_CIRCUIT) && (int'(circ_pos) == N_NODES);
  assign sr_due = (region == REG_PACKET) && (int'(pkt_pos) == N_NODES) && !frame_expired;
  assign sf_due = (region == REG_IDLE) || (region == REG_PACKET && frame_expired);

  assign acc_circ = (region == REG_CIRCUIT) && (circ_pos == my_id);
  assign acc_pkt  = (region == REG_PACKET) && (pkt_pos == my_id) && !frame_expired;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_circ_q <= 1'b0;
      acc_pkt_q  <= 1'b0;
    end else begin
      acc_circ_q <= acc_circ;
      acc_pkt_q  <= acc_pkt;
    end
  end

  assign grant_circ = acc_circ & !acc_circ_q;
  assign grant_pkt  = acc_pkt & !acc_pkt_q;

endmodule
