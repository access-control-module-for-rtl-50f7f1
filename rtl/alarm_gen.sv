// alarm_gen: alarm generator reporting abnormal hybrid-frame conditions to the
// node management.
//
// Each bit of alarm_in is a one-clock pulse from a detecting unit (bit
// positions in acm_pkg: unknown delimiter on the sense or read channel, a
// delimiter out of order, a frame manager that stays silent, a lost frame, a
// write-channel source underrun). A pulse sets the matching sticky status bit
// and bumps an 8-bit saturating event counter. Management clears status bits by
// writing ones to clear (w1c); an alarm in the same clock as its clear wins.
// irq is the OR of the status bits that mask enables.
//
// That the alarms reach node management follows the document; the set of
// conditions, the sticky/w1c register, the counter and the mask are this
// design's choices. status and count are registered; irq is combinational.
module alarm_gen #(
  parameter int N_ALARMS = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_ALARMS-1:0] alarm_in,
  input  logic [N_ALARMS-1:0] clear,
  input  logic [N_ALARMS-1:0] mask,
  output logic [N_ALARMS-1:0] status,
  output logic [7:0]          count,
  output logic                irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
      count  <= '0;
    end else begin
      status <= (status & ~clear) | alarm_in;
      if (|alarm_in && count != 8'hFF) count <= count + 1'b1;
    end
  end

  assign irq = |(status & mask);

endmodule
