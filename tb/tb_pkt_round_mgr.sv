// tb_pkt_round_mgr: self-checking test of the packet round manager. Several
// packet accesses are played: in each, packets end one after another and
// more_ok must stay high exactly until MAX_PKTS packets were sent; a new grant
// clears the count; an expired frame refuses further packets at once.
module tb_pkt_round_mgr;
  localparam int MP = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic grant_pkt, pkt_done, frame_expired, more_ok;
  logic [$clog2(MP+1)-1:0] pkt_count;
  pkt_round_mgr #(.MAX_PKTS(MP)) dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_state(int cnt, logic ok);
    checks++;
    if (int'(pkt_count) != cnt || more_ok !== ok) begin
      failures++;
      $display("FAIL t=%0t count %0d/%0d more_ok %0b/%0b", $time, pkt_count, cnt, more_ok, ok);
    end
  endtask

  initial begin
    grant_pkt = 0; pkt_done = 0; frame_expired = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 6; a++) begin
      int sent;
      sent = 0;
      grant_pkt = 1; @(negedge clk); grant_pkt = 0;
      expect_state(0, 1);
      for (int p = 0; p < MP + 2; p++) begin
        repeat ($urandom % 5) @(negedge clk);
        pkt_done = 1; @(negedge clk); pkt_done = 0;
        if (sent < MP) sent++;
        expect_state(sent, sent < MP);
      end
    end
    grant_pkt = 1; @(negedge clk); grant_pkt = 0;
    pkt_done = 1; @(negedge clk); pkt_done = 0;
    expect_state(1, 1);
    frame_expired = 1; #1;
    expect_state(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
