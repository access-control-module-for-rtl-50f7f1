// tb_access_right_detect: self-checking test of the access right detection
// unit with 4 nodes, this node being number 2, and a short frame. A scripted
// sequence of delimiters and TL time-outs walks through two frames: circuit
// turns, RB due, packet rounds with SR, a frame expiring in the middle of a
// packet round and the round resuming after the next RB, out-of-order
// delimiters and a lost frame. Positions, due flags, grants and alarm pulses
// are checked against values written down for each step.
module tb_access_right_detect;
  import acm_pkg::*;
  localparam int N = 4, FB = 300, FS = 50, PW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] my_id, circ_pos, pkt_pos;
  logic dlm_valid, tl_pulse;
  dlm_t dlm_type;
  region_t region;
  logic acc_circ, acc_pkt, grant_circ, grant_pkt, frame_expired, sf_due, rb_due, sr_due;
  logic seq_err, mgr_silent, frame_lost;

  access_right_detect #(.N_NODES(N), .FRAME_BYTES(FB), .FRAME_SLACK(FS)) dut (.*);

  int checks = 0, failures = 0;
  int n_gc = 0, n_gp = 0, n_seq = 0, n_sil = 0, n_lost = 0;
  always @(posedge clk) if (rst_n) begin
    n_gc += int'(grant_circ); n_gp += int'(grant_pkt);
    n_seq += int'(seq_err); n_sil += int'(mgr_silent); n_lost += int'(frame_lost);
  end

  task automatic chk(string what, region_t r, int cp, int pp, logic sf, logic rb, logic sr);
    checks++;
    if (region !== r || int'(circ_pos) != cp || int'(pkt_pos) != pp ||
        sf_due !== sf || rb_due !== rb || sr_due !== sr) begin
      failures++;
      $display("FAIL %s: region %s cp %0d/%0d pp %0d/%0d sf %0b/%0b rb %0b/%0b sr %0b/%0b", what,
               region.name(), circ_pos, cp, pkt_pos, pp, sf_due, sf, rb_due, rb, sr_due, sr);
    end
  endtask

  // one event, then check grants seen in the following clock
  task automatic ev(dlm_t t, logic tl, int exp_gc, int exp_gp);
    int gc0, gp0;
    gc0 = n_gc; gp0 = n_gp;
    dlm_valid = (t != DLM_NONE); dlm_type = t; tl_pulse = tl;
    @(negedge clk);
    dlm_valid = 0; dlm_type = DLM_NONE; tl_pulse = 0;
    @(negedge clk);
    checks++;
    if (n_gc - gc0 != exp_gc || n_gp - gp0 != exp_gp) begin
      failures++;
      $display("FAIL grants after %s: circ %0d/%0d pkt %0d/%0d", t.name(), n_gc - gc0, exp_gc,
               n_gp - gp0, exp_gp);
    end
  endtask

  initial begin
    my_id = 2; dlm_valid = 0; dlm_type = DLM_NONE; tl_pulse = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset", REG_IDLE, N, N, 1, 0, 0);
    ev(DLM_SF, 0, 0, 0);  chk("SF", REG_CIRCUIT, 0, N, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);  chk("EA", REG_CIRCUIT, 1, N, 0, 0, 0);
    ev(DLM_NONE, 1, 1, 0);
    chk("TL", REG_CIRCUIT, 2, N, 0, 0, 0);
    checks++; if (!acc_circ) begin failures++; $display("FAIL acc_circ"); end
    ev(DLM_SC, 0, 0, 0);  chk("SC", REG_CIRCUIT, 2, N, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);  chk("own EA", REG_CIRCUIT, 3, N, 0, 0, 0);
    ev(DLM_NONE, 1, 0, 0); chk("TL", REG_CIRCUIT, 4, N, 0, 1, 0);
    ev(DLM_NONE, 1, 0, 0); chk("TL at N", REG_CIRCUIT, 4, N, 0, 1, 0);
    checks++; if (n_sil != 1) begin failures++; $display("FAIL mgr_silent"); end
    ev(DLM_SR, 0, 0, 0);
    checks++; if (n_seq != 1) begin failures++; $display("FAIL seq_err SR in circuit"); end
    ev(DLM_RB, 0, 0, 0);  chk("RB", REG_PACKET, 4, N, 0, 0, 1);
    ev(DLM_SR, 0, 0, 0);  chk("SR", REG_PACKET, 4, 0, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);
    ev(DLM_NONE, 1, 0, 1); chk("pkt TL", REG_PACKET, 4, 2, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);  chk("round done", REG_PACKET, 4, 4, 0, 0, 1);
    ev(DLM_SR, 0, 0, 0);
    ev(DLM_EA, 0, 0, 0);  chk("second round", REG_PACKET, 4, 1, 0, 0, 0);
    ev(DLM_RB, 0, 0, 0);
    checks++; if (n_seq != 2) begin failures++; $display("FAIL seq_err RB in packet"); end
    // let the frame expire with node 1 active; node 2 must not be granted
    while (!frame_expired) @(negedge clk);
    chk("expired", REG_PACKET, 4, 1, 1, 0, 0);
    ev(DLM_EA, 0, 0, 0);  chk("EA after expiry", REG_PACKET, 4, 2, 1, 0, 0);
    checks++; if (acc_pkt) begin failures++; $display("FAIL acc_pkt in expired frame"); end
    ev(DLM_SF, 0, 0, 0);  chk("SF 2", REG_CIRCUIT, 0, 2, 0, 0, 0);
    for (int i = 0; i < N; i++) ev(DLM_NONE, 1, int'(i == 1), 0);
    chk("circuit 2 done", REG_CIRCUIT, 4, 2, 0, 1, 0);
    ev(DLM_RB, 0, 0, 1);  chk("resume", REG_PACKET, 4, 2, 0, 0, 0);
    // no SF any more: frame_lost after FB + FS clocks
    repeat (FB + FS) @(negedge clk);
    checks++; if (n_lost != 1) begin failures++; $display("FAIL frame_lost %0d", n_lost); end
    checks++;
    if (n_gc != 2 || n_gp != 2) begin failures++; $display("FAIL totals %0d %0d", n_gc, n_gp); end
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
