// tb_dlm_gen: self-checking test of the delimiter generation unit (write
// channel sequencer). Small byte sources stand in for the stream and packet
// interfaces and a counter stands in for the packet round manager (at most two
// packets per access). The bytes the unit sends are logged and compared with
// the sequences the protocol calls for:
//   circuit access, two channels:  SC c c c SC c c EA
//   packet access, three queued:   SC p p p p SC p p EA (third packet held back)
//   frame manager: SF, RB and SR when due and the bus is idle, one each
// It also checks that the first delimiter byte is issued in the clock of the
// grant, that a grant with nothing to send stays silent, that a frame
// delimiter waits for an idle bus, and that a source running dry is flagged.
module tb_dlm_gen;
  import acm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic master, grant_circ, grant_pkt, sf_due, rb_due, sr_due, bus_idle, sense_dlm_valid;
  logic more_ok, st_avail, pk_avail, d_valid, d_last;
  logic sel_pkt, take, dlm_en, data_en, pkt_done, underrun, busy;
  logic [7:0] dlm_byte;

  dlm_gen #(.ECHO_MAX(20)) dut (.*);

  // byte sources
  logic [7:0] st_mem [64]; logic st_lst [64]; int st_rd = 0, st_wr = 0;
  logic [7:0] pk_mem [64]; logic pk_lst [64]; int pk_rd = 0, pk_wr = 0;
  logic starve = 0;
  assign st_avail = (st_rd < st_wr) && !starve;
  assign pk_avail = pk_rd < pk_wr;
  logic [7:0] d_data;
  always_comb begin
    d_valid = sel_pkt ? pk_avail : st_avail;
    d_data  = sel_pkt ? pk_mem[pk_rd] : st_mem[st_rd];
    d_last  = sel_pkt ? pk_lst[pk_rd] : st_lst[st_rd];
  end
  int pk_cnt = 0;
  assign more_ok = pk_cnt < 2;

  // log of the write bus: {is_delimiter, byte}
  logic [8:0] log_q [$];
  int cyc = 0, first_out = -1, n_underrun = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dlm_en) log_q.push_back({1'b1, dlm_byte});
    else if (data_en) log_q.push_back({1'b0, d_data});
    if ((dlm_en || data_en) && first_out < 0) first_out = cyc;
    if (take && d_valid) begin
      if (sel_pkt) pk_rd <= pk_rd + 1; else st_rd <= st_rd + 1;
    end
    if (grant_pkt) pk_cnt <= 0;
    else if (pkt_done) pk_cnt <= pk_cnt + 1;
    n_underrun += int'(underrun);
  end

  int checks = 0, failures = 0;
  logic [8:0] exp_q [$];

  task automatic add_unit(bit pkt, int len, byte base);
    for (int i = 0; i < len; i++) begin
      if (pkt) begin pk_mem[pk_wr] = base + 8'(i); pk_lst[pk_wr] = (i == len-1); pk_wr++; end
      else     begin st_mem[st_wr] = base + 8'(i); st_lst[st_wr] = (i == len-1); st_wr++; end
    end
  endtask
  task automatic exp_dlm(logic [7:0] c);
    repeat (3) exp_q.push_back({1'b1, c});
  endtask
  task automatic exp_data(int len, byte base);
    for (int i = 0; i < len; i++) exp_q.push_back({1'b0, 8'(base + 8'(i))});
  endtask
  task automatic compare(string what);
    checks++;
    if (log_q.size() != exp_q.size()) begin
      failures++; $display("FAIL %s: %0d bytes sent, %0d expected", what, log_q.size(), exp_q.size());
    end else begin
      foreach (exp_q[i]) if (log_q[i] !== exp_q[i]) begin
        failures++; $display("FAIL %s: byte %0d = %h expected %h", what, i, log_q[i], exp_q[i]);
        break;
      end
    end
    log_q.delete(); exp_q.delete();
  endtask
  task automatic pulse_grant(bit pkt);
    int c0;
    first_out = -1;
    c0 = cyc;
    if (pkt) grant_pkt = 1; else grant_circ = 1;
    @(negedge clk);
    grant_pkt = 0; grant_circ = 0;
    repeat (40) @(negedge clk);
    if (first_out >= 0) begin
      checks++;
      if (first_out != c0 + 1) begin
        failures++; $display("FAIL first byte %0d clocks after grant", first_out - c0 - 1);
      end
    end
  endtask

  initial begin
    master = 0; grant_circ = 0; grant_pkt = 0; sf_due = 0; rb_due = 0; sr_due = 0;
    bus_idle = 1; sense_dlm_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // circuit access with two channels
    add_unit(0, 3, 8'h10); add_unit(0, 2, 8'h20);
    pulse_grant(0);
    exp_dlm(CODE_SC); exp_data(3, 8'h10); exp_dlm(CODE_SC); exp_data(2, 8'h20); exp_dlm(CODE_EA);
    compare("circuit access");
    checks++; if (busy) begin failures++; $display("FAIL busy after access"); end
    // grant with nothing to send
    pulse_grant(0);
    compare("empty grant");
    // packet access, three packets queued, two allowed
    add_unit(1, 4, 8'h40); add_unit(1, 2, 8'h50); add_unit(1, 3, 8'h60);
    pulse_grant(1);
    exp_dlm(CODE_SC); exp_data(4, 8'h40); exp_dlm(CODE_SC); exp_data(2, 8'h50); exp_dlm(CODE_EA);
    compare("packet access");
    pulse_grant(1);
    exp_dlm(CODE_SC); exp_data(3, 8'h60); exp_dlm(CODE_EA);
    compare("next packet access");
    // a non-master never sends frame delimiters
    sf_due = 1; repeat (10) @(negedge clk); sf_due = 0;
    compare("non-master");
    // frame manager: SF waits for an idle bus, then echo
    master = 1; bus_idle = 0; sf_due = 1;
    repeat (5) @(negedge clk);
    compare("busy bus");
    bus_idle = 1; @(negedge clk);
    repeat (6) @(negedge clk);
    exp_dlm(CODE_SF); compare("SF");
    sense_dlm_valid = 1; sf_due = 0; rb_due = 1; @(negedge clk); sense_dlm_valid = 0;
    repeat (4) @(negedge clk);
    exp_dlm(CODE_RB); compare("RB");
    rb_due = 0; sr_due = 1;
    repeat (25) @(negedge clk);   // no echo: leaves after ECHO_MAX, sends SR
    sr_due = 0;
    repeat (5) @(negedge clk);
    exp_dlm(CODE_SR); compare("SR after echo time-out");
    repeat (20) @(negedge clk);
    master = 0;
    // source running dry inside a channel
    add_unit(0, 6, 8'h70);
    grant_circ = 1; @(negedge clk); grant_circ = 0;
    repeat (5) @(negedge clk);
    starve = 1; repeat (3) @(negedge clk); starve = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_underrun != 1) begin failures++; $display("FAIL underrun count %0d", n_underrun); end
    log_q.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
