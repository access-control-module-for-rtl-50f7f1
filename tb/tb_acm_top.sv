// tb_acm_top: end-to-end test of the access control module at its default
// parameters (8 node positions, 5 ms frame of 90000 byte times, TL of 32 byte
// times, up to 4 packets per access, 6-byte addresses).
//
// Four ACMs sit at positions 0..3 of a shared bus; positions 4..7 are empty,
// so their turns pass by TL time-out. Node 0 manages the frame. The bus model
// merges the write channels (more than one sender in a clock is a collision)
// and returns the merged stream, BUS_DELAY clocks later, to every node's read
// and sense channels. Each node has circuit channels to send in every frame
// and an endless backlog of packets to random destinations, including an
// address that no node owns.
// Checks:
//   * every node receives on its stream interface exactly the circuit bytes
//     sent by all nodes, in bus order, with channel starts marked;
//   * every node receives exactly the packets addressed to it, address
//     removed, and no others;
//   * no collisions; frames start at least FRAME_BYTES apart;
//   * a delimiter is recognised 3 clocks after its last byte arrives, and
//     the first SC byte of an access leaves one clock after the grant;
//   * a delimiter with one corrupted byte is still accepted; an unknown
//     delimiter raises the sense and read alarms, and no other alarm rises.
// Mechanisms counted, each must occur: SF, RB, SR, SC, EA, TL time-outs,
// packet limit reached, packet round resumed after RB, packets dropped by
// address, corrupted delimiter tolerated, unknown delimiter alarm.
module tb_acm_top;
  import acm_pkg::*;

  localparam int NPHYS = 4, NPOS = 8, BUS_DELAY = 4, AB = 6, MAXP = 4;
  localparam int FRAME = 90000, FRAMES = 3;
  localparam int PW = $clog2(NPOS + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  function automatic logic [8*AB-1:0] addr_of(int k);
    return 48'h0200_0000_0000 | 48'(k + 1);
  endfunction
  localparam logic [8*AB-1:0] NOBODY = 48'h0200_0000_00FF;

  // ---------------- bus model ----------------
  mau_byte_t tx [NPHYS];
  mau_byte_t merged, rx;
  mau_byte_t dline [BUS_DELAY];
  int n_coll = 0;
  logic inject_bad = 0, corrupt_next_sc = 0;
  int n_bad_injected = 0, n_corrupted = 0;

  always_comb begin
    int senders;
    senders = 0;
    merged  = IDLE_BYTE;
    for (int k = 0; k < NPHYS; k++) if (tx[k].act) begin
      senders++;
      merged = tx[k];
    end
  end

  int sc_run = 0;   // position inside a run of SC delimiter bytes on the bus
  always @(posedge clk) begin
    mau_byte_t b;
    int senders;
    senders = 0;
    for (int k = 0; k < NPHYS; k++) senders += int'(tx[k].act);
    if (senders > 1) n_coll++;
    b = merged;
    if (inject_bad) b = '{act: 1'b1, dlm: 1'b1, data: 8'hC3};
    // corrupt the first byte of one SC delimiter: it must still be accepted
    if (b.act && b.dlm && b.data == CODE_SC) sc_run++; else sc_run = 0;
    if (corrupt_next_sc && sc_run == 1) begin
      b.dlm = 1'b0; b.data = 8'h5A; corrupt_next_sc <= 0; n_corrupted++;
    end
    dline[0] <= b;
    for (int i = 1; i < BUS_DELAY; i++) dline[i] <= dline[i-1];
  end
  assign rx = dline[BUS_DELAY-1];
  initial for (int i = 0; i < BUS_DELAY; i++) dline[i] = IDLE_BYTE;

  // ---------------- nodes ----------------
  logic              st_rx_valid [NPHYS], st_rx_soc [NPHYS];
  logic [7:0]        st_rx_data [NPHYS];
  logic              st_tx_valid [NPHYS], st_tx_last [NPHYS], st_tx_ready [NPHYS];
  logic [7:0]        st_tx_data [NPHYS];
  logic              pk_rx_valid [NPHYS], pk_rx_sop [NPHYS], pk_rx_end [NPHYS];
  logic [7:0]        pk_rx_data [NPHYS];
  logic              pk_tx_valid [NPHYS], pk_tx_last [NPHYS], pk_tx_ready [NPHYS];
  logic [7:0]        pk_tx_data [NPHYS];
  logic [ALM_BITS-1:0] alarm_clear [NPHYS], alarm_status [NPHYS];
  logic [7:0]        alarm_count [NPHYS];
  logic              alarm_irq [NPHYS], wc_busy [NPHYS];
  region_t           frame_region [NPHYS];
  logic [PW-1:0]     circ_pos [NPHYS], pkt_pos [NPHYS];
  logic              probe_grant [NPHYS], probe_at_limit [NPHYS];

  for (genvar k = 0; k < NPHYS; k++) begin : g_node
    acm_top u_acm (
      .clk, .rst_n,
      .node_id(PW'(k)), .node_addr(addr_of(k)), .frame_master(k == 0),
      .rc_rx(rx), .sc_rx(rx), .wc_tx(tx[k]),
      .st_rx_valid(st_rx_valid[k]), .st_rx_data(st_rx_data[k]), .st_rx_soc(st_rx_soc[k]),
      .st_tx_valid(st_tx_valid[k]), .st_tx_data(st_tx_data[k]), .st_tx_last(st_tx_last[k]),
      .st_tx_ready(st_tx_ready[k]),
      .pk_rx_valid(pk_rx_valid[k]), .pk_rx_data(pk_rx_data[k]), .pk_rx_sop(pk_rx_sop[k]),
      .pk_rx_end(pk_rx_end[k]),
      .pk_tx_valid(pk_tx_valid[k]), .pk_tx_data(pk_tx_data[k]), .pk_tx_last(pk_tx_last[k]),
      .pk_tx_ready(pk_tx_ready[k]),
      .alarm_clear(alarm_clear[k]), .alarm_mask('1), .alarm_status(alarm_status[k]),
      .alarm_count(alarm_count[k]), .alarm_irq(alarm_irq[k]),
      .frame_region(frame_region[k]), .circ_pos(circ_pos[k]), .pkt_pos(pkt_pos[k]),
      .wc_busy(wc_busy[k])
    );
    assign probe_grant[k] = u_acm.grant_circ | u_acm.grant_pkt;
    assign probe_at_limit[k] = int'(u_acm.pkt_count) == MAXP;
  end

  int checks = 0, failures = 0;
  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, s);
  endtask

  // ---------------- stream sources and checker ----------------
  // node k sends 1 + k%2 channels of 8 + 4k bytes in every frame
  int ch_left [NPHYS], ch_idx [NPHYS], ch_seq [NPHYS];
  region_t reg_q [NPHYS];
  logic [8:0] st_log [$];          // {soc, data} of every circuit byte sent
  int st_rd [NPHYS];
  int n_st_sent = 0;

  for (genvar k = 0; k < NPHYS; k++) begin : g_st
    assign st_tx_valid[k] = ch_left[k] > 0;
    assign st_tx_data[k]  = 8'(k * 64 + ch_seq[k] * 8 + ch_idx[k]);
    assign st_tx_last[k]  = ch_idx[k] == 8 + 4 * k - 1;
  end

  always @(posedge clk) begin
    for (int k = 0; k < NPHYS; k++) begin
      if (!rst_n) begin
        ch_left[k] = 1 + k % 2; ch_idx[k] = 0; ch_seq[k] = 0; reg_q[k] = REG_IDLE; st_rd[k] = 0;
      end else begin
        if (st_tx_ready[k] && st_tx_valid[k]) begin
          st_log.push_back({ch_idx[k] == 0, st_tx_data[k]});
          n_st_sent++;
          if (st_tx_last[k]) begin ch_idx[k] = 0; ch_left[k]--; ch_seq[k]++; end
          else ch_idx[k]++;
        end
        // the host refills its channels for the next frame once the circuit region is over
        if (frame_region[k] != REG_CIRCUIT && reg_q[k] == REG_CIRCUIT) ch_left[k] = 1 + k % 2;
        reg_q[k] = frame_region[k];
        if (st_rx_valid[k]) begin
          checks++;
          if (st_rd[k] >= st_log.size()) fail($sformatf("node %0d: unexpected stream byte", k));
          else if (st_log[st_rd[k]] !== {st_rx_soc[k], st_rx_data[k]})
            fail($sformatf("node %0d: stream byte %0d = %h expected %h", k, st_rd[k],
                           {st_rx_soc[k], st_rx_data[k]}, st_log[st_rd[k]]));
          st_rd[k]++;
        end
      end
    end
  end

  // ---------------- packet sources and checker ----------------
  logic [8*AB-1:0] p_dst [NPHYS];
  int p_len [NPHYS], p_idx [NPHYS];
  logic [8:0] pk_exp [NPHYS][$];
  int pk_end_exp [NPHYS], pk_end_got [NPHYS];
  int n_pk_sent = 0, n_pk_nobody = 0, n_pk_rx = 0;

  function automatic logic [8*AB-1:0] pick_dst();
    int r;
    r = $urandom % (NPHYS + 1);
    return (r == NPHYS) ? NOBODY : addr_of(r);
  endfunction

  for (genvar k = 0; k < NPHYS; k++) begin : g_pk
    assign pk_tx_valid[k] = rst_n;
    assign pk_tx_data[k]  = (p_idx[k] < AB) ? p_dst[k][8*(AB-1-p_idx[k]) +: 8]
                                            : 8'(k * 16 + p_idx[k]);
    assign pk_tx_last[k]  = p_idx[k] == p_len[k] - 1;
  end

  always @(posedge clk) begin
    for (int k = 0; k < NPHYS; k++) begin
      if (!rst_n) begin
        p_dst[k] = pick_dst(); p_len[k] = 20 + $urandom % 180; p_idx[k] = 0;
        pk_end_exp[k] = 0; pk_end_got[k] = 0;
      end else begin
        if (pk_tx_ready[k] && pk_tx_valid[k]) begin
          if (p_idx[k] >= AB)
            for (int d = 0; d < NPHYS; d++)
              if (p_dst[k] == addr_of(d)) pk_exp[d].push_back({p_idx[k] == AB, pk_tx_data[k]});
          if (pk_tx_last[k]) begin
            n_pk_sent++;
            if (p_dst[k] == NOBODY) n_pk_nobody++;
            for (int d = 0; d < NPHYS; d++) if (p_dst[k] == addr_of(d)) pk_end_exp[d]++;
            p_dst[k] = pick_dst(); p_len[k] = 20 + $urandom % 180; p_idx[k] = 0;
          end else p_idx[k]++;
        end
        if (pk_rx_valid[k]) begin
          checks++;
          if (pk_exp[k].size() == 0) fail($sformatf("node %0d: unexpected packet byte", k));
          else begin
            logic [8:0] e;
            e = pk_exp[k].pop_front();
            if (e !== {pk_rx_sop[k], pk_rx_data[k]})
              fail($sformatf("node %0d: packet byte %h expected %h", k,
                             {pk_rx_sop[k], pk_rx_data[k]}, e));
          end
        end
        if (pk_rx_end[k]) begin pk_end_got[k]++; n_pk_rx++; end
      end
    end
  end

  // ---------------- mechanism counters and timing checks ----------------
  int n_dlm [8];         // delimiters put on the bus, by kind
  int dl_run = 0;
  int sc_in_access = 0;  // SC delimiters since the last EA
  logic [7:0] dl_code;
  int n_tl = 0, n_limit = 0, n_resume = 0, n_addr_drop = 0, n_grant = 0;
  int sf_time [$];
  int cyc = 0;
  int last_dlm_byte_cyc = -100;
  int n_lat_checked = 0;
  logic [MAXP:0] limit_q;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // delimiters on the merged bus (three bytes each)
    if (merged.act && merged.dlm) begin
      dl_run++;
      if (dl_run == 3) begin
        case (merged.data)
          CODE_SF: begin n_dlm[DLM_SF]++; sc_in_access = 0; sf_time.push_back(cyc); end
          CODE_RB: n_dlm[DLM_RB]++;
          CODE_EA: begin
            n_dlm[DLM_EA]++;
            checks++;
            if (frame_region[0] == REG_PACKET && sc_in_access > MAXP)
              fail($sformatf("%0d packets in one access", sc_in_access));
            sc_in_access = 0;
          end
          CODE_SR: n_dlm[DLM_SR]++;
          CODE_SC: begin n_dlm[DLM_SC]++; sc_in_access++; end
          default: ;
        endcase
        dl_run = 0;
      end
    end else dl_run = 0;
    // recognition latency: the last byte of a delimiter reaches the receivers,
    // and the sense channel of node 1 must report it 3 clocks later
    if (rx.act && rx.dlm) last_dlm_byte_cyc = cyc;
    if (g_node[1].u_acm.sc_dlm_valid) begin
      checks++;
      n_lat_checked++;
      if (cyc - last_dlm_byte_cyc != 3)
        fail($sformatf("delimiter recognised %0d clocks after its last byte",
                       cyc - last_dlm_byte_cyc));
    end
    n_tl += int'(g_node[0].u_acm.tl_pulse);
    n_addr_drop += int'(g_node[2].u_acm.addr_miss);
    for (int k = 0; k < NPHYS; k++) begin
      if (probe_grant[k]) begin
        n_grant++;
        // the first SC byte must follow the grant by one clock, if anything is sent
        fork
          automatic int kk = k;
          begin
            @(posedge clk); #1;
            checks++;
            if (!(tx[kk].act && tx[kk].dlm && tx[kk].data == CODE_SC))
              fail($sformatf("node %0d: no SC one clock after its grant", kk));
          end
        join_none
      end
      if (probe_at_limit[k] && !limit_q[k]) n_limit++;
      limit_q[k] = probe_at_limit[k];
    end
    // packet round resumed: RB seen by node 0 with the packet position mid-round
    if (g_node[0].u_acm.sc_dlm_valid && g_node[0].u_acm.sc_dlm_type == DLM_RB &&
        pkt_pos[0] != 0 && int'(pkt_pos[0]) != NPOS) n_resume++;
  end

  // ---------------- scenario ----------------
  initial begin
    limit_q = '0;
    for (int k = 0; k < NPHYS; k++) alarm_clear[k] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // wait for the first packet region, then corrupt one SC delimiter
    wait (n_dlm[DLM_RB] >= 1 && n_dlm[DLM_SC] >= 20);
    @(negedge clk);
    corrupt_next_sc = 1;
    // in a quiet gap of the packet region (an empty position's turn), send an
    // unknown delimiter
    wait (n_dlm[DLM_SF] >= 2 && n_dlm[DLM_RB] >= 2);
    forever begin
      int idle;
      idle = 0;
      while (idle < 10) begin
        @(negedge clk);
        if (!merged.act && !rx.act && frame_region[0] == REG_PACKET && int'(circ_pos[0]) == NPOS &&
            int'(pkt_pos[0]) >= NPHYS && int'(pkt_pos[0]) < NPOS - 1)
          idle++;
        else idle = 0;
      end
      break;
    end
    inject_bad = 1; repeat (3) @(negedge clk); inject_bad = 0;
    n_bad_injected++;
    repeat (20) @(negedge clk);
    for (int k = 0; k < NPHYS; k++) begin
      checks++;
      if (alarm_status[k] != ALM_BITS'((1 << ALM_SC_BAD_DLM) | (1 << ALM_RC_BAD_DLM)) ||
          !alarm_irq[k])
        fail($sformatf("node %0d: alarms %b after unknown delimiter", k, alarm_status[k]));
      alarm_clear[k] = '1;
    end
    @(negedge clk);
    for (int k = 0; k < NPHYS; k++) alarm_clear[k] = '0;
    // run until FRAMES frames are complete
    wait (n_dlm[DLM_SF] >= FRAMES + 1);
    repeat (200) @(negedge clk);
    finish_up();
  end

  task automatic finish_up();
    for (int k = 0; k < NPHYS; k++) begin
      checks++;
      if (alarm_status[k] != 0) fail($sformatf("node %0d: unexpected alarms %b", k, alarm_status[k]));
      checks++;
      if (pk_end_got[k] + 1 < pk_end_exp[k] || pk_end_got[k] > pk_end_exp[k])
        fail($sformatf("node %0d: %0d packets delivered, %0d sent to it", k, pk_end_got[k],
                       pk_end_exp[k]));
      checks++;
      if (st_rd[k] + 64 < st_log.size()) fail($sformatf("node %0d: stream bytes missing", k));
    end
    for (int i = 1; i < sf_time.size(); i++) begin
      checks++;
      if (sf_time[i] - sf_time[i-1] < FRAME || sf_time[i] - sf_time[i-1] > FRAME + 400)
        fail($sformatf("frame length %0d", sf_time[i] - sf_time[i-1]));
    end
    checks++; if (n_coll != 0) fail($sformatf("%0d collisions", n_coll));
    $display("mechanisms: SF=%0d RB=%0d SR=%0d SC=%0d EA=%0d TL=%0d limit=%0d resume=%0d",
             n_dlm[DLM_SF], n_dlm[DLM_RB], n_dlm[DLM_SR], n_dlm[DLM_SC], n_dlm[DLM_EA], n_tl,
             n_limit, n_resume);
    $display("           addr_drop=%0d corrupted_sc=%0d bad_dlm=%0d grants=%0d latency_checks=%0d",
             n_addr_drop, n_corrupted, n_bad_injected, n_grant, n_lat_checked);
    $display("traffic: stream bytes %0d, packets sent %0d (to nobody %0d), packets received %0d",
             n_st_sent, n_pk_sent, n_pk_nobody, n_pk_rx);
    checks++; if (n_dlm[DLM_SF] < FRAMES + 1) fail("SF");
    checks++; if (n_dlm[DLM_RB] < FRAMES) fail("RB");
    checks++; if (n_dlm[DLM_SR] == 0) fail("SR");
    checks++; if (n_dlm[DLM_SC] == 0) fail("SC");
    checks++; if (n_dlm[DLM_EA] == 0) fail("EA");
    checks++; if (n_tl == 0) fail("TL never happened");
    checks++; if (n_limit == 0) fail("packet limit never reached");
    checks++; if (n_resume == 0) fail("packet round never resumed");
    checks++; if (n_addr_drop == 0) fail("no packet dropped by address");
    checks++; if (n_corrupted == 0) fail("no corrupted delimiter");
    checks++; if (n_bad_injected == 0) fail("no unknown delimiter");
    checks++; if (n_st_sent == 0 || n_pk_rx == 0) fail("no traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (FRAME * (FRAMES + 2)) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
