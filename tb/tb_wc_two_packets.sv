// tb_wc_two_packets: write-channel activity of a node that sends two packets
// in one packet-region turn, and the recognition of the frame delimiters SF,
// EA, RB and SR on its sense channel. One ACM at its default parameters is the
// frame manager at position 0 of an otherwise empty 8-position bus; its write
// bus is looped back to its read and sense buses after BUS_DELAY clocks.
// Expected sequence on the write bus, built from the protocol rules:
//   SF                  (frame start, sent by the manager)
//   -- own circuit turn: nothing to send, silent; 8 TL time-outs --
//   RB SR               (region boundary, start of the first packet round)
//   SC <pkt 1> SC <pkt 2> EA   (first byte one clock after the grant)
// The two packets are addressed to the node itself, so they must come back on
// its packet interface with the address removed.
module tb_wc_two_packets;
  import acm_pkg::*;
  localparam int BUS_DELAY = 3, AB = 6;
  localparam logic [47:0] ME = 48'h0200_0000_0001;
  localparam int LEN [2] = '{24, 40};   // bytes after the address

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mau_byte_t wc_tx, rx;
  mau_byte_t dline [BUS_DELAY];
  always @(posedge clk) begin
    dline[0] <= wc_tx;
    for (int i = 1; i < BUS_DELAY; i++) dline[i] <= dline[i-1];
  end
  assign rx = dline[BUS_DELAY-1];
  initial for (int i = 0; i < BUS_DELAY; i++) dline[i] = IDLE_BYTE;

  logic st_rx_valid, st_rx_soc, pk_rx_valid, pk_rx_sop, pk_rx_end, alarm_irq, wc_busy;
  logic [7:0] st_rx_data, pk_rx_data, alarm_count;
  logic pk_tx_valid, pk_tx_last, pk_tx_ready;
  logic [7:0] pk_tx_data;
  logic [ALM_BITS-1:0] alarm_status;
  region_t frame_region;
  logic [3:0] circ_pos, pkt_pos;

  acm_top dut (
    .clk, .rst_n, .node_id(4'd0), .node_addr(ME), .frame_master(1'b1),
    .rc_rx(rx), .sc_rx(rx), .wc_tx,
    .st_rx_valid, .st_rx_data, .st_rx_soc,
    .st_tx_valid(1'b0), .st_tx_data(8'h00), .st_tx_last(1'b0), .st_tx_ready(),
    .pk_rx_valid, .pk_rx_data, .pk_rx_sop, .pk_rx_end,
    .pk_tx_valid, .pk_tx_data, .pk_tx_last, .pk_tx_ready,
    .alarm_clear('0), .alarm_mask('1), .alarm_status, .alarm_count, .alarm_irq,
    .frame_region, .circ_pos, .pkt_pos, .wc_busy
  );

  // packet source: two packets to this node, then nothing
  int p = 0, idx = 0;
  assign pk_tx_valid = p < 2;
  assign pk_tx_data  = (idx < AB) ? ME[8*(AB-1-idx) +: 8] : 8'(p * 100 + idx);
  assign pk_tx_last  = idx == AB + LEN[p < 2 ? p : 0] - 1;
  always @(posedge clk) if (rst_n && pk_tx_valid && pk_tx_ready) begin
    if (pk_tx_last) begin p <= p + 1; idx <= 0; end
    else idx <= idx + 1;
  end

  int checks = 0, failures = 0;
  logic [8:0] exp_q [$];     // expected write-bus bytes {dlm, byte}, silence skipped
  logic [8:0] rxp_q [$];     // expected received packet bytes {sop, byte}
  int cyc = 0, grant_cyc = -1, first_cyc = -1, n_tl = 0, n_sense [8];

  task automatic exp_dlm(logic [7:0] c);
    repeat (3) exp_q.push_back({1'b1, c});
  endtask

  initial begin
    exp_dlm(CODE_SF);
    exp_dlm(CODE_RB);
    exp_dlm(CODE_SR);
    for (int k = 0; k < 2; k++) begin
      exp_dlm(CODE_SC);
      for (int i = 0; i < AB; i++) exp_q.push_back({1'b0, ME[8*(AB-1-i) +: 8]});
      for (int i = 0; i < LEN[k]; i++) begin
        exp_q.push_back({1'b0, 8'(k * 100 + AB + i)});
        rxp_q.push_back({i == 0, 8'(k * 100 + AB + i)});
      end
    end
    exp_dlm(CODE_EA);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (wc_tx.act) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL extra byte %h", wc_tx);
      end else begin
        logic [8:0] e;
        e = exp_q.pop_front();
        if (e !== {wc_tx.dlm, wc_tx.data}) begin
          failures++; $display("FAIL write bus %b/%h expected %b/%h", wc_tx.dlm, wc_tx.data, e[8], e[7:0]);
        end
      end
      if (grant_cyc >= 0 && first_cyc < 0) first_cyc = cyc;
    end
    if (dut.grant_pkt) grant_cyc = cyc;
    n_tl += int'(dut.tl_pulse);
    if (dut.sc_dlm_valid) n_sense[dut.sc_dlm_type]++;
    if (pk_rx_valid) begin
      checks++;
      if (rxp_q.size() == 0 || rxp_q[0] !== {pk_rx_sop, pk_rx_data}) begin
        failures++; $display("FAIL received %b/%h", pk_rx_sop, pk_rx_data);
      end
      if (rxp_q.size() != 0) void'(rxp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (p == 2 && !wc_busy && n_sense[DLM_EA] == 1);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || rxp_q.size() != 0) begin
      failures++; $display("FAIL %0d bytes not sent, %0d not received", exp_q.size(), rxp_q.size());
    end
    checks++;
    if (first_cyc - grant_cyc != 1) begin
      failures++; $display("FAIL first byte %0d clocks after the grant", first_cyc - grant_cyc);
    end
    checks++;
    if (n_tl != 8) begin failures++; $display("FAIL %0d TL time-outs, expected 8", n_tl); end
    checks++;
    if (n_sense[DLM_SF] != 1 || n_sense[DLM_RB] != 1 || n_sense[DLM_SR] != 1 ||
        n_sense[DLM_SC] != 2 || n_sense[DLM_EA] != 1) begin
      failures++; $display("FAIL sensed SF %0d RB %0d SR %0d SC %0d EA %0d", n_sense[DLM_SF],
                           n_sense[DLM_RB], n_sense[DLM_SR], n_sense[DLM_SC], n_sense[DLM_EA]);
    end
    checks++;
    if (alarm_status != 0) begin failures++; $display("FAIL alarms %b", alarm_status); end
    $display("grant at clock %0d, first byte at %0d; TL time-outs %0d", grant_cyc, first_cyc, n_tl);
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
