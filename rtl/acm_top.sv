// acm_top: access control module (ACM) of one node of a bus-structured optical
// LAN running the hybrid access protocol (HAP).
//
// The node reaches the medium through a medium access unit (MAU, not part of
// this design) over three 8-bit channels, one byte per clock:
//   read channel (RC):  rc_rx -> 4-byte window event unit -> 3-byte window unit
//                       -> bus splitter -> stream data out (circuit region)
//                                       -> packet address detection -> packet
//                                          data out (packet region, own packets)
//   sense channel (SC): sc_rx -> 4-byte window event unit -> 3-byte window unit
//                       -> TL counter and access right detection unit
//                       -> grants to the write channel, alarms
//   write channel (WC): delimiter generation unit sequencing SC/EA (and SF, RB,
//                       SR on the frame-managing node), packet round manager,
//                       bus splitter joining the stream and packet sources,
//                       packet bus multiplexer -> wc_tx
// The alarm generator collects abnormal frame conditions for node management.
//
// node_id is the node's physical position on the bus (0 = most upstream),
// node_addr its MAC address. frame_master makes this node generate the frame
// delimiters; any node can do it, one should be chosen.
// Source interfaces (st_tx_*, pk_tx_*) use valid/ready with a last flag per
// circuit channel / packet and must keep valid high inside a channel or packet.
// Latencies, in byte clocks: a delimiter on sc_rx is recognised 5 clocks after
// its first byte arrives; a grant puts the first SC byte on wc_tx one clock
// later. Block structure and signal flow follow the document's block diagram;
// the port protocol and latencies are this design's.
module acm_top
  import acm_pkg::*;
#(
  parameter int N_NODES     = 8,
  parameter int FRAME_BYTES = 90000,
  parameter int FRAME_SLACK = 4096,
  parameter int TL_BYTES    = 32,
  parameter int MAX_PKTS    = 4,
  parameter int ADDR_BYTES  = 6,
  localparam int PW = $clog2(N_NODES + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic [PW-1:0]           node_id,
  input  logic [8*ADDR_BYTES-1:0] node_addr,
  input  logic                    frame_master,
  // MAU side
  input  mau_byte_t               rc_rx,
  input  mau_byte_t               sc_rx,
  output mau_byte_t               wc_tx,
  // stream data interface
  output logic                    st_rx_valid,
  output logic [7:0]              st_rx_data,
  output logic                    st_rx_soc,
  input  logic                    st_tx_valid,
  input  logic [7:0]              st_tx_data,
  input  logic                    st_tx_last,
  output logic                    st_tx_ready,
  // packet data interface
  output logic                    pk_rx_valid,
  output logic [7:0]              pk_rx_data,
  output logic                    pk_rx_sop,
  output logic                    pk_rx_end,
  input  logic                    pk_tx_valid,
  input  logic [7:0]              pk_tx_data,
  input  logic                    pk_tx_last,
  output logic                    pk_tx_ready,
  // node management
  input  logic [ALM_BITS-1:0]     alarm_clear,
  input  logic [ALM_BITS-1:0]     alarm_mask,
  output logic [ALM_BITS-1:0]     alarm_status,
  output logic [7:0]              alarm_count,
  output logic                    alarm_irq,
  output region_t                 frame_region,
  output logic [PW-1:0]           circ_pos,
  output logic [PW-1:0]           pkt_pos,
  output logic                    wc_busy
);

  // ---------------- read channel ----------------
  logic            rc_evt;
  logic [2:0][7:0] rc_code;
  mau_byte_t       rc_ev_byte, rc_byte;
  logic            rc_bus_act;
  logic            rc_dlm_valid;
  dlm_t            rc_dlm_type;
  logic            rcs_pk_valid, rcs_pk_sop, rcs_pk_end;
  logic [7:0]      rcs_pk_data;
  region_t         rc_region;
  logic            addr_match, addr_miss;

  dlm_event_detect u_rc_evt (
    .clk, .rst_n, .in_byte(rc_rx), .evt(rc_evt), .dlm_code(rc_code),
    .out_byte(rc_ev_byte), .bus_act(rc_bus_act)
  );

  dlm_detect3 u_rc_det (
    .clk, .rst_n, .evt(rc_evt), .dlm_code(rc_code), .in_byte(rc_ev_byte),
    .dlm_valid(rc_dlm_valid), .dlm_type(rc_dlm_type), .out_byte(rc_byte)
  );

  rc_bus_splitter u_rc_split (
    .clk, .rst_n, .dlm_valid(rc_dlm_valid), .dlm_type(rc_dlm_type), .in_byte(rc_byte),
    .st_valid(st_rx_valid), .st_data(st_rx_data), .st_soc(st_rx_soc),
    .pk_valid(rcs_pk_valid), .pk_data(rcs_pk_data), .pk_sop(rcs_pk_sop),
    .pk_end(rcs_pk_end), .region(rc_region)
  );

  pkt_addr_detect #(.ADDR_BYTES(ADDR_BYTES)) u_addr (
    .clk, .rst_n, .my_addr(node_addr),
    .pk_valid(rcs_pk_valid), .pk_data(rcs_pk_data), .pk_sop(rcs_pk_sop), .pk_end(rcs_pk_end),
    .pdi_valid(pk_rx_valid), .pdi_data(pk_rx_data), .pdi_sop(pk_rx_sop), .pdi_end(pk_rx_end),
    .match(addr_match), .miss(addr_miss)
  );

  // ---------------- sense channel ----------------
  logic            sc_evt;
  logic [2:0][7:0] sc_code;
  mau_byte_t       sc_ev_byte, sc_byte;
  logic            sc_bus_act;
  logic            sc_dlm_valid;
  dlm_t            sc_dlm_type;
  logic            tl_pulse;
  region_t         region;
  logic            acc_circ, acc_pkt, grant_circ, grant_pkt, frame_expired;
  logic            sf_due, rb_due, sr_due, seq_err, mgr_silent, frame_lost;

  dlm_event_detect u_sc_evt (
    .clk, .rst_n, .in_byte(sc_rx), .evt(sc_evt), .dlm_code(sc_code),
    .out_byte(sc_ev_byte), .bus_act(sc_bus_act)
  );

  dlm_detect3 u_sc_det (
    .clk, .rst_n, .evt(sc_evt), .dlm_code(sc_code), .in_byte(sc_ev_byte),
    .dlm_valid(sc_dlm_valid), .dlm_type(sc_dlm_type), .out_byte(sc_byte)
  );

  tl_counter #(.TL_BYTES(TL_BYTES)) u_tl (
    .clk, .rst_n, .enable(region != REG_IDLE), .bus_act(sc_bus_act),
    .restart(sc_dlm_valid), .tl_pulse
  );

  access_right_detect #(
    .N_NODES(N_NODES), .FRAME_BYTES(FRAME_BYTES), .FRAME_SLACK(FRAME_SLACK)
  ) u_acc (
    .clk, .rst_n, .my_id(node_id), .dlm_valid(sc_dlm_valid), .dlm_type(sc_dlm_type),
    .tl_pulse, .region, .circ_pos, .pkt_pos, .acc_circ, .acc_pkt, .grant_circ,
    .grant_pkt, .frame_expired, .sf_due, .rb_due, .sr_due, .seq_err, .mgr_silent,
    .frame_lost
  );

  // ---------------- write channel ----------------
  logic       more_ok, pkt_done, underrun;
  logic       sel_pkt, take, dlm_en, data_en;
  logic [7:0] dlm_byte;
  logic       d_valid, d_last;
  logic [7:0] d_data;
  logic [$clog2(MAX_PKTS + 1)-1:0] pkt_count;

  pkt_round_mgr #(.MAX_PKTS(MAX_PKTS)) u_round (
    .clk, .rst_n, .grant_pkt, .pkt_done, .frame_expired, .pkt_count, .more_ok
  );

  dlm_gen u_dgen (
    .clk, .rst_n, .master(frame_master), .grant_circ, .grant_pkt, .sf_due, .rb_due,
    .sr_due, .bus_idle(!sc_rx.act && !sc_bus_act), .sense_dlm_valid(sc_dlm_valid),
    .more_ok, .st_avail(st_tx_valid), .pk_avail(pk_tx_valid), .d_valid, .d_last,
    .sel_pkt, .take, .dlm_en, .dlm_byte, .data_en, .pkt_done, .underrun, .busy(wc_busy)
  );

  wc_bus_splitter u_wc_split (
    .sel_pkt, .take,
    .st_valid(st_tx_valid), .st_data(st_tx_data), .st_last(st_tx_last), .st_ready(st_tx_ready),
    .pk_valid(pk_tx_valid), .pk_data(pk_tx_data), .pk_last(pk_tx_last), .pk_ready(pk_tx_ready),
    .d_valid, .d_data, .d_last
  );

  pkt_bus_mux u_mux (
    .clk, .rst_n, .dlm_en, .dlm_byte, .data_en, .data_byte(d_data), .wc_tx
  );

  // ---------------- alarms ----------------
  logic [ALM_BITS-1:0] alarm_in;
  always_comb begin
    alarm_in                  = '0;
    alarm_in[ALM_SC_BAD_DLM]  = sc_dlm_valid && sc_dlm_type == DLM_BAD;
    alarm_in[ALM_RC_BAD_DLM]  = rc_dlm_valid && rc_dlm_type == DLM_BAD;
    alarm_in[ALM_SEQ_ERR]     = seq_err;
    alarm_in[ALM_MGR_SILENT]  = mgr_silent;
    alarm_in[ALM_FRAME_LOST]  = frame_lost;
    alarm_in[ALM_WC_UNDERRUN] = underrun;
  end

  alarm_gen #(.N_ALARMS(ALM_BITS)) u_alarm (
    .clk, .rst_n, .alarm_in, .clear(alarm_clear), .mask(alarm_mask),
    .status(alarm_status), .count(alarm_count), .irq(alarm_irq)
  );

  assign frame_region = region;

endmodule
