// dlm_gen: delimiter generation unit, the sequencer of the write channel.
//
// When the sense channel grants this node its turn, the unit sends the node's
// circuit channels (circuit region) or packets (packet region), each opened by
// a 3-byte SC delimiter, and closes the access with a 3-byte EA delimiter:
//     SC d d ... d  SC d ... d  EA
// A node with nothing to send at its grant stays silent, and the others move
// on after the TL time-out. In the packet region another packet follows only
// while the packet round manager allows it (more_ok). A node acting as frame
// manager (master=1) also sends SF, RB and SR when the access right unit says
// they are due and the sensed bus is idle; it then waits until a delimiter is
// recognised on the sense channel (its own, after the bus round trip), or for
// ECHO_MAX clocks, before it acts again, so that it never sends one twice.
//
// Interface: dlm_en/dlm_byte and data_en go to the packet bus multiplexer,
// which registers them onto the write bus; take/sel_pkt drive the write bus
// splitter, whose d_* signals return the selected source's byte. If a source
// runs dry inside a channel or packet, underrun pulses and the unit proceeds as
// if the unit had ended.
// Timing: the first SC byte is chosen in the clock of the grant pulse and is on
// the bus one clock later; there is no idle byte between data, SC and EA.
// The delimiter order follows the document; the handshakes, the echo wait and
// the underrun handling are this design's choices.
module dlm_gen
  import acm_pkg::*;
#(
  parameter int ECHO_MAX = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       master,
  input  logic       grant_circ,
  input  logic       grant_pkt,
  input  logic       sf_due,
  input  logic       rb_due,
  input  logic       sr_due,
  input  logic       bus_idle,
  input  logic       sense_dlm_valid,
  input  logic       more_ok,
  input  logic       st_avail,
  input  logic       pk_avail,
  input  logic       d_valid,
  input  logic       d_last,
  output logic       sel_pkt,
  output logic       take,
  output logic       dlm_en,
  output logic [7:0] dlm_byte,
  output logic       data_en,
  output logic       pkt_done,
  output logic       underrun,
  output logic       busy
);

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_DLM, S_DATA, S_ECHO} wstate_t;

  wstate_t st, st_n;
  dlm_t    code, code_n;
  logic [1:0] cnt, cnt_n;
  logic    mode_pkt, mode_pkt_n;
  logic [$clog2(ECHO_MAX+1)-1:0] echo_cnt;

  always_comb begin
    st_n       = st;
    code_n     = code;
    cnt_n      = cnt;
    mode_pkt_n = mode_pkt;
    dlm_en     = 1'b0;
    dlm_byte   = code_of(code);
    take       = 1'b0;
    data_en    = 1'b0;
    pkt_done   = 1'b0;
    underrun   = 1'b0;
    unique case (st)
      S_IDLE: begin
        if (grant_circ && st_avail) begin
          mode_pkt_n = 1'b0;
          code_n     = DLM_SC;
        end else if (grant_pkt && pk_avail) begin
          mode_pkt_n = 1'b1;
          code_n     = DLM_SC;
        end else if (master && bus_idle && sf_due) begin
          code_n = DLM_SF;
        end else if (master && bus_idle && rb_due) begin
          code_n = DLM_RB;
        end else if (master && bus_idle && sr_due) begin
          code_n = DLM_SR;
        end else begin
          code_n = DLM_NONE;
        end
        if (code_n != DLM_NONE) begin
          dlm_en   = 1'b1;
          dlm_byte = code_of(code_n);
          cnt_n    = 2'd1;
          st_n     = S_DLM;
        end
      end
      S_NEXT: begin
        // decide whether another channel / packet follows
        if (mode_pkt ? (pk_avail && more_ok) : st_avail) code_n = DLM_SC;
        else                                             code_n = DLM_EA;
        dlm_en   = 1'b1;
        dlm_byte = code_of(code_n);
        cnt_n    = 2'd1;
        st_n     = S_DLM;
      end
      S_DLM: begin
        dlm_en = 1'b1;
        cnt_n  = cnt + 2'd1;
        if (cnt == 2'd2) begin
          cnt_n = '0;
          case (code)
            DLM_SC:  st_n = S_DATA;
            DLM_EA:  st_n = S_IDLE;
            default: st_n = S_ECHO;
          endcase
        end
      end
      S_DATA: begin
        take    = 1'b1;
        data_en = d_valid;
        if (!d_valid) underrun = 1'b1;
        if (d_last || !d_valid) begin
          pkt_done = mode_pkt;
          st_n     = S_NEXT;
        end
      end
      S_ECHO: begin
        if (sense_dlm_valid || int'(echo_cnt) == ECHO_MAX) st_n = S_IDLE;
      end
      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      code     <= DLM_NONE;
      cnt      <= '0;
      mode_pkt <= 1'b0;
      echo_cnt <= '0;
    end else begin
      st       <= st_n;
      code     <= code_n;
      cnt      <= cnt_n;
      mode_pkt <= mode_pkt_n;
      echo_cnt <= (st == S_ECHO) ? echo_cnt + 1'b1 : '0;
    end
  end

  assign sel_pkt = mode_pkt;
  assign busy    = (st != S_IDLE);

endmodule
