// tb_rc_bus_splitter: self-checking test of the read-channel bus splitter.
// Feeds a scripted hybrid frame (delimiter reports and data bytes) and checks
// that circuit-channel bytes reach the stream outputs, packet bytes the packet
// outputs, bytes outside an SC-opened unit are dropped, first bytes are marked
// and pk_end follows each packet. Expectations are written down per byte as
// the script is played, one clock ahead of the registered outputs.
module tb_rc_bus_splitter;
  import acm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       dlm_valid;
  dlm_t       dlm_type;
  mau_byte_t  in_byte;
  logic       st_valid, st_soc, pk_valid, pk_sop, pk_end;
  logic [7:0] st_data, pk_data;
  region_t    region;

  rc_bus_splitter dut (.*);

  int checks = 0, failures = 0;
  // expected outputs for the next clock
  logic e_st, e_soc, e_pk, e_sop, e_end;
  logic [7:0] e_data;
  int n_st = 0, n_pk = 0, n_end = 0;

  task automatic step();
    @(posedge clk); #1;
    checks++;
    if (st_valid !== e_st || pk_valid !== e_pk || pk_end !== e_end ||
        (e_st && (st_data !== e_data || st_soc !== e_soc)) ||
        (e_pk && (pk_data !== e_data || pk_sop !== e_sop))) begin
      failures++;
      $display("FAIL t=%0t st=%0b/%0b pk=%0b/%0b end=%0b/%0b data st=%h pk=%h exp %h",
               $time, st_valid, e_st, pk_valid, e_pk, pk_end, e_end, st_data, pk_data, e_data);
    end
    n_st += int'(st_valid); n_pk += int'(pk_valid); n_end += int'(pk_end);
    dlm_valid = 0; dlm_type = DLM_NONE; in_byte = IDLE_BYTE;
    e_st = 0; e_soc = 0; e_pk = 0; e_sop = 0; e_end = 0;
  endtask

  task automatic dlm(dlm_t t, logic closes_pkt);
    dlm_valid = 1; dlm_type = t; e_end = closes_pkt;
    step();
  endtask

  // kind: 0 dropped, 1 stream, 2 packet
  task automatic data(int kind, logic first);
    logic [7:0] d;
    d = 8'($urandom);
    in_byte = '{act: 1'b1, dlm: 1'b0, data: d};
    e_data = d;
    e_st = (kind == 1); e_soc = first;
    e_pk = (kind == 2); e_sop = first;
    step();
  endtask

  initial begin
    dlm_valid = 0; dlm_type = DLM_NONE; in_byte = IDLE_BYTE;
    e_st = 0; e_soc = 0; e_pk = 0; e_sop = 0; e_end = 0; e_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    data(0, 0);                 // before any SF: dropped
    dlm(DLM_SC, 0);             // SC outside a frame opens nothing
    data(0, 0);
    dlm(DLM_SF, 0);
    data(0, 0);                 // between SF and SC: dropped
    dlm(DLM_SC, 0);
    data(1, 1); data(1, 0); data(1, 0);
    dlm(DLM_SC, 0);
    data(1, 1); step(); data(1, 0);   // an idle byte inside a channel
    dlm(DLM_EA, 0);
    data(0, 0);
    dlm(DLM_SC, 0);
    data(1, 1);
    dlm(DLM_EA, 0);
    dlm(DLM_RB, 0);
    checks++; if (region !== REG_PACKET) begin failures++; $display("FAIL region"); end
    dlm(DLM_SR, 0);
    dlm(DLM_SC, 0);
    data(2, 1); data(2, 0); data(2, 0); data(2, 0);
    dlm(DLM_SC, 1);
    data(2, 1); data(2, 0);
    dlm(DLM_EA, 1);
    data(0, 0);
    dlm(DLM_SC, 0);
    data(2, 1);
    dlm(DLM_BAD, 1);            // unknown delimiter closes the packet
    data(0, 0);
    dlm(DLM_SC, 0);
    data(2, 1);
    dlm(DLM_SF, 1);             // frame start interrupts the packet region
    checks++; if (region !== REG_CIRCUIT) begin failures++; $display("FAIL region SF"); end
    dlm(DLM_SC, 0);
    data(1, 1);
    dlm(DLM_EA, 0);
    step();
    checks++;
    if (n_st != 7 || n_pk != 8 || n_end != 4) begin
      failures++;
      $display("FAIL counts st=%0d pk=%0d end=%0d", n_st, n_pk, n_end);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
