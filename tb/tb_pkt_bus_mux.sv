// tb_pkt_bus_mux: self-checking test of the packet bus multiplexer. Random
// delimiter and data requests are applied and the registered write bus is
// compared one clock later with the expected byte: delimiter first, then
// data, else an idle slot.
module tb_pkt_bus_mux;
  import acm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dlm_en, data_en;
  logic [7:0] dlm_byte, data_byte;
  mau_byte_t wc_tx;
  pkt_bus_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    dlm_en = 0; data_en = 0; dlm_byte = 0; data_byte = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      mau_byte_t e;
      {dlm_en, data_en} = 2'($urandom);
      dlm_byte = 8'($urandom); data_byte = 8'($urandom);
      if (dlm_en)       e = '{act: 1'b1, dlm: 1'b1, data: dlm_byte};
      else if (data_en) e = '{act: 1'b1, dlm: 1'b0, data: data_byte};
      else              e = IDLE_BYTE;
      @(posedge clk); #1;
      checks++;
      if (wc_tx !== e) begin
        failures++; $display("FAIL got %h expected %h", wc_tx, e);
      end
      @(negedge clk);
    end
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
