// tb_wc_bus_splitter: self-checking test of the write-channel bus splitter.
// Random source contents, selections and take requests are applied; the
// selected source's byte must appear on d_*, and only the selected source may
// see ready.
module tb_wc_bus_splitter;
  logic sel_pkt, take, st_valid, st_last, st_ready, pk_valid, pk_last, pk_ready;
  logic d_valid, d_last;
  logic [7:0] st_data, pk_data, d_data;
  wc_bus_splitter dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 500; i++) begin
      {sel_pkt, take, st_valid, st_last, pk_valid, pk_last} = 6'($urandom);
      st_data = 8'($urandom); pk_data = 8'($urandom);
      #1;
      checks++;
      if (sel_pkt ? (d_valid !== pk_valid || d_data !== pk_data || d_last !== pk_last)
                  : (d_valid !== st_valid || d_data !== st_data || d_last !== st_last)) begin
        failures++; $display("FAIL data path sel=%0b", sel_pkt);
      end
      checks++;
      if (st_ready !== (take && !sel_pkt) || pk_ready !== (take && sel_pkt)) begin
        failures++; $display("FAIL ready sel=%0b take=%0b", sel_pkt, take);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
