// tb_pkt_addr_detect: self-checking test of the packet address detection unit.
// Random packets are sent, some to the node's own address, some to addresses
// that differ in one byte, some ending inside the address. The expected
// output is the payload (address removed) of the matching packets only, with
// sop on its first byte and one pdi_end per delivered packet.
module tb_pkt_addr_detect;
  localparam int AB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8*AB-1:0] my_addr;
  logic pk_valid, pk_sop, pk_end;
  logic [7:0] pk_data;
  logic pdi_valid, pdi_sop, pdi_end, match, miss;
  logic [7:0] pdi_data;

  pkt_addr_detect #(.ADDR_BYTES(AB)) dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] expq [$];     // {sop, data}
  int exp_ends = 0, got_ends = 0, exp_match = 0, got_match = 0, got_miss = 0, exp_miss = 0;

  always @(posedge clk) if (rst_n) begin
    if (pdi_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected byte %h", pdi_data);
      end else begin
        logic [8:0] e;
        e = expq.pop_front();
        if ({pdi_sop, pdi_data} !== e) begin
          failures++; $display("FAIL got %b/%h expected %b/%h", pdi_sop, pdi_data, e[8], e[7:0]);
        end
      end
    end
    got_ends  += int'(pdi_end);
    got_match += int'(match);
    got_miss  += int'(miss);
  end

  task automatic send(logic [8*AB-1:0] dst, int len, logic gap);
    logic ok;
    ok = (dst == my_addr) && len >= AB;
    for (int i = 0; i < len; i++) begin
      pk_valid = 1; pk_sop = (i == 0);
      pk_data = (i < AB) ? dst[8*(AB-1-i) +: 8] : 8'($urandom);
      if (ok && i >= AB) expq.push_back({i == AB, pk_data});
      @(negedge clk);
      pk_valid = 0; pk_sop = 0;
      if (gap && i == 2) @(negedge clk);
    end
    pk_end = 1; @(negedge clk); pk_end = 0;
    if (ok) begin exp_ends++; exp_match++; end
    else exp_miss++;
  endtask

  initial begin
    my_addr = 48'h02_1A_2B_3C_4D_5E;
    pk_valid = 0; pk_sop = 0; pk_end = 0; pk_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(my_addr, 20, 0);
    for (int b = 0; b < AB; b++) send(my_addr ^ (48'h1 << (8*b + b)), 12, 0);
    send(my_addr, 7, 1);
    send(my_addr, 4, 0);                    // ends inside the address
    send(my_addr, AB, 0);                   // address only, empty payload
    send(48'hFF_FF_FF_FF_FF_FF, 10, 0);
    for (int i = 0; i < 40; i++)
      send(($urandom % 2 == 1) ? my_addr : {16'h0200, 32'($urandom)}, 6 + $urandom % 30, 1'($urandom % 2));
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || got_ends != exp_ends || got_match != exp_match || got_miss != exp_miss) begin
      failures++;
      $display("FAIL left=%0d ends %0d/%0d match %0d/%0d miss %0d/%0d", expq.size(), got_ends,
               exp_ends, got_match, exp_match, got_miss, exp_miss);
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
