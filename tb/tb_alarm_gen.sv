// tb_alarm_gen: self-checking test of the alarm generator. Random alarm
// pulses, write-one-to-clear requests and mask settings are applied; a model
// of the sticky status register, the saturating event counter and the
// interrupt is kept in the testbench and compared every clock.
module tb_alarm_gen;
  localparam int NA = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NA-1:0] alarm_in, clear, mask, status;
  logic [7:0] count;
  logic irq;
  alarm_gen #(.N_ALARMS(NA)) dut (.*);

  int checks = 0, failures = 0;
  logic [NA-1:0] m_status = '0;
  int m_count = 0;

  initial begin
    alarm_in = 0; clear = 0; mask = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 1500; i++) begin
      alarm_in = ($urandom % 4 == 0) ? NA'($urandom) & NA'($urandom) : '0;
      clear    = ($urandom % 3 == 0) ? NA'($urandom) : '0;
      mask     = (i % 50 == 0) ? NA'($urandom) : mask;
      @(posedge clk);
      m_status = (m_status & ~clear) | alarm_in;
      if (alarm_in != 0 && m_count < 255) m_count++;
      #1;
      checks++;
      if (status !== m_status || int'(count) != m_count || irq !== |(m_status & mask)) begin
        failures++;
        $display("FAIL status %b/%b count %0d/%0d irq %0b", status, m_status, count, m_count, irq);
      end
      @(negedge clk);
    end
    checks++;
    if (m_count != 255) begin failures++; $display("FAIL counter never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
