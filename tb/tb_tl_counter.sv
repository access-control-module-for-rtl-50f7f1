// tb_tl_counter: self-checking test of the TL time-out counter. A reference
// counter in the testbench predicts each tl_pulse for a random mix of bus
// activity, delimiter restarts and enable changes; directed sections check a
// first time-out exactly TL_BYTES silent clocks after the last activity and
// repeated time-outs during a long silence.
module tb_tl_counter;
  localparam int TL = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, bus_act, restart, tl_pulse;
  tl_counter #(.TL_BYTES(TL)) dut (.*);

  int checks = 0, failures = 0;
  int silent = 0;      // silent clocks counted by the reference
  logic exp_pulse = 0;
  int pulses = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (tl_pulse !== exp_pulse) begin
      failures++; $display("FAIL t=%0t tl_pulse=%0b expected %0b", $time, tl_pulse, exp_pulse);
    end
    pulses += int'(tl_pulse);
    exp_pulse <= 1'b0;
    if (!enable || bus_act || restart) silent = 0;
    else begin
      silent++;
      if (silent == TL) begin exp_pulse <= 1'b1; silent = 0; end
    end
  end

  initial begin
    enable = 0; bus_act = 0; restart = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    repeat (30) @(negedge clk);           // disabled: no pulse
    enable = 1; bus_act = 1;
    repeat (5) @(negedge clk);
    bus_act = 0;
    repeat (3 * TL + 2) @(negedge clk);   // three time-outs in a row
    restart = 1; @(negedge clk); restart = 0;
    repeat (TL - 1) @(negedge clk);
    bus_act = 1; @(negedge clk); bus_act = 0;   // activity just before time-out
    repeat (2000) begin
      bus_act = ($urandom % 23) == 0;
      restart = ($urandom % 37) == 0;
      enable  = ($urandom % 101) != 0;
      @(negedge clk);
    end
    checks++;
    if (pulses < 10) begin failures++; $display("FAIL only %0d pulses", pulses); end
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
