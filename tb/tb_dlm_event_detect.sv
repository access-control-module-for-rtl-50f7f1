// tb_dlm_event_detect: self-checking test of the 4-byte window delimiter event
// unit. A byte stream is built with delimiters at known places: clean ones,
// ones with the first or the middle byte corrupted, one with the last byte
// corrupted (recognised one byte early by design), two back to back, a lone
// delimiter-flagged byte and idle gaps. The expected event positions and the
// expected data stream (all bytes except the accepted delimiter bytes) come
// from where the delimiters were placed, not from the window rule.
module tb_dlm_event_detect;
  import acm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mau_byte_t       in_byte;
  logic            evt, bus_act;
  logic [2:0][7:0] dlm_code;
  mau_byte_t       out_byte;

  dlm_event_detect dut (.*);

  localparam int L = 200;
  mau_byte_t stream [L];
  logic      exp_evt [L];   // event expected when stream[j] sits in w[1]
  logic      swallowed [L]; // byte belongs to an accepted delimiter
  logic [7:0] exp_first [L];
  localparam mau_byte_t LONE = '{act: 1'b1, dlm: 1'b1, data: CODE_SC};
  int n = 0, checks = 0, failures = 0;

  function automatic mau_byte_t dbyte();
    return '{act: 1'b1, dlm: 1'b0, data: 8'($urandom)};
  endfunction

  task automatic put(mau_byte_t b);
    stream[n] = b; exp_evt[n] = 0; swallowed[n] = 0; n++;
  endtask

  // delimiter with optional corrupt byte (0: none, 1..3: that byte)
  task automatic put_dlm(logic [7:0] code, int bad);
    int s;
    mau_byte_t d;
    s = n;
    d = '{act: 1'b1, dlm: 1'b1, data: code};
    for (int i = 1; i <= 3; i++) put((i == bad) ? dbyte() : d);
    if (bad == 3) begin   // accepted one byte early: previous byte swallowed
      exp_evt[s+1] = 1; swallowed[s-1] = 1; swallowed[s] = 1; swallowed[s+1] = 1;
      exp_first[s+1] = stream[s-1].data;
    end else begin
      exp_evt[s+2] = 1; swallowed[s] = 1; swallowed[s+1] = 1; swallowed[s+2] = 1;
      exp_first[s+2] = stream[s].data;
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) put(dbyte());
    put_dlm(CODE_SF, 0);
    for (int i = 0; i < 6; i++) put(dbyte());
    put_dlm(CODE_SC, 1);
    for (int i = 0; i < 4; i++) put(dbyte());
    put_dlm(CODE_EA, 2);
    put(IDLE_BYTE); put(IDLE_BYTE); put(IDLE_BYTE);
    put(dbyte());
    put_dlm(CODE_RB, 0);
    put_dlm(CODE_SR, 0);          // back to back
    for (int i = 0; i < 5; i++) put(dbyte());
    put(LONE);  // lone flagged byte: passes as data
    for (int i = 0; i < 5; i++) put(dbyte());
    put_dlm(CODE_SC, 3);
    for (int i = 0; i < 8; i++) put(dbyte());
    put_dlm(CODE_EA, 0);
    for (int i = 0; i < 8; i++) put(IDLE_BYTE);
  end

  int evt_seen = 0, evt_exp = 0;
  initial begin
    in_byte = IDLE_BYTE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < n + 4; e++) begin
      @(negedge clk);
      // after e edges: w[1] holds stream[e-2], w[3] holds stream[e-4]
      if (e >= 2 && e - 2 < n) begin
        checks++;
        if (evt !== exp_evt[e-2]) begin
          failures++;
          $display("FAIL evt=%0b expected %0b at byte %0d", evt, exp_evt[e-2], e-2);
        end
        if (evt) evt_seen++;
        if (exp_evt[e-2]) begin
          evt_exp++;
          checks++;
          if (dlm_code[2] !== exp_first[e-2]) begin
            failures++;
            $display("FAIL first code %h expected %h", dlm_code[2], exp_first[e-2]);
          end
        end
      end
      if (e >= 4 && e - 4 < n) begin
        checks++;
        if (out_byte.act !== (stream[e-4].act && !swallowed[e-4]) ||
            (out_byte.act && out_byte.data !== stream[e-4].data)) begin
          failures++;
          $display("FAIL data out at byte %0d: act=%0b data=%h", e-4, out_byte.act, out_byte.data);
        end
      end
      checks++;
      if (bus_act !== (e >= 1 && e - 1 < n ? stream[e-1].act : 1'b0)) begin
        failures++;
        $display("FAIL bus_act at %0d", e);
      end
      in_byte = (e < n) ? stream[e] : IDLE_BYTE;
    end
    checks++;
    if (evt_seen != 7 || evt_exp != 7) begin
      failures++;
      $display("FAIL event count %0d/%0d, expected 7", evt_seen, evt_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
