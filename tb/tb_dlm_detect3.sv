// tb_dlm_detect3: self-checking test of the 3-byte window delimiter detection
// unit. Every delimiter code is presented clean and with each one of its three
// bytes replaced by a different value; triples without a 2-of-3 majority must
// come out as DLM_BAD. Results are checked one clock after the event, and the
// pass-through data byte is checked for its one-clock delay.
module tb_dlm_detect3;
  import acm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            evt;
  logic [2:0][7:0] dlm_code;
  mau_byte_t       in_byte;
  logic            dlm_valid;
  dlm_t            dlm_type;
  mau_byte_t       out_byte;

  dlm_detect3 dut (.*);

  int checks = 0, failures = 0;

  task automatic apply(logic e, logic [7:0] b2, logic [7:0] b1, logic [7:0] b0, dlm_t exp);
    logic [7:0] d;
    d = 8'($urandom);
    evt = e; dlm_code = {b2, b1, b0};
    in_byte = '{act: 1'b1, dlm: 1'b0, data: d};
    @(posedge clk); #1;
    checks++;
    if (dlm_valid !== e || (e && dlm_type !== exp) || (!e && dlm_type !== DLM_NONE) ||
        out_byte.data !== d || out_byte.act !== 1'b1) begin
      failures++;
      $display("FAIL %h %h %h: valid=%0b type=%s expected %s", b2, b1, b0, dlm_valid,
               dlm_type.name(), exp.name());
    end
  endtask

  localparam logic [7:0] CODES [5] = '{CODE_SF, CODE_RB, CODE_EA, CODE_SR, CODE_SC};
  localparam dlm_t       KINDS [5] = '{DLM_SF, DLM_RB, DLM_EA, DLM_SR, DLM_SC};

  initial begin
    evt = 0; dlm_code = '0; in_byte = IDLE_BYTE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      logic [7:0] c, x;
      c = CODES[k];
      x = c ^ 8'h01;      // a corrupted byte, no valid code
      apply(1, c, c, c, KINDS[k]);
      apply(1, x, c, c, KINDS[k]);
      apply(1, c, x, c, KINDS[k]);
      apply(1, c, c, x, KINDS[k]);
      apply(0, c, c, c, DLM_NONE);
      // two bytes of one code, one of another: majority wins
      apply(1, c, CODES[(k+1)%5], c, KINDS[k]);
    end
    apply(1, CODE_SF, CODE_RB, CODE_EA, DLM_BAD);
    apply(1, 8'h00, 8'h00, 8'h00, DLM_BAD);
    apply(1, CODE_SC ^ 8'h80, CODE_SC ^ 8'h01, CODE_SC, DLM_BAD);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] a, b, c;
      dlm_t exp;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      exp = DLM_BAD;
      for (int k = 0; k < 5; k++)
        if (int'(a == CODES[k]) + int'(b == CODES[k]) + int'(c == CODES[k]) >= 2) exp = KINDS[k];
      apply(1, a, b, c, exp);
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
