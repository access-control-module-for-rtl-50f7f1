// pkt_addr_detect: packet address detection unit.
//
// Every received packet starts with the MAC destination address, ADDR_BYTES
// bytes, most significant byte first. The unit holds the address bytes back
// while it compares them, one per clock, with the node's own address. If all
// match, the rest of the packet is passed to the packet data interface with the
// address removed (pdi_sop marks its first byte, pdi_end follows the packet's
// end); otherwise the packet is dropped. A packet that ends inside its address
// is dropped. match/miss pulse once per packet when the decision is made.
//
// The document describes a 9-byte window for the address match; this design
// reads it as the 3 bytes of the SC delimiter plus a 6-byte address, and since
// the delimiter is removed upstream only the address bytes are windowed here.
// Exact match only. Outputs are registered, one clock after the input.
module pkt_addr_detect #(
  parameter int ADDR_BYTES = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [8*ADDR_BYTES-1:0] my_addr,
  input  logic                    pk_valid,
  input  logic [7:0]              pk_data,
  input  logic                    pk_sop,
  input  logic                    pk_end,
  output logic                    pdi_valid,
  output logic [7:0]              pdi_data,
  output logic                    pdi_sop,
  output logic                    pdi_end,
  output logic                    match,
  output logic                    miss
);

  typedef enum logic [1:0] {A_IDLE, A_ADDR, A_PASS, A_DROP} astate_t;
  localparam int IW = (ADDR_BYTES > 1) ? $clog2(ADDR_BYTES) : 1;

  astate_t       st;
  logic [IW-1:0] idx;
  logic          ok, first;

  // address byte idx, most significant first
  function automatic logic [7:0] addr_byte(logic [8*ADDR_BYTES-1:0] a, logic [IW-1:0] i);
    return a[8*(ADDR_BYTES-1-int'(i)) +: 8];
  endfunction

  logic [IW-1:0] idx_cur;
  logic          ok_cur, byte_ok;
  always_comb begin
    idx_cur = pk_sop ? '0 : idx;
    ok_cur  = pk_sop ? 1'b1 : ok;
    byte_ok = (pk_data == addr_byte(my_addr, idx_cur));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= A_IDLE;
      idx       <= '0;
      ok        <= 1'b0;
      first     <= 1'b0;
      pdi_valid <= 1'b0;
      pdi_data  <= '0;
      pdi_sop   <= 1'b0;
      pdi_end   <= 1'b0;
      match     <= 1'b0;
      miss      <= 1'b0;
    end else begin
      pdi_valid <= 1'b0;
      pdi_sop   <= 1'b0;
      pdi_end   <= 1'b0;
      match     <= 1'b0;
      miss      <= 1'b0;
      if (pk_valid && (pk_sop || st == A_ADDR)) begin
        // address byte
        ok  <= ok_cur & byte_ok;
        idx <= idx_cur + 1'b1;
        st  <= A_ADDR;
        if (int'(idx_cur) == ADDR_BYTES - 1) begin
          st    <= (ok_cur & byte_ok) ? A_PASS : A_DROP;
          match <= ok_cur & byte_ok;
          miss  <= !(ok_cur & byte_ok);
          first <= 1'b1;
        end
      end else if (pk_valid && st == A_PASS) begin
        pdi_valid <= 1'b1;
        pdi_data  <= pk_data;
        pdi_sop   <= first;
        first     <= 1'b0;
      end
      if (pk_end) begin
        if (st == A_PASS) pdi_end <= 1'b1;
        if (st == A_ADDR) miss <= 1'b1;
        st <= A_IDLE;
      end
    end
  end

endmodule
