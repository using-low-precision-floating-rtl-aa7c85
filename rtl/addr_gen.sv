// addr_gen: the single dedicated address register AR with auto-increment
// and modulo addressing, used by the bit access instructions, the MAC with
// a memory operand and the AR addressing modes of loads and stores.
// AR steps through a circular buffer [BASE, BASE+LEN): after BASE+LEN-1 it
// wraps to BASE. LEN = 0 turns modulo addressing off (plain increment).
// Writes of AR, BASE and LEN and the increment take effect at the clock
// edge; ar_next always shows where one increment would go. A write of AR
// has priority over an increment in the same cycle.
// Auto-increment and modulo addressing are the document's; the base/length
// form of the modulo buffer is this design's choice.
module addr_gen #(
  parameter int AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_ar,
  input  logic          set_base,
  input  logic          set_len,
  input  logic [AW-1:0] wdata,
  input  logic          inc,
  output logic [AW-1:0] ar,
  output logic [AW-1:0] ar_next,
  output logic          wrapped   // the increment this cycle wraps to BASE
);
  logic [AW-1:0] base, len;

  always_comb begin
    wrapped = (len != '0) && (ar == AW'(base + len - 1'b1));
    ar_next = wrapped ? base : AW'(ar + 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar   <= '0;
      base <= '0;
      len  <= '0;
    end else begin
      if (set_base) base <= wdata;
      if (set_len)  len  <= wdata;
      if (set_ar)   ar   <= wdata;
      else if (inc) ar   <= ar_next;
    end
  end
endmodule
