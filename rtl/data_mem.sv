// data_mem: data memory, DEPTH words of 16 bits (6100 in the document),
// holding integers and 16-bit memory floats. Port A reads and writes (loads,
// stores, the MAC operand and the first word of a bit access); port B only
// reads (the second word of a bit access). Reads are synchronous: data
// appears one cycle after the address. A read of the word being written on
// port A returns the old contents. Addresses past DEPTH read as zero and
// ignore writes.
// The size and word width are the document's; the second read port is this
// design's choice.
module data_mem #(
  parameter int DEPTH = 6100,
  parameter int AW    = 13
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [15:0]   a_wdata,
  output logic [15:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [15:0]   b_rdata
);
  logic [15:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_we && 32'(a_addr) < DEPTH) mem[a_addr] <= a_wdata;
    a_rdata <= (32'(a_addr) < DEPTH) ? mem[a_addr] : '0;
    b_rdata <= (32'(b_addr) < DEPTH) ? mem[b_addr] : '0;
  end
endmodule
