// const_mem: constant memory, DEPTH words of W bits (900 x 23 in the
// document), holding register floats such as window and table values.
// One synchronous read port (data one cycle after the address) and one
// write port for loading the constants.
// Sizes are the document's; the loading port is this design's choice.
module const_mem #(
  parameter int DEPTH = 900,
  parameter int W     = 23,
  parameter int AW    = 10
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end
endmodule
