// prog_mem: program memory, DEPTH words of W bits (6800 x 24 in the
// document). One synchronous read port for instruction fetch (data one
// cycle after the address) and one write port for loading the program.
// Sizes are the document's; the loading port is this design's choice.
module prog_mem #(
  parameter int DEPTH = 6800,
  parameter int W     = 24,
  parameter int AW    = 13
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
